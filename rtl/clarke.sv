// clarke: amplitude-invariant abc to alpha-beta transformation of the phase
// currents,
//   alpha = (2*ia - ib - ic) / 3,   beta = (ib - ic) / sqrt(3),
// evaluated in fixed point with Q2.14 constants and saturated to 16 bits.
// The sums and products are combinational and end in one output register,
// so o_valid follows i_valid by one clock and the result is held otherwise.
// Following the document: a combinational block closed by a flip-flop,
// 16-bit arithmetic. This design's own choice: the amplitude-invariant form
// (the document does not print its Clarke matrix) and the rounding.
module clarke
  import mpc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic i_valid,
  input  abc_t iabc,
  output logic o_valid,
  output ab_t  iab
);

  ab_t nxt;

  always_comb begin
    logic signed [47:0] a, b;
    a = (48'(2 * 48'(iabc.a) - 48'(iabc.b) - 48'(iabc.c)) * 48'(C_ONE_THIRD)) >>> QF;
    b = ((48'(iabc.b) - 48'(iabc.c)) * 48'(C_INV_SQRT3)) >>> QF;
    nxt = '{beta: sat16(b), alpha: sat16(a)};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      o_valid <= 1'b0;
      iab     <= '0;
    end else begin
      o_valid <= i_valid;
      if (i_valid) iab <= nxt;
    end
  end

endmodule
