// park: rotation of the alpha-beta currents into the dq frame with the sine
// and cosine of the present interval,
//   d = alpha*cos + beta*sin,   q = beta*cos - alpha*sin   (Q2.14 sin/cos).
// A d-axis aligned with phase a makes a balanced current of amplitude I at
// angle theta come out as d = I, q = 0. Combinational products, one output
// register: o_valid follows i_valid by one clock.
// Following the document: Park stage fed with sin,cos(k), one register.
// This design's own choice: the sign convention of the rotation.
module park
  import mpc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    i_valid,
  input  ab_t     iab,
  input  sincos_t sc,
  output logic    o_valid,
  output dq_t     idq
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      o_valid <= 1'b0;
      idq     <= '0;
    end else begin
      o_valid <= i_valid;
      if (i_valid) idq <= rotate(iab, sc);
    end
  end

endmodule
