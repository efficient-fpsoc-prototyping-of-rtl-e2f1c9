// sincos_rom: block-RAM sine table giving the sine and cosine of a 12-bit
// binary-radian angle (4096 steps per turn). One table of DEPTH 16-bit
// words holds sin(2*pi*i/DEPTH) in Q2.14; it is read through two ports, the
// first at theta for the sine and the second at theta + DEPTH/4 for the
// cosine, which is what a true dual-port block RAM provides. Both read
// ports are synchronous: sin/cos appear one clock after the angle, as a
// block RAM requires.
// The table is filled at elaboration with
//   rom[i] = round(16384 * sin(2*pi*i/DEPTH)).
// Following the document: a block-RAM lookup of 16-bit values addressed by
// the 12-bit angle of interval k+1. This design's own choice: storing one
// sine table and reading the cosine a quarter turn further.
module sincos_rom
  import mpc_pkg::*;
#(
  parameter int unsigned DEPTH = 4096   // entries per turn, 2**AW
) (
  input  logic    clk,
  input  angle_t  theta,
  output sincos_t sc
);

  localparam real PI = 3.14159265358979323846;

  q_t rom [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      rom[i] = q_t'($rtoi($floor(16384.0 * $sin(2.0 * PI * real'(i) / real'(DEPTH)) + 0.5)));
    end
  end

  angle_t theta_cos;
  assign theta_cos = theta + angle_t'(DEPTH / 4);

  always_ff @(posedge clk) begin
    sc.sin_v <= rom[theta];
    sc.cos_v <= rom[theta_cos];
  end

endmodule
