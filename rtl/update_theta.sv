// update_theta: phase accumulator of the reference frame. Each new sample
// (i_valid) adds the per-sample phase step to a 32-bit accumulator in which
// 2^32 is one electrical turn; the top 12 bits are the binary-radian angle of
// the k+1 interval that addresses the sine table. With a 50 Hz frame sampled
// at 40 kHz the step is 2^32*50/40000 = 5368709; a fractional step keeps the
// frequency exact although 4096*50/40000 is not an integer.
// Timing: theta_k1 changes, and o_valid pulses, one clock after i_valid.
// Following the document: a 12-bit binary-radian angle for k+1. This
// design's own choice: the 32-bit accumulator and a step written by the
// processor.
module update_theta
  import mpc_pkg::*;
#(
  parameter int unsigned ACC_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             i_valid,
  input  logic [ACC_W-1:0] phase_inc,
  output logic             o_valid,
  output angle_t           theta_k1
);

  logic [ACC_W-1:0] acc;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc     <= '0;
      o_valid <= 1'b0;
    end else begin
      o_valid <= i_valid;
      if (i_valid) acc <= acc + phase_inc;
    end
  end

  assign theta_k1 = acc[ACC_W-1 -: AW];

endmodule
