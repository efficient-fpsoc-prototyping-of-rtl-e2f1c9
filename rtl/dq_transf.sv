// dq_transf: the transformation block of the control algorithm, made of
// four stages: sync_signals catches the Flag toggle and captures the sample,
// clarke and park take the phase currents to the dq frame (one register
// each), and update_theta advances the angle to the k+1 interval in
// parallel with the Clarke stage. The angle leaves the block to address the
// sine table, whose output (sin,cos of k+1) comes back in and is captured
// as sin,cos of k at the next sample.
// Timing, counting the cycle the toggle is first visible as cycle 0:
// sync o_valid in cycle 1, theta_k1 updated and clarke valid in cycle 2,
// idq_k0 (o_valid) in cycle 3, and the table's sin,cos(k+1) valid in
// cycle 3 as well (one clock after theta).
// Following the document: the block structure and signals of its figure
// of this block. This design's own choice: pipeline alignment as above.
module dq_transf
  import mpc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        flag,
  input  meas_t       meas,
  input  sincos_t     sc_k1,
  input  logic [31:0] phase_inc,
  output logic        sync_valid,
  output logic        o_valid,
  output dq_t         idq_k0,
  output sincos_t     sc_k0,
  output q_t          vdc_k0,
  output angle_t      theta_k1
);

  abc_t iabc_k0;
  ab_t  iab_k0;
  logic clarke_valid;

  sync_signals u_sync (
    .clk     (clk),
    .rst_n   (rst_n),
    .flag    (flag),
    .meas    (meas),
    .sc_k1   (sc_k1),
    .o_valid (sync_valid),
    .iabc_k0 (iabc_k0),
    .vdc_k0  (vdc_k0),
    .sc_k0   (sc_k0)
  );

  clarke u_clarke (
    .clk     (clk),
    .rst_n   (rst_n),
    .i_valid (sync_valid),
    .iabc    (iabc_k0),
    .o_valid (clarke_valid),
    .iab     (iab_k0)
  );

  park u_park (
    .clk     (clk),
    .rst_n   (rst_n),
    .i_valid (clarke_valid),
    .iab     (iab_k0),
    .sc      (sc_k0),
    .o_valid (o_valid),
    .idq     (idq_k0)
  );

  update_theta #(.ACC_W(32)) u_theta (
    .clk       (clk),
    .rst_n     (rst_n),
    .i_valid   (sync_valid),
    .phase_inc (phase_inc),
    .o_valid   (),
    .theta_k1  (theta_k1)
  );

endmodule
