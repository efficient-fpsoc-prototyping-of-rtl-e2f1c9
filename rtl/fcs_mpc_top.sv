// fcs_mpc_top: programmable-logic side of a finite-control-set model
// predictive current controller for a two-level three-phase inverter with
// an RL load. The processor reaches it through one AXI4-Lite port; the
// logic interrupts the processor once per sampling interval and drives the
// six gate signals.
//
// Sequence of one sampling interval: sample_counter ticks -> the interrupt
// asks the processor to read the ADC, and the firing pulses apply the
// state chosen in the previous interval -> the processor writes ia, ib, ic
// and vdc and toggles the Flag bit -> dq_transf (sync, Clarke, Park, angle
// update) -> sincos_rom gives sin,cos(k+1) -> pred_k1 predicts idq(k+1) ->
// the k+2 search evaluates cost (4) for all eight switching states and
// hands the best to firing_pulses, which holds it until the next tick.
//
// ESA_PARALLEL selects the k+2 search: 1 = eight prediction blocks and a
// comparator (pred_k2_parallel), 0 = one block stepped by an FSM
// (pred_k2_sequential). From the toggle being visible to the chosen state
// being stored takes 5 clocks with the parallel search and 37 with the
// sequential one (50 ns and 370 ns at 100 MHz). calc_busy is high for
// exactly that span, counted from the clock the sample is captured to the
// clock the chosen state is stored: a probe for measuring the calculation
// time on a pin, as an oscilloscope would.
// Following the document: the block diagram, the Flag trigger, valid
// propagation, sin/cos from block RAM, the two search architectures. This
// design's own choice: register map, number scales, the calc_busy probe
// timing and the one-cycle interrupt pulse.
module fcs_mpc_top
  import mpc_pkg::*;
#(
  parameter bit ESA_PARALLEL = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite slave, 64-byte window
  input  logic [5:0]  s_axi_awaddr,
  input  logic        s_axi_awvalid,
  output logic        s_axi_awready,
  input  logic [31:0] s_axi_wdata,
  input  logic [3:0]  s_axi_wstrb,
  input  logic        s_axi_wvalid,
  output logic        s_axi_wready,
  output logic [1:0]  s_axi_bresp,
  output logic        s_axi_bvalid,
  input  logic        s_axi_bready,
  input  logic [5:0]  s_axi_araddr,
  input  logic        s_axi_arvalid,
  output logic        s_axi_arready,
  output logic [31:0] s_axi_rdata,
  output logic [1:0]  s_axi_rresp,
  output logic        s_axi_rvalid,
  input  logic        s_axi_rready,
  // to the processor's private interrupt input
  output logic        irq,
  // inverter
  output logic [5:0]  gates,
  output sw_t         s_k,
  // calculation-time probe
  output logic        calc_busy
);

  meas_t     meas;
  logic      flag;
  logic      cmd_valid;
  cmd_e      cmd;
  param_t    param;
  op_state_e fsm_state;
  logic      enable;
  logic      tick;

  logic      sync_valid, dq_valid, k1_valid, k2_valid;
  dq_t       idq_k0, idq_k1;
  sincos_t   sc_k0, sc_k1;
  q_t        vdc_k0;
  angle_t    theta_k1;
  sw_t       optim_state;
  cost_t     min_cost;

  axi_regs #(.ADDR_W(6)) u_regs (
    .clk           (clk),
    .rst_n         (rst_n),
    .s_axi_awaddr  (s_axi_awaddr),
    .s_axi_awvalid (s_axi_awvalid),
    .s_axi_awready (s_axi_awready),
    .s_axi_wdata   (s_axi_wdata),
    .s_axi_wstrb   (s_axi_wstrb),
    .s_axi_wvalid  (s_axi_wvalid),
    .s_axi_wready  (s_axi_wready),
    .s_axi_bresp   (s_axi_bresp),
    .s_axi_bvalid  (s_axi_bvalid),
    .s_axi_bready  (s_axi_bready),
    .s_axi_araddr  (s_axi_araddr),
    .s_axi_arvalid (s_axi_arvalid),
    .s_axi_arready (s_axi_arready),
    .s_axi_rdata   (s_axi_rdata),
    .s_axi_rresp   (s_axi_rresp),
    .s_axi_rvalid  (s_axi_rvalid),
    .s_axi_rready  (s_axi_rready),
    .meas          (meas),
    .flag          (flag),
    .cmd_valid     (cmd_valid),
    .cmd           (cmd),
    .param         (param),
    .vars_idq      (idq_k0),
    .vars_theta    (theta_k1),
    .vars_optim    (optim_state),
    .vars_s_k      (s_k),
    .vars_cost     (min_cost[31:0]),
    .fsm_state     (fsm_state),
    .fsm_enable    (enable)
  );

  sample_counter #(.CNT_W(32)) u_counter (
    .clk    (clk),
    .rst_n  (rst_n),
    .period (param.period),
    .tick   (tick)
  );

  assign irq = tick;

  op_fsm u_fsm (
    .clk       (clk),
    .rst_n     (rst_n),
    .cmd_valid (cmd_valid),
    .cmd       (cmd),
    .state     (fsm_state),
    .enable    (enable)
  );

  dq_transf u_dq (
    .clk         (clk),
    .rst_n       (rst_n),
    .flag        (flag),
    .meas        (meas),
    .sc_k1       (sc_k1),
    .phase_inc   (param.phase_inc),
    .sync_valid  (sync_valid),
    .o_valid     (dq_valid),
    .idq_k0      (idq_k0),
    .sc_k0       (sc_k0),
    .vdc_k0      (vdc_k0),
    .theta_k1    (theta_k1)
  );

  sincos_rom #(.DEPTH(1 << AW)) u_rom (
    .clk   (clk),
    .theta (theta_k1),
    .sc    (sc_k1)
  );

  pred_k1 u_k1 (
    .clk     (clk),
    .rst_n   (rst_n),
    .i_valid (dq_valid),
    .idq_k0  (idq_k0),
    .sc_k0   (sc_k0),
    .s_k     (s_k),
    .vdc     (vdc_k0),
    .coef    (param.coef),
    .o_valid (k1_valid),
    .idq_k1  (idq_k1)
  );

  if (ESA_PARALLEL) begin : g_par
    pred_k2_parallel u_k2 (
      .clk         (clk),
      .rst_n       (rst_n),
      .i_valid     (k1_valid),
      .idq_k1      (idq_k1),
      .sc_k1       (sc_k1),
      .s_k         (s_k),
      .vdc         (vdc_k0),
      .coef        (param.coef),
      .ref_dq      (param.ref_dq),
      .lambda      (param.lambda),
      .o_valid     (k2_valid),
      .optim_state (optim_state),
      .min_cost    (min_cost)
    );
  end else begin : g_seq
    logic seq_busy;
    pred_k2_sequential u_k2 (
      .clk         (clk),
      .rst_n       (rst_n),
      .i_valid     (k1_valid),
      .idq_k1      (idq_k1),
      .sc_k1       (sc_k1),
      .s_k         (s_k),
      .vdc         (vdc_k0),
      .coef        (param.coef),
      .ref_dq      (param.ref_dq),
      .lambda      (param.lambda),
      .o_valid     (k2_valid),
      .busy        (seq_busy),
      .optim_state (optim_state),
      .min_cost    (min_cost)
    );
  end

  firing_pulses u_fire (
    .clk       (clk),
    .rst_n     (rst_n),
    .opt_valid (k2_valid),
    .opt_state (optim_state),
    .tick      (tick),
    .enable    (enable),
    .s_k       (s_k),
    .gates     (gates)
  );

  // calculation probe: high from the cycle the sample is captured to the
  // cycle the chosen state is handed to the firing pulses
  logic busy_q;
  always_ff @(posedge clk) begin
    if (!rst_n)          busy_q <= 1'b0;
    else if (sync_valid) busy_q <= 1'b1;
    else if (k2_valid)   busy_q <= 1'b0;
  end
  assign calc_busy = sync_valid | busy_q;

endmodule
