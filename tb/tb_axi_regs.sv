// tb_axi_regs: exercises the register block from the bus side and the logic
// side: reset values, write/read-back of every writable word, byte strobes,
// read-only words showing logic-side values and ignoring writes, unmapped
// words reading 0, the one-clock cmd_valid strobe, the decoding of the
// fields into meas/flag/param, and responses held under back-pressure.
module tb_axi_regs;
  import mpc_pkg::*;
  import tb_ref_pkg::*;

  logic      clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_master_if bus (.clk(clk));

  meas_t     meas;
  logic      flag;
  logic      cmd_valid;
  cmd_e      cmd;
  param_t    param;
  dq_t       vars_idq = '0;
  angle_t    vars_theta = '0;
  sw_t       vars_optim = '0;
  sw_t       vars_s_k = '0;
  logic [31:0] vars_cost = '0;
  op_state_e fsm_state = OP_IDLE;
  logic      fsm_enable = 0;
  int        cmd_pulses = 0;

  axi_regs dut (
    .clk(clk), .rst_n(rst_n),
    .s_axi_awaddr(bus.awaddr), .s_axi_awvalid(bus.awvalid), .s_axi_awready(bus.awready),
    .s_axi_wdata(bus.wdata), .s_axi_wstrb(bus.wstrb), .s_axi_wvalid(bus.wvalid), .s_axi_wready(bus.wready),
    .s_axi_bresp(bus.bresp), .s_axi_bvalid(bus.bvalid), .s_axi_bready(bus.bready),
    .s_axi_araddr(bus.araddr), .s_axi_arvalid(bus.arvalid), .s_axi_arready(bus.arready),
    .s_axi_rdata(bus.rdata), .s_axi_rresp(bus.rresp), .s_axi_rvalid(bus.rvalid), .s_axi_rready(bus.rready),
    .*
  );

  always @(posedge clk) if (rst_n && cmd_valid) cmd_pulses++;

  initial begin
    repeat (20000) @(posedge clk);
    check(0, "watchdog");
    report(); $finish;
  end

  initial begin
    logic [31:0] r;
    logic [31:0] shadow [NREGS];
    repeat (3) @(negedge clk);
    rst_n = 1;
    // reset values
    bus.read(REG_PERIOD, r);    check(r == 32'd2500, "period resets to 2500");
    bus.read(REG_PHASE_INC, r); check(r == 32'd5368709, "phase step resets to 50 Hz at 40 kHz");
    bus.read(REG_COEF_A, r);    check(r == {16'd129, 16'd15770}, "ka/kw reset values");
    bus.read(REG_COEF_B, r);    check(r == {16'd0, 16'd2048}, "kb/lambda reset values");
    check(bus.bresp == 2'b00 && bus.rresp == 2'b00, "OKAY responses");
    // every writable word
    for (int k = 0; k < 4; k++) begin
      for (int w = 0; w <= REG_PERIOD; w++) begin
        shadow[w] = $urandom;
        if (w == REG_CMD) shadow[w][31:2] = '0;
        bus.write(w, shadow[w]);
      end
      for (int w = 0; w <= REG_PERIOD; w++) begin
        bus.read(w, r);
        if (w == REG_CMD) check(r[1:0] == shadow[w][1:0], "command word read-back");
        else check(r == shadow[w], $sformatf("word %0d read-back %h want %h", w, r, shadow[w]));
      end
      check(meas.ia == shadow[REG_MEAS_IAB][15:0] && meas.ib == shadow[REG_MEAS_IAB][31:16] &&
            meas.ic == shadow[REG_MEAS_ICV][15:0] && meas.vdc == shadow[REG_MEAS_ICV][31:16], "meas fields");
      check(flag == shadow[REG_FLAG][0], "flag field");
      check(param.ref_dq.d == shadow[REG_REF][15:0] && param.ref_dq.q == shadow[REG_REF][31:16], "reference fields");
      check(param.coef.ka == shadow[REG_COEF_A][15:0] && param.coef.kw == shadow[REG_COEF_A][31:16] &&
            param.coef.kb == shadow[REG_COEF_B][15:0] && param.lambda == shadow[REG_COEF_B][31:16], "coefficient fields");
      check(param.phase_inc == shadow[REG_PHASE_INC] && param.period == shadow[REG_PERIOD], "step and period fields");
    end
    check(cmd_pulses == 4, $sformatf("one cmd_valid per command write: %0d", cmd_pulses));
    // byte strobes
    bus.write(REG_REF, 32'h1111_2222);
    bus.write(REG_REF, 32'hAAAA_BBBB, 4'b0100);
    bus.read(REG_REF, r);
    check(r == 32'h11AA_2222, $sformatf("byte strobe: %h", r));
    // command value
    bus.write(REG_CMD, 32'd1);
    check(cmd == CMD_START, "command decoded");
    // read-only words
    vars_idq = '{q: -16'sd5, d: 16'sd1234}; vars_theta = 12'hABC; vars_optim = 3'd5; vars_s_k = 3'd6;
    vars_cost = 32'hDEAD_BEEF; fsm_state = OP_RUN; fsm_enable = 1;
    repeat (2) @(negedge clk);
    bus.write(REG_VARS_IDQ, 32'h0);
    bus.read(REG_VARS_IDQ, r);  check(r == {16'hFFFB, 16'd1234}, "vars idq read-only and live");
    bus.read(REG_VARS_ST, r);   check(r[11:0] == 12'hABC && r[18:16] == 3'd5 && r[22:20] == 3'd6, $sformatf("vars state %h", r));
    bus.read(REG_VARS_COST, r); check(r == 32'hDEAD_BEEF, "vars cost");
    bus.read(REG_STATE, r);     check(r[1:0] == 2'b11, "fsm state word");
    bus.read(15, r);            check(r == 32'd0, "unmapped word reads 0");
    // back-pressure
    bus.resp_delay = 3;
    bus.write(REG_PERIOD, 32'd714);
    bus.read(REG_PERIOD, r);
    check(r == 32'd714, "write/read with delayed ready");
    bus.resp_delay = 0;
    report(); $finish;
  end
endmodule
