// axi_regs: the shared-memory peripheral between processor and logic: a
// bank of 32-bit registers on an AXI4-Lite slave port. The processor writes
// the measurements, the Flag bit, commands and the controller parameters;
// the logic exposes the dq currents, the angle, the chosen and applied
// switching states and the FSM state, which the processor reads back. Every
// register drives, or is driven by, plain wires of the logic side.
//
// Reset is synchronous, as AXI's ARESETn is.
// Bus behaviour: a write is accepted when AWVALID and WVALID are both high
// and no response is pending (AWREADY and WREADY rise together for one
// cycle); WSTRB selects bytes; BRESP is always OKAY. A read is accepted when
// no read data is pending; RDATA is registered and RRESP is OKAY. Writes to
// read-only or unmapped words are ignored; unmapped words read 0. A write to
// the command word also raises cmd_valid for one clock.
// Register map (word index, see mpc_pkg): 0 ia/ib, 1 ic/vdc, 2 flag,
// 3 command, 4 id*/iq*, 5 ka/kw, 6 kb/lambda, 7 phase step, 8 period,
// 9 id/iq (read-only), 10 theta/optimum/S(k) (read-only), 11 FSM state
// (read-only), 12 cost of the optimum, low 32 bits (read-only). Address
// bits [1:0] select a byte within a word and are ignored.
// Following the document: 32-bit registers on AXI4-Lite, two 16-bit values
// per register, Meas./Param./Flag/Commands in, Vars./State out. This
// design's own choice: the register map and the reset values, which are
// the test-bench operating point of 40 kHz sampling and a 50 Hz frame at a
// 100 MHz clock (see the README for the scale).
module axi_regs
  import mpc_pkg::*;
#(
  parameter int unsigned ADDR_W = 6,
  parameter logic [31:0] RST_REF       = 32'h0000_0000,
  parameter logic [31:0] RST_COEF_A    = {16'sd129, 16'sd15770},
  parameter logic [31:0] RST_COEF_B    = {16'd0, 16'sd2048},
  parameter logic [31:0] RST_PHASE_INC = 32'd5368709,
  parameter logic [31:0] RST_PERIOD    = 32'd2500
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-Lite slave
  input  logic [ADDR_W-1:0] s_axi_awaddr,
  input  logic              s_axi_awvalid,
  output logic              s_axi_awready,
  input  logic [31:0]       s_axi_wdata,
  input  logic [3:0]        s_axi_wstrb,
  input  logic              s_axi_wvalid,
  output logic              s_axi_wready,
  output logic [1:0]        s_axi_bresp,
  output logic              s_axi_bvalid,
  input  logic              s_axi_bready,
  input  logic [ADDR_W-1:0] s_axi_araddr,
  input  logic              s_axi_arvalid,
  output logic              s_axi_arready,
  output logic [31:0]       s_axi_rdata,
  output logic [1:0]        s_axi_rresp,
  output logic              s_axi_rvalid,
  input  logic              s_axi_rready,
  // logic side
  output meas_t             meas,
  output logic              flag,
  output logic              cmd_valid,
  output cmd_e              cmd,
  output param_t            param,
  input  dq_t               vars_idq,
  input  angle_t            vars_theta,
  input  sw_t               vars_optim,
  input  sw_t               vars_s_k,
  input  logic [31:0]       vars_cost,
  input  op_state_e         fsm_state,
  input  logic              fsm_enable
);

  logic [31:0] regs [NREGS];
  logic        wr_go, rd_go;
  logic [ADDR_W-3:0] waddr, raddr;

  assign waddr = s_axi_awaddr[ADDR_W-1:2];
  assign raddr = s_axi_araddr[ADDR_W-1:2];

  assign wr_go = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid;
  assign rd_go = s_axi_arvalid && !s_axi_rvalid;

  assign s_axi_awready = wr_go;
  assign s_axi_wready  = wr_go;
  assign s_axi_arready = rd_go;
  assign s_axi_bresp   = 2'b00;
  assign s_axi_rresp   = 2'b00;

  function automatic logic writable(input int unsigned idx);
    return idx <= REG_PERIOD;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
      regs[REG_REF]       <= RST_REF;
      regs[REG_COEF_A]    <= RST_COEF_A;
      regs[REG_COEF_B]    <= RST_COEF_B;
      regs[REG_PHASE_INC] <= RST_PHASE_INC;
      regs[REG_PERIOD]    <= RST_PERIOD;
      s_axi_bvalid <= 1'b0;
      cmd_valid    <= 1'b0;
    end else begin
      cmd_valid <= 1'b0;
      if (wr_go) begin
        s_axi_bvalid <= 1'b1;
        if (writable(int'(waddr))) begin
          for (int b = 0; b < 4; b++)
            if (s_axi_wstrb[b]) regs[waddr][8*b +: 8] <= s_axi_wdata[8*b +: 8];
          if (int'(waddr) == REG_CMD) cmd_valid <= 1'b1;
        end
      end else if (s_axi_bvalid && s_axi_bready) begin
        s_axi_bvalid <= 1'b0;
      end
      // read-only words follow the logic side
      regs[REG_VARS_IDQ] <= {vars_idq.q, vars_idq.d};
      regs[REG_VARS_ST]  <= {9'd0, vars_s_k, 1'b0, vars_optim, 4'd0, vars_theta};
      regs[REG_VARS_COST] <= vars_cost;
      regs[REG_STATE]    <= {30'd0, fsm_enable, fsm_state == OP_RUN};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
    end else if (rd_go) begin
      s_axi_rvalid <= 1'b1;
      s_axi_rdata  <= (int'(raddr) < NREGS) ? regs[raddr] : 32'd0;
    end else if (s_axi_rvalid && s_axi_rready) begin
      s_axi_rvalid <= 1'b0;
    end
  end

  assign meas  = '{vdc: regs[REG_MEAS_ICV][31:16], ic: regs[REG_MEAS_ICV][15:0],
                   ib:  regs[REG_MEAS_IAB][31:16], ia: regs[REG_MEAS_IAB][15:0]};
  assign flag  = regs[REG_FLAG][0];
  assign cmd   = cmd_e'(regs[REG_CMD][1:0]);
  assign param = '{period:    regs[REG_PERIOD],
                   phase_inc: regs[REG_PHASE_INC],
                   lambda:    regs[REG_COEF_B][31:16],
                   coef:      '{kb: regs[REG_COEF_B][15:0], kw: regs[REG_COEF_A][31:16],
                                ka: regs[REG_COEF_A][15:0]},
                   ref_dq:    '{q: regs[REG_REF][31:16], d: regs[REG_REF][15:0]}};

  // AXI4-Lite: a response, once valid, stays valid and unchanged until taken.
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));

endmodule
