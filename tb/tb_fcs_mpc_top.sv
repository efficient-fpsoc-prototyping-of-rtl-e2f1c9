// tb_fcs_mpc_top: end-to-end test of fcs_mpc_top with the parallel search, every
// parameter at its default. A processor model on the AXI4-Lite port and a
// simulated RL load close the loop for about 190 ms of operation: 40 kHz
// sampling with the current reference stepping from 1 A to 2 A, the
// switching-limiting term, 80 kHz and 140 kHz sampling, stop and restart.
// Every decision is checked against an exhaustive reference search, every
// applied state against the previous decision, the calculation time
// against 5 clocks, and the tracking error of the dq currents; each
// mechanism is counted and must occur.
module tb_fcs_mpc_top;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_master_if bus (.clk(clk));
  logic       irq;
  logic [5:0] gates;
  logic [2:0] s_k;
  logic       calc_busy;

  localparam int EXP_LAT = 5;

  fcs_mpc_top dut (
    .clk(clk), .rst_n(rst_n),
    .s_axi_awaddr(bus.awaddr), .s_axi_awvalid(bus.awvalid), .s_axi_awready(bus.awready),
    .s_axi_wdata(bus.wdata), .s_axi_wstrb(bus.wstrb), .s_axi_wvalid(bus.wvalid), .s_axi_wready(bus.wready),
    .s_axi_bresp(bus.bresp), .s_axi_bvalid(bus.bvalid), .s_axi_bready(bus.bready),
    .s_axi_araddr(bus.araddr), .s_axi_arvalid(bus.arvalid), .s_axi_arready(bus.arready),
    .s_axi_rdata(bus.rdata), .s_axi_rresp(bus.rresp), .s_axi_rvalid(bus.rvalid), .s_axi_rready(bus.rready),
    .irq(irq), .gates(gates), .s_k(s_k), .calc_busy(calc_busy)
  );

`include "tb_mpc_system_body.svh"

  initial begin
    repeat (50_000_000) @(posedge clk);
    check(0, "watchdog");
    report();
    $finish;
  end

  initial begin
    run_all();
    report();
    $finish;
  end
endmodule
