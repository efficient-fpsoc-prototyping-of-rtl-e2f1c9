// tb_sample_counter: measures the spacing of the ticks for the periods of
// 40, 80 and 140 kHz sampling at 100 MHz (2500, 1250, 714 clocks), a change
// of period taking effect at the next wrap, and the lower bound of 2.
module tb_sample_counter;
  import tb_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0] period = 32'd2500;
  logic        tick;
  longint      cyc = 0, last_tick = -1;
  int          gaps [$];

  sample_counter dut (.*);

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && tick) begin
      if (last_tick >= 0) gaps.push_back(int'(cyc - last_tick));
      last_tick <= cyc;
    end
  end

  initial begin
    repeat (60000) @(posedge clk);
    check(0, "watchdog");
    report(); $finish;
  end

  task automatic measure(input int p, input int n, input int want);
    gaps.delete();
    @(negedge clk); period = 32'(p);
    // let the running interval finish at the old period
    wait (gaps.size() >= 1);
    gaps.delete();
    wait (gaps.size() >= n);
    foreach (gaps[i]) check(gaps[i] == want, $sformatf("period %0d: tick gap %0d", p, gaps[i]));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    measure(2500, 5, 2500);
    measure(1250, 5, 1250);
    measure(714, 5, 714);
    measure(1, 5, 2);
    measure(2, 5, 2);
    report(); $finish;
  end
endmodule
