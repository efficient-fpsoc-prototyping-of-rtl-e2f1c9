// tb_sincos_rom: reads all 4096 angles and checks sin and cos against
// round(16384*sin) and round(16384*cos) computed in real arithmetic, with
// the one-clock read latency of a block RAM.
module tb_sincos_rom;
  import mpc_pkg::*;
  import tb_ref_pkg::*;

  logic    clk = 0;
  always #5 clk = ~clk;

  angle_t  theta = '0;
  sincos_t sc;

  sincos_rom dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    check(0, "watchdog");
    report(); $finish;
  end

  initial begin
    int sin_err, cos_err;
    sin_err = 0; cos_err = 0;
    for (int i = 0; i < 4096; i++) begin
      longint es, ec;
      @(negedge clk);
      theta = angle_t'(i);
      @(negedge clk);
      es = longint'($floor(16384.0 * $sin(2.0 * PI * i / 4096.0) + 0.5));
      ec = longint'($floor(16384.0 * $cos(2.0 * PI * i / 4096.0) + 0.5));
      // ties at exact halves may round either way in the table formula
      check((longint'(sc.sin_v) - es) inside {[-1:1]} && (longint'(sc.cos_v) - ec) inside {[-1:1]},
            $sformatf("angle %0d: sin %0d cos %0d want %0d %0d", i, sc.sin_v, sc.cos_v, es, ec));
      if (longint'(sc.sin_v) != es) sin_err++;
      if (longint'(sc.cos_v) != ec) cos_err++;
    end
    check(sin_err <= 4 && cos_err <= 4, $sformatf("exact entries: %0d/%0d differ", sin_err, cos_err));
    // latency: value changes only after the clock edge
    @(negedge clk);
    theta = 12'd1024;
    #1;
    check(sc.sin_v != 16'sd16384, "no combinational read path");
    @(negedge clk);
    check(sc.sin_v == 16'sd16384 && sc.cos_v == 16'sd0, "sin(pi/2) = 1.0, cos = 0");
    report(); $finish;
  end
endmodule
