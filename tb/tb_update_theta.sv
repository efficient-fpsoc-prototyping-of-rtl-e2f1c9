// tb_update_theta: steps the phase accumulator with random and with the
// 40 kHz / 50 Hz step and checks the 12-bit angle against a 64-bit model of
// the accumulator, the one-clock o_valid, and that the angle only moves on
// i_valid. It also checks that 800 samples of the 50 Hz step come back to
// the starting angle within one table step (one 50 Hz cycle at 40 kHz).
module tb_update_theta;
  import mpc_pkg::*;
  import tb_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        i_valid = 0, o_valid;
  logic [31:0] phase_inc = '0;
  angle_t      theta_k1;
  longint unsigned model;

  update_theta dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    check(0, "watchdog");
    report(); $finish;
  end

  task automatic step(input logic [31:0] inc);
    @(negedge clk);
    phase_inc = inc;
    i_valid = 1;
    @(negedge clk);
    i_valid = 0;
    model = (model + longint'(inc)) % (64'd1 << 32);
    check(o_valid === 1'b1, "o_valid one clock after i_valid");
    check(int'(theta_k1) == int'(model >> 20), $sformatf("theta %0d want %0d", theta_k1, model >> 20));
  endtask

  initial begin
    model = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(theta_k1 == '0, "angle is 0 after reset");
    for (int k = 0; k < 200; k++) step($urandom);
    // stable without i_valid
    begin
      angle_t t;
      t = theta_k1;
      phase_inc = 32'h1234_5678;
      repeat (5) @(negedge clk);
      check(theta_k1 == t, "angle held without i_valid");
    end
    // one 50 Hz period at 40 kHz
    begin
      angle_t t0;
      int diff;
      t0 = theta_k1;
      for (int k = 0; k < 800; k++) step(32'd5368709);
      diff = (int'(theta_k1) - int'(t0) + 4096) % 4096;
      check(diff <= 1 || diff >= 4095, $sformatf("800 steps of 50 Hz at 40 kHz close a turn: %0d", diff));
    end
    report(); $finish;
  end
endmodule
