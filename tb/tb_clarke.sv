// tb_clarke: checks the Clarke stage against the reference for random and
// balanced sinusoidal currents, including values that saturate, and checks
// that the result appears exactly one clock after i_valid and is held when
// i_valid is low.
module tb_clarke;
  import mpc_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic i_valid = 0, o_valid;
  abc_t iabc = '0;
  ab_t  iab;

  clarke dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    check(0, "watchdog");
    report(); $finish;
  end

  task automatic apply(input longint a, b, c, input string tag);
    longint ea, eb;
    @(negedge clk);
    iabc = '{c: q_t'(c), b: q_t'(b), a: q_t'(a)};
    i_valid = 1;
    @(negedge clk);
    i_valid = 0;
    check(o_valid === 1'b1, {tag, ": o_valid one clock after i_valid"});
    clarke(a, b, c, ea, eb);
    check(longint'(iab.alpha) == ea && longint'(iab.beta) == eb,
          $sformatf("%s: (%0d,%0d,%0d) -> (%0d,%0d) want (%0d,%0d)", tag, a, b, c, iab.alpha, iab.beta, ea, eb));
    @(negedge clk);
    check(o_valid === 1'b0, {tag, ": o_valid is a pulse"});
  endtask

  initial begin
    ab_t held;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // balanced currents, amplitude 1000: alpha = I cos, beta = I sin
    for (int k = 0; k < 24; k++) begin
      real th;
      longint a, b, c;
      th = 2.0 * PI * k / 24.0;
      a = longint'($floor(1000.0 * $cos(th) + 0.5));
      b = longint'($floor(1000.0 * $cos(th - 2.0 * PI / 3.0) + 0.5));
      c = -a - b;
      apply(a, b, c, "balanced");
      check((longint'(iab.alpha) - longint'($floor(1000.0 * $cos(th) + 0.5))) inside {[-2:2]} &&
            (longint'(iab.beta)  - longint'($floor(1000.0 * $sin(th) + 0.5))) inside {[-2:2]},
            "balanced: alpha/beta match I*cos, I*sin");
    end
    for (int k = 0; k < 200; k++) apply(rnd16(), rnd16(), rnd16(), "random");
    apply(32767, -32768, -32768, "saturate high");
    apply(-32768, 32767, 32767, "saturate low");
    // hold when not valid
    held = iab;
    @(negedge clk);
    iabc = '{c: 16'sd5, b: 16'sd7, a: 16'sd11};
    repeat (2) @(negedge clk);
    check(iab == held, "output held without i_valid");
    report(); $finish;
  end
endmodule
