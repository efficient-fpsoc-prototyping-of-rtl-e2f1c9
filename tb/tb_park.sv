// tb_park: checks the dq rotation against the reference at random angles of
// the 4096-step table and for random and saturating inputs, that a current
// space vector at the rotation angle maps to (|I|, 0), and that the result
// follows i_valid by one clock.
module tb_park;
  import mpc_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    i_valid = 0, o_valid;
  ab_t     iab = '0;
  sincos_t sc = '0;
  dq_t     idq;

  park dut (.*);

  initial begin
    repeat (4000) @(posedge clk);
    check(0, "watchdog");
    report(); $finish;
  end

  task automatic apply(input longint al, be, input int ang, input string tag);
    longint ed, eq, sn, cs;
    sn = sin_tab(ang); cs = cos_tab(ang);
    @(negedge clk);
    iab = '{beta: q_t'(be), alpha: q_t'(al)};
    sc  = '{cos_v: q_t'(cs), sin_v: q_t'(sn)};
    i_valid = 1;
    @(negedge clk);
    i_valid = 0;
    check(o_valid === 1'b1, {tag, ": o_valid one clock after i_valid"});
    rot(al, be, sn, cs, ed, eq);
    check(longint'(idq.d) == ed && longint'(idq.q) == eq,
          $sformatf("%s: got (%0d,%0d) want (%0d,%0d)", tag, idq.d, idq.q, ed, eq));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 64; k++) begin
      int ang;
      real th;
      ang = k * 64;
      th = 2.0 * PI * ang / 4096.0;
      apply(longint'($floor(1500.0 * $cos(th) + 0.5)), longint'($floor(1500.0 * $sin(th) + 0.5)), ang, "aligned");
      check((longint'(idq.d) - 1500) inside {[-3:3]} && longint'(idq.q) inside {[-3:3]},
            $sformatf("aligned vector gives (1500,0): (%0d,%0d)", idq.d, idq.q));
    end
    for (int k = 0; k < 300; k++) apply(rnd16(), rnd16(), int'($urandom % 4096), "random");
    apply(32767, 32767, 512, "saturate");
    report(); $finish;
  end
endmodule
