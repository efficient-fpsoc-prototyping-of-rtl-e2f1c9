// tb_dq_transf: the transformation block with a model of the one-clock sine
// table in the loop. Feeds balanced three-phase currents that rotate with the
// frame, sample by sample, and checks: idq(k) against the reference chain
// (Clarke then rotation by the angle of interval k) and close to the
// amplitude on d and 0 on q; that sin,cos(k) captured at each sample is the
// table value of the angle announced as k+1 at the previous sample; the
// angle advancing by the phase step; and the 3-clock latency from the Flag
// toggle to o_valid.
module tb_dq_transf;
  import mpc_pkg::*;
  import tb_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        flag = 0;
  meas_t       meas = '0;
  sincos_t     sc_k1 = '0;
  logic [31:0] phase_inc = 32'd5368709;
  logic        sync_valid, o_valid;
  dq_t         idq_k0;
  sincos_t     sc_k0;
  q_t          vdc_k0;
  angle_t      theta_k1;

  dq_transf dut (.*);

  // one-clock table model
  always @(posedge clk) sc_k1 <= '{cos_v: q_t'(cos_tab(int'(theta_k1))), sin_v: q_t'(sin_tab(int'(theta_k1)))};

  initial begin
    repeat (100000) @(posedge clk);
    check(0, "watchdog");
    report(); $finish;
  end

  initial begin
    longint unsigned acc;
    int ang_k;       // angle of interval k used by the design
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    acc = 0;
    for (int n = 0; n < 1200; n++) begin
      real th, amp;
      longint a, b, c, al, be, ed, eq;
      int lat;
      ang_k = int'(acc >> 20);
      amp = (n < 600) ? 1000.0 : 2000.0;
      // balanced currents at the angle of interval k plus a small phase lag
      th = 2.0 * PI * real'(ang_k) / 4096.0 - 0.3;
      a = longint'($floor(amp * $cos(th) + 0.5));
      b = longint'($floor(amp * $cos(th - 2.0 * PI / 3.0) + 0.5));
      c = -a - b;
      @(negedge clk);
      meas = '{vdc: 16'sd1400, ic: q_t'(c), ib: q_t'(b), ia: q_t'(a)};
      flag = ~flag;
      lat = 0;
      do begin @(negedge clk); lat++; end while (!o_valid && lat < 20);
      check(lat == 3, $sformatf("latency %0d, want 3", lat));
      check(sc_k0 == '{cos_v: q_t'(cos_tab(ang_k)), sin_v: q_t'(sin_tab(ang_k))},
            $sformatf("sample %0d: sin,cos(k) is the table at the previous k+1 angle %0d", n, ang_k));
      clarke(a, b, c, al, be);
      rot(al, be, sin_tab(ang_k), cos_tab(ang_k), ed, eq);
      check(longint'(idq_k0.d) == ed && longint'(idq_k0.q) == eq,
            $sformatf("sample %0d: idq (%0d,%0d) want (%0d,%0d)", n, idq_k0.d, idq_k0.q, ed, eq));
      // physical: d = amp*cos(0.3), q = -amp*sin(0.3)... within a few LSB
      check(fabs(real'(idq_k0.d) - amp * $cos(0.3)) < 6.0 && fabs(real'(idq_k0.q) + amp * $sin(0.3)) < 6.0,
            $sformatf("sample %0d: dq of a balanced set (%0d,%0d)", n, idq_k0.d, idq_k0.q));
      check(vdc_k0 == 16'sd1400, "vdc captured");
      acc = (acc + 64'd5368709) % (64'd1 << 32);
      check(int'(theta_k1) == int'(acc >> 20), "angle advanced by one step");
      repeat (5) @(negedge clk);
    end
    report(); $finish;
  end
endmodule
