// tb_sync_signals: toggles the Flag bit in both directions and checks that
// each toggle, and only a toggle, produces one o_valid pulse one clock later
// with the measurements and the sin/cos present at the toggle captured and
// held until the next toggle.
module tb_sync_signals;
  import mpc_pkg::*;
  import tb_ref_pkg::*;

  logic    clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    flag = 0;
  meas_t   meas = '0;
  sincos_t sc_k1 = '0;
  logic    o_valid;
  abc_t    iabc_k0;
  q_t      vdc_k0;
  sincos_t sc_k0;
  int      pulses = 0;

  sync_signals dut (.*);

  always @(posedge clk) if (rst_n && o_valid) pulses++;

  initial begin
    repeat (3000) @(posedge clk);
    check(0, "watchdog");
    report(); $finish;
  end

  initial begin
    meas_t   m;
    sincos_t s;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    check(pulses == 0, "no pulse without a toggle");
    for (int k = 0; k < 100; k++) begin
      m = '{vdc: q_t'(rnd16()), ic: q_t'(rnd16()), ib: q_t'(rnd16()), ia: q_t'(rnd16())};
      s = '{cos_v: q_t'(rnd16()), sin_v: q_t'(rnd16())};
      meas = m; sc_k1 = s;
      flag = ~flag;
      @(negedge clk);
      check(o_valid === 1'b1, "o_valid one clock after the toggle");
      check(iabc_k0 == '{c: m.ic, b: m.ib, a: m.ia} && vdc_k0 == m.vdc && sc_k0 == s,
            $sformatf("capture %0d", k));
      // inputs move on, no toggle: nothing changes
      meas = '{vdc: q_t'(rnd16()), ic: q_t'(rnd16()), ib: q_t'(rnd16()), ia: q_t'(rnd16())};
      sc_k1 = '{cos_v: q_t'(rnd16()), sin_v: q_t'(rnd16())};
      @(negedge clk);
      check(o_valid === 1'b0, "o_valid is a single pulse");
      repeat (int'($urandom % 4)) @(negedge clk);
      check(iabc_k0 == '{c: m.ic, b: m.ib, a: m.ia} && vdc_k0 == m.vdc && sc_k0 == s,
            "values held between toggles");
    end
    check(pulses == 100, $sformatf("one pulse per toggle: %0d", pulses));
    report(); $finish;
  end
endmodule
