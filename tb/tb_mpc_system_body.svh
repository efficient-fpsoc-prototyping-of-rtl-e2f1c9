// tb_mpc_system_body.svh: body shared by the two end-to-end testbenches of
// fcs_mpc_top (parallel and sequential search). The including module
// declares clk, rst_n, the bus interface `bus`, the DUT `dut` with its
// outputs irq, gates, s_k, calc_busy, and the localparam EXP_LAT (expected
// calc_busy width in clocks).
//
// Plant: a three-phase RL load (R = 30 ohm, L = 20 mH, vdc = 140 V) with
// isolated neutral, integrated in real arithmetic with 50 sub-steps per
// sampling interval under the gate pattern the controller applies (all
// gates off is modelled as zero voltage). Measurements are quantised like a
// 12-bit converter spanning +-5 A and given to the controller in mA; the
// dc-link voltage in units of 0.1 V.
// Processor model: on each interrupt it advances the plant, writes the
// measurements, toggles Flag, then reads back the chosen state and the dq
// currents. Each decision is compared with an exhaustive search in the
// reference arithmetic, and each applied state with the decision of the
// interval before.

  import mpc_pkg::*;
  import tb_ref_pkg::*;

  localparam real R_LOAD = 30.0;
  localparam real L_LOAD = 20.0e-3;
  localparam real VDC    = 140.0;
  localparam real TCLK   = 10.0e-9;

  // plant state, A
  real    ia_p = 0.0, ib_p = 0.0, ic_p = 0.0;
  // controller parameters as written, for the reference
  longint ka = 15770, kw = 129, kb = 2048, lam = 0, rd = 0, rq = 0;
  longint unsigned inc = 64'd5368709, acc = 0;
  int     period = 2500;
  longint vdc_code = 1400;
  int     exp_next = 0;     // state the next tick must apply
  bit     running = 0;
  bit     flag_v = 0;

  // mechanism and statistics counters
  int     n_samples = 0, n_irq = 0, n_start = 0, n_stop = 0, n_off_ticks = 0;
  int     n_lambda_changed = 0, n_zero_vec = 0, n_ref_step = 0, n_freq = 0, n_backpressure = 0;
  int     n_busy = 0;
  int     leg_switches = 0;
  longint cyc = 0, last_tick_cyc = 0;
  real    err_sq = 0.0;
  int     err_n = 0;

  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n && irq) n_irq++;

  // calculation time seen on the probe pin
  int busy_len = 0;
  always @(posedge clk) begin
    if (rst_n && calc_busy) busy_len <= busy_len + 1;
    else if (busy_len != 0) begin
      n_busy++;
      check(busy_len == EXP_LAT, $sformatf("calc_busy width %0d, want %0d", busy_len, EXP_LAT));
      busy_len <= 0;
    end
  end

  function automatic longint adc_mA(input real i);
    // 12-bit, +-5 A: 4096 codes, then back to mA
    int code;
    code = int'($floor(i / 10.0 * 4096.0 + 0.5));
    if (code > 2047) code = 2047;
    if (code < -2048) code = -2048;
    return longint'($floor(real'(code) * 10000.0 / 4096.0 + 0.5));
  endfunction

  task automatic plant_advance(input sw_t s, input logic [5:0] g, input longint cycles);
    real dt, va, vb, vc, sa, sb, sc;
    dt = real'(cycles) * TCLK / 50.0;
    sa = s[0]; sb = s[1]; sc = s[2];
    if (g == 6'b0) begin
      va = 0.0; vb = 0.0; vc = 0.0;
    end else begin
      va = VDC * (2.0 * sa - sb - sc) / 3.0;
      vb = VDC * (2.0 * sb - sa - sc) / 3.0;
      vc = VDC * (2.0 * sc - sa - sb) / 3.0;
    end
    for (int k = 0; k < 50; k++) begin
      ia_p += dt / L_LOAD * (va - R_LOAD * ia_p);
      ib_p += dt / L_LOAD * (vb - R_LOAD * ib_p);
      ic_p += dt / L_LOAD * (vc - R_LOAD * ic_p);
    end
  endtask

  task automatic set_params(input int per, input real lam_v);
    real ts;
    ts = real'(per) * TCLK;
    period = per;
    ka = longint'($floor((1.0 - R_LOAD * ts / L_LOAD) * 16384.0 + 0.5));
    kw = longint'($floor(2.0 * PI * 50.0 * ts * 16384.0 + 0.5));
    kb = longint'($floor(ts / L_LOAD * 100.0 * 16384.0 + 0.5));   // 0.1 V / 1 mA scale
    inc = 64'($floor(4294967296.0 * 50.0 * ts + 0.5));
    lam = longint'(lam_v);
    bus.write(REG_COEF_A, {16'(kw), 16'(ka)});
    bus.write(REG_COEF_B, {16'(lam), 16'(kb)});
    bus.write(REG_PHASE_INC, 32'(inc));
    bus.write(REG_PERIOD, 32'(per));
    n_freq++;
  endtask

  task automatic set_ref(input longint d, input longint q);
    rd = d; rq = q;
    bus.write(REG_REF, {16'(q), 16'(d)});
  endtask

  task automatic command(input cmd_e c);
    logic [31:0] r;
    bus.write(REG_CMD, 32'(c));
    bus.read(REG_STATE, r);
    if (c == CMD_START) begin n_start++; running = 1; end
    if (c == CMD_STOP)  begin n_stop++;  running = 0; end
    check(r[0] == running && r[1] == running, $sformatf("FSM state after command %0d: %b", c, r[1:0]));
  endtask

  // one sampling interval; returns the design's dq current of this sample
  task automatic sample(input bit stats, output longint d_out, output longint q_out);
    sw_t        s_now;
    logic [5:0] g_prev;
    sw_t        s_prev;
    logic [31:0] r;
    longint     ia, ib, ic, al, be, d0, q0, vd, vq, d1, q1;
    longint     c [8], c0 [8];
    int         ang_k, ang_k1, best, best0;
    s_prev = s_k; g_prev = gates;
    do @(posedge clk); while (!irq);
    plant_advance(s_prev, g_prev, cyc - last_tick_cyc);
    last_tick_cyc = cyc;
    @(negedge clk); @(negedge clk);
    s_now = s_k;
    if (running) begin
      check(int'(s_now) == exp_next, $sformatf("applied state %0d, decided %0d", s_now, exp_next));
      check(gates == {~s_now[2], s_now[2], ~s_now[1], s_now[1], ~s_now[0], s_now[0]}, "gate pattern");
    end else begin
      n_off_ticks++;
      check(s_now == 3'd0 && gates == 6'd0, "stopped: gates off");
    end
    for (int l = 0; l < 3; l++) if (s_now[l] != s_prev[l] && stats) leg_switches++;
    // measure and hand over
    ia = adc_mA(ia_p); ib = adc_mA(ib_p); ic = adc_mA(ic_p);
    if (n_samples % 16 == 5) begin bus.resp_delay = 2; n_backpressure++; end
    bus.write(REG_MEAS_IAB, {16'(ib), 16'(ia)});
    bus.write(REG_MEAS_ICV, {16'(vdc_code), 16'(ic)});
    flag_v = ~flag_v;
    bus.write(REG_FLAG, {31'd0, flag_v});
    // reference decision
    ang_k  = int'(acc >> 20);
    ang_k1 = int'(((acc + inc) % (64'd1 << 32)) >> 20);
    acc    = (acc + inc) % (64'd1 << 32);
    clarke(ia, ib, ic, al, be);
    rot(al, be, sin_tab(ang_k), cos_tab(ang_k), d0, q0);
    sw_v(int'(s_now), sin_tab(ang_k), cos_tab(ang_k), vdc_code, vd, vq);
    step(d0, q0, vd, vq, ka, kw, kb, d1, q1);
    for (int s = 0; s < 8; s++) begin
      c[s]  = tb_ref_pkg::cost(s, int'(s_now), d1, q1, sin_tab(ang_k1), cos_tab(ang_k1), vdc_code, ka, kw, kb, rd, rq, lam);
      c0[s] = tb_ref_pkg::cost(s, int'(s_now), d1, q1, sin_tab(ang_k1), cos_tab(ang_k1), vdc_code, ka, kw, kb, rd, rq, 0);
    end
    best = argmin8(c); best0 = argmin8(c0);
    if (best != best0) n_lambda_changed++;
    if (best == 0 || best == 7) n_zero_vec++;
    // wait out the calculation, then read back
    repeat (EXP_LAT + 2) @(negedge clk);
    bus.read(REG_VARS_ST, r);
    check(int'(r[18:16]) == best, $sformatf("sample %0d: chosen %0d, reference %0d", n_samples, r[18:16], best));
    check(int'(r[11:0]) == int'(acc >> 20), "angle register");
    bus.read(REG_VARS_IDQ, r);
    check(longint'($signed(r[15:0])) == d0 && longint'($signed(r[31:16])) == q0, "dq currents read back");
    bus.read(REG_VARS_COST, r);
    check(r == 32'(c[best]), "cost of the optimum read back");
    bus.resp_delay = 0;
    d_out = d0; q_out = q0;
    exp_next = best;   // decisions continue while stopped and are applied at restart
    n_samples++;
    if (stats) begin
      err_sq += real'((d0 - rd) * (d0 - rd) + (q0 - rq) * (q0 - rq));
      err_n++;
    end
  endtask

  localparam real LAMS[2]    = '{4000.0, 12000.0};
  localparam real LAM_RMS[2] = '{150.0, 300.0};

  // run n samples; the last `window` enter the tracking statistics
  task automatic run(input int n, input int window, input string tag, input real max_rms, output real fsw);
    longint d, q;
    real    rms, t;
    err_sq = 0.0; err_n = 0; leg_switches = 0;
    for (int k = 0; k < n; k++) sample(k >= n - window, d, q);
    rms = $sqrt(err_sq / real'(err_n));
    t = real'(window) * real'(period) * TCLK;
    fsw = real'(leg_switches) / 3.0 / t;
    $display("%s: Fs = %0.1f kHz, ref (%0d,%0d) mA, rms dq error %0.1f mA, average switching %0.2f kHz",
             tag, 1.0e-3 / (real'(period) * TCLK), rd, rq, rms, fsw * 1.0e-3);
    check(rms < max_rms, $sformatf("%s: tracking rms error %0.1f mA below %0.1f", tag, rms, max_rms));
  endtask

  // weights 4000 and 12000 mA^2 at one sampling period, each settled for
  // 10 ms and then measured over one 20 ms grid cycle; f_prev is the
  // switching rate measured with no weight
  task automatic lam_sweep(input int per, input string tag, input real f_prev);
    real f;
    int  n;
    n = 2000000 / per;                  // samples in one 20 ms grid cycle
    foreach (LAMS[i]) begin
      set_params(per, LAMS[i]);
      run(n + n / 2, n, $sformatf("%s, 2 A, lambda %0d", tag, int'(LAMS[i])), LAM_RMS[i], f);
      check(f < f_prev, $sformatf("%s: lambda %0d lowers the switching rate: %0.0f -> %0.0f Hz",
                                  tag, int'(LAMS[i]), f_prev, f));
      f_prev = f;
    end
  endtask

  task automatic run_all();
    logic [31:0] r;
    real f0, fx;
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    bus.read(REG_PERIOD, r);
    check(r == 32'd2500, "default period 2500 clocks (40 kHz)");
    set_params(2500, 0.0);
    set_ref(1000, 0);
    command(CMD_START);
    // 40 kHz, 1 A then 2 A, 40 ms each
    run(1600, 400, "40 kHz, 1 A", 60.0, fx);
    set_ref(2000, 0); n_ref_step++;
    run(1600, 800, "40 kHz, 2 A", 60.0, f0);
    // switching-limiting term: two weights per sampling rate, as in the
    // published 40, 80 and 140 kHz experiments; the rate must fall as the
    // weight rises
    lam_sweep(2500, "40 kHz", f0);
    // higher sampling frequencies
    set_params(1250, 0.0);
    run(1600, 1600, "80 kHz, 2 A", 60.0, f0);
    lam_sweep(1250, "80 kHz", f0);
    set_params(714, 0.0);
    run(2800, 2800, "140 kHz, 2 A", 60.0, f0);
    lam_sweep(714, "140 kHz", f0);
    // stop and restart, with no weight
    set_params(714, 0.0);
    command(CMD_STOP);
    run(40, 40, "stopped", 3000.0, fx);
    command(CMD_START);
    run(400, 200, "restarted 140 kHz", 60.0, fx);
    // every mechanism must have happened
    check(n_samples > 0 && n_irq >= n_samples, $sformatf("samples %0d, interrupts %0d", n_samples, n_irq));
    check(n_busy >= n_samples - 1, $sformatf("calculation probe pulses %0d", n_busy));
    check(n_start == 2 && n_stop == 1, "start and stop commands");
    check(n_off_ticks > 0, "ticks with the gates disabled");
    check(n_lambda_changed > 0, $sformatf("decisions changed by the switching term: %0d", n_lambda_changed));
    check(n_zero_vec > 0, $sformatf("zero vector chosen: %0d", n_zero_vec));
    check(n_ref_step == 1 && n_freq == 10, "reference step and sampling-frequency changes");
    check(n_backpressure > 0, "bus back-pressure");
    $display("mechanisms: samples %0d irq %0d probe %0d start %0d stop %0d off-ticks %0d lambda-changed %0d zero-vector %0d freq-changes %0d backpressure %0d",
             n_samples, n_irq, n_busy, n_start, n_stop, n_off_ticks, n_lambda_changed, n_zero_vec, n_freq, n_backpressure);
  endtask
