// tb_pred_k1: random operating points (currents, angles, states, dc-link
// voltage, model gains) through the k+1 prediction, compared with the
// reference model step; checks the one-clock latency. A second group uses
// the 20 mH / 30 ohm / 40 kHz gains and checks the physical behaviour: with
// the zero vector the current decays by ka = 1 - R*Ts/L per step.
module tb_pred_k1;
  import mpc_pkg::*;
  import tb_ref_pkg::*;

  logic    clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    i_valid = 0, o_valid;
  dq_t     idq_k0 = '0;
  sincos_t sc_k0 = '0;
  sw_t     s_k = '0;
  q_t      vdc = '0;
  coef_t   coef = '0;
  dq_t     idq_k1;

  pred_k1 dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    check(0, "watchdog");
    report(); $finish;
  end

  task automatic apply(input longint d, q, input int ang, input int s, input longint v, ka, kw, kb);
    longint vd, vq, ed, eq;
    @(negedge clk);
    idq_k0 = '{q: q_t'(q), d: q_t'(d)};
    sc_k0  = '{cos_v: q_t'(cos_tab(ang)), sin_v: q_t'(sin_tab(ang))};
    s_k    = sw_t'(s);
    vdc    = q_t'(v);
    coef   = '{kb: q_t'(kb), kw: q_t'(kw), ka: q_t'(ka)};
    i_valid = 1;
    @(negedge clk);
    i_valid = 0;
    sw_v(s, sin_tab(ang), cos_tab(ang), v, vd, vq);
    step(d, q, vd, vq, ka, kw, kb, ed, eq);
    check(o_valid === 1'b1, "o_valid one clock after i_valid");
    check(longint'(idq_k1.d) == ed && longint'(idq_k1.q) == eq,
          $sformatf("pred (%0d,%0d) s=%0d ang=%0d: got (%0d,%0d) want (%0d,%0d)",
                    d, q, s, ang, idq_k1.d, idq_k1.q, ed, eq));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 400; k++)
      apply(rnd_range(-4000, 4000), rnd_range(-4000, 4000), int'($urandom % 4096), int'($urandom % 8),
            rnd_range(0, 2000), rnd_range(12000, 16384), rnd_range(-400, 400), rnd_range(0, 4096));
    // extremes, saturation
    apply(32767, -32768, 100, 1, 32767, 16384, 16384, 16384);
    // physical gains: zero vector decays by ka
    apply(2000, 0, 0, 0, 1400, 15770, 129, 2048);
    check(longint'(idq_k1.d) == (2000 * 15770) / 16384, "zero vector: d decays by ka");
    check(longint'(idq_k1.q) == fdiv(-129 * 2000), "zero vector: q couples by -w*Ts*d");
    report(); $finish;
  end
endmodule
