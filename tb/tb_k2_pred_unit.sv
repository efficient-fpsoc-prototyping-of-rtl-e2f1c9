// tb_k2_pred_unit: the combinational k+2 prediction and cost for random
// operating points, all eight candidates, with and without the switching
// term, compared with the reference cost; plus a hand-worked case.
module tb_k2_pred_unit;
  import mpc_pkg::*;
  import tb_ref_pkg::*;

  dq_t         idq_k1 = '0;
  sincos_t     sc_k1 = '0;
  sw_t         s_cand = '0;
  sw_t         s_k = '0;
  q_t          vdc = '0;
  coef_t       coef = '0;
  dq_t         ref_dq = '0;
  logic [15:0] lambda = '0;
  cost_t       cost;

  k2_pred_unit dut (.*);

  initial begin
    #1000000;
    check(0, "watchdog");
    report(); $finish;
  end

  initial begin
    for (int k = 0; k < 300; k++) begin
      longint d1, q1, v, ka, kw, kb, rd, rq, lam;
      int ang, sk;
      d1 = rnd_range(-4000, 4000); q1 = rnd_range(-4000, 4000);
      ang = int'($urandom % 4096); sk = int'($urandom % 8);
      v = rnd_range(0, 2000); ka = rnd_range(12000, 16384); kw = rnd_range(-400, 400); kb = rnd_range(0, 4096);
      rd = rnd_range(-4000, 4000); rq = rnd_range(-4000, 4000);
      lam = (k % 2 == 0) ? 0 : longint'($urandom % 65536);
      idq_k1 = '{q: q_t'(q1), d: q_t'(d1)};
      sc_k1  = '{cos_v: q_t'(cos_tab(ang)), sin_v: q_t'(sin_tab(ang))};
      s_k    = sw_t'(sk);
      vdc    = q_t'(v);
      coef   = '{kb: q_t'(kb), kw: q_t'(kw), ka: q_t'(ka)};
      ref_dq = '{q: q_t'(rq), d: q_t'(rd)};
      lambda = 16'(lam);
      for (int s = 0; s < 8; s++) begin
        longint e;
        s_cand = sw_t'(s);
        #1;
        e = tb_ref_pkg::cost(s, sk, d1, q1, sin_tab(ang), cos_tab(ang), v, ka, kw, kb, rd, rq, lam);
        check(longint'(cost) == e, $sformatf("case %0d cand %0d: cost %0d want %0d", k, s, cost, e));
      end
    end
    // hand case: unity model (ka=1, kw=0, kb=1), angle 0, vdc 3*16384/2 ... state 001
    // gives vd = vdc*2/3, vq = 0; from (0,0) the prediction is (vd, 0)
    idq_k1 = '0; sc_k1 = '{cos_v: 16'sd16384, sin_v: 16'sd0};
    vdc = 16'sd3000; coef = '{kb: 16'sd16384, kw: 16'sd0, ka: 16'sd16384};
    ref_dq = '{q: 16'sd0, d: 16'sd2000}; lambda = 16'd100; s_k = 3'b000; s_cand = 3'b001;
    #1;
    // vd = floor(3000*10922/16384) = 1999 -> error 1 -> cost 1 + 100*1
    check(cost == 40'd101, $sformatf("hand case: cost %0d want 101", cost));
    s_cand = 3'b111;
    #1;
    check(cost == 40'd4000000 + 40'd300, $sformatf("hand case zero vector: cost %0d", cost));
    report(); $finish;
  end
endmodule
