// tb_pred_k2_parallel: random operating points through the parallel search,
// checking the chosen state and its cost against an exhaustive reference
// search, and the one-clock latency. Cases with a large lambda check that
// the switching term keeps the present state when tracking allows it.
module tb_pred_k2_parallel;
  import mpc_pkg::*;
  import tb_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        i_valid = 0, o_valid;
  dq_t         idq_k1 = '0;
  sincos_t     sc_k1 = '0;
  sw_t         s_k = '0;
  q_t          vdc = '0;
  coef_t       coef = '0;
  dq_t         ref_dq = '0;
  logic [15:0] lambda = '0;
  sw_t         optim_state;
  cost_t       min_cost;

  pred_k2_parallel dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    check(0, "watchdog");
    report(); $finish;
  end

  task automatic run(input longint d1, q1, input int ang, sk, input longint v, ka, kw, kb, rd, rq, lam);
    longint c [8];
    int e;
    @(negedge clk);
    idq_k1 = '{q: q_t'(q1), d: q_t'(d1)};
    sc_k1  = '{cos_v: q_t'(cos_tab(ang)), sin_v: q_t'(sin_tab(ang))};
    s_k    = sw_t'(sk);
    vdc    = q_t'(v);
    coef   = '{kb: q_t'(kb), kw: q_t'(kw), ka: q_t'(ka)};
    ref_dq = '{q: q_t'(rq), d: q_t'(rd)};
    lambda = 16'(lam);
    i_valid = 1;
    @(negedge clk);
    i_valid = 0;
    for (int s = 0; s < 8; s++) c[s] = tb_ref_pkg::cost(s, sk, d1, q1, sin_tab(ang), cos_tab(ang), v, ka, kw, kb, rd, rq, lam);
    e = argmin8(c);
    check(o_valid === 1'b1, "o_valid one clock after i_valid");
    check(int'(optim_state) == e && longint'(min_cost) == c[e],
          $sformatf("optimum %0d (cost %0d) want %0d (cost %0d)", optim_state, min_cost, e, c[e]));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 300; k++)
      run(rnd_range(-2500, 2500), rnd_range(-2500, 2500), int'($urandom % 4096), int'($urandom % 8),
          rnd_range(500, 2000), 15770, 129, 2048, rnd_range(-2500, 2500), rnd_range(-2500, 2500),
          (k % 3 == 0) ? longint'($urandom % 20000) : 0);
    // at the reference already and a huge switching weight: keep S(k)
    for (int sk = 0; sk < 8; sk++) begin
      run(1000, 0, 100, sk, 1400, 15770, 129, 2048, 1000, 0, 65535);
      check(int'(optim_state) == sk || (sk == 7 && optim_state == 3'd0) || (sk == 0 && optim_state == 3'd7),
            $sformatf("lambda large keeps state %0d: got %0d", sk, optim_state));
    end
    report(); $finish;
  end
endmodule
