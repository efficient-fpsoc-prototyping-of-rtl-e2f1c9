// tb_ref_pkg: independent reference arithmetic and check bookkeeping for the
// controller's testbenches. The reference recomputes every stage with
// 64-bit integers and explicit floor division, with its constants derived
// from real numbers, so it shares no code with the design. It models:
// amplitude-invariant Clarke, dq rotation, the switching-state voltage, the
// forward-Euler RL model step, cost function (4) and the sine table.
package tb_ref_pkg;

  int checks   = 0;
  int failures = 0;

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endfunction

  function automatic void report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endfunction

  localparam real PI = 3.14159265358979323846;
  localparam longint ONE = 16384;

  function automatic longint k_third();      return longint'($floor(16384.0 / 3.0 + 0.5)); endfunction
  function automatic longint k_isqrt3();     return longint'($floor(16384.0 / $sqrt(3.0) + 0.5)); endfunction

  // floor(x / 2^14) without relying on shifts
  function automatic longint fdiv(input longint x);
    longint q;
    q = x / ONE;
    if ((x % ONE) != 0 && x < 0) q = q - 1;
    return q;
  endfunction

  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  function automatic longint sat(input longint x);
    if (x > 32767)  return 32767;
    if (x < -32768) return -32768;
    return x;
  endfunction

  function automatic longint sin_tab(input int i);
    return longint'($floor(16384.0 * $sin(2.0 * PI * real'(i) / 4096.0) + 0.5));
  endfunction
  function automatic longint cos_tab(input int i);
    return sin_tab((i + 1024) % 4096);
  endfunction

  function automatic void clarke(input longint ia, ib, ic, output longint al, be);
    al = sat(fdiv((2 * ia - ib - ic) * k_third()));
    be = sat(fdiv((ib - ic) * k_isqrt3()));
  endfunction

  function automatic void rot(input longint al, be, sn, cs, output longint d, q);
    d = sat(fdiv(al * cs + be * sn));
    q = sat(fdiv(be * cs - al * sn));
  endfunction

  function automatic void sw_v(input int s, input longint sn, cs, vdc, output longint vd, vq);
    longint sa, sb, sc, al, be, ud, uq;
    sa = s & 1; sb = (s >> 1) & 1; sc = (s >> 2) & 1;
    al = (2 * sa - sb - sc) * k_third();
    be = (sb - sc) * k_isqrt3();
    rot(al, be, sn, cs, ud, uq);
    vd = sat(fdiv(vdc * ud));
    vq = sat(fdiv(vdc * uq));
  endfunction

  function automatic void step(input longint xd, xq, vd, vq, ka, kw, kb, output longint d, q);
    d = sat(fdiv(ka * xd + kw * xq + kb * vd));
    q = sat(fdiv(ka * xq - kw * xd + kb * vq));
  endfunction

  function automatic int hamming3(input int a, input int b);
    int x, n;
    x = (a ^ b) & 7; n = 0;
    for (int i = 0; i < 3; i++) n += (x >> i) & 1;
    return n;
  endfunction

  // cost of candidate s, from the k+1 prediction
  function automatic longint cost(input int s, input int sk, input longint d1, q1, sn1, cs1, vdc,
                                  ka, kw, kb, rd, rq, lam);
    longint vd, vq, d2, q2;
    sw_v(s, sn1, cs1, vdc, vd, vq);
    step(d1, q1, vd, vq, ka, kw, kb, d2, q2);
    return (rd - d2) * (rd - d2) + (rq - q2) * (rq - q2) + lam * hamming3(s, sk);
  endfunction

  // index of the smallest cost, lowest index on ties
  function automatic int argmin8(input longint c [8]);
    int b;
    b = 0;
    for (int i = 1; i < 8; i++) if (c[i] < c[b]) b = i;
    return b;
  endfunction

  function automatic longint rnd16();
    return longint'($signed(16'($urandom)));
  endfunction
  function automatic longint rnd_range(input int lo, input int hi);
    return longint'(lo + int'($urandom % (hi - lo + 1)));
  endfunction

endpackage
