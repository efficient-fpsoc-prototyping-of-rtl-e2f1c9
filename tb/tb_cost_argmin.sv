// tb_cost_argmin: random cost vectors, vectors with many ties and a single
// minimum at every position, checking index and value of the minimum and
// that the lowest index wins a tie.
module tb_cost_argmin;
  import mpc_pkg::*;
  import tb_ref_pkg::*;

  cost_t      costs [8];
  logic [2:0] idx;
  cost_t      min_cost;

  cost_argmin #(.N(8)) dut (.*);

  initial begin
    #1000000;
    check(0, "watchdog");
    report(); $finish;
  end

  task automatic run(input string tag);
    longint c [8];
    int e;
    #1;
    for (int i = 0; i < 8; i++) c[i] = longint'(costs[i]);
    e = argmin8(c);
    check(int'(idx) == e && min_cost == costs[e], $sformatf("%s: idx %0d want %0d", tag, idx, e));
  endtask

  initial begin
    for (int k = 0; k < 500; k++) begin
      for (int i = 0; i < 8; i++) costs[i] = {8'($urandom), 32'($urandom)};
      run("random");
    end
    for (int k = 0; k < 300; k++) begin
      for (int i = 0; i < 8; i++) costs[i] = cost_t'($urandom % 4);
      run("ties");
    end
    for (int p = 0; p < 8; p++) begin
      for (int i = 0; i < 8; i++) costs[i] = 40'd1000;
      costs[p] = 40'd999;
      run("single minimum");
      check(int'(idx) == p, "single minimum found at its position");
    end
    for (int i = 0; i < 8; i++) costs[i] = 40'd77;
    run("all equal");
    check(idx == 3'd0, "all equal: index 0");
    report(); $finish;
  end
endmodule
