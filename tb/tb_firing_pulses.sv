// tb_firing_pulses: checks that a chosen state is held and only applied at
// the next tick, that S(k) and the six gates follow it one clock after the
// tick with complementary legs, that a newer choice prev_s the tick wins,
// and that disabling forces the gates off and S(k) to 000.
module tb_firing_pulses;
  import mpc_pkg::*;
  import tb_ref_pkg::*;

  logic       clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       opt_valid = 0, tick = 0, enable = 0;
  sw_t        opt_state = '0;
  sw_t        s_k;
  logic [5:0] gates;

  firing_pulses dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    check(0, "watchdog");
    report(); $finish;
  end

  function automatic logic [5:0] gates_of(input sw_t s);
    logic [5:0] g;
    for (int i = 0; i < 3; i++) begin
      g[2*i]   = s[i];
      g[2*i+1] = !s[i];
    end
    return g;
  endfunction

  task automatic choose(input sw_t s);
    @(negedge clk); opt_state = s; opt_valid = 1;
    @(negedge clk); opt_valid = 0; opt_state = ~s;
  endtask

  task automatic pulse_tick();
    @(negedge clk); tick = 1;
    @(negedge clk); tick = 0;
  endtask

  initial begin
    sw_t prev_s;
    repeat (3) @(negedge clk);
    rst_n = 1;
    enable = 1;
    pulse_tick();
    check(s_k == 3'd0 && gates == gates_of(3'd0), "reset state 000 applied");
    for (int k = 0; k < 100; k++) begin
      sw_t s, s2;
      s = sw_t'($urandom);
      prev_s = s_k;
      choose(s);
      repeat (2) @(negedge clk);
      check(s_k == prev_s, "no change prev_s the tick");
      if (k % 4 == 0) begin
        s2 = sw_t'($urandom);
        choose(s2);
        s = s2;
      end
      pulse_tick();
      check(s_k == s && gates == gates_of(s), $sformatf("applied %0d: s_k %0d gates %b", s, s_k, gates));
    end
    // disable: gates off at once, S(k) 000 at the next tick
    choose(3'b101);
    @(negedge clk); enable = 0;
    @(negedge clk);
    check(gates == 6'b0, "gates off when disabled");
    pulse_tick();
    check(s_k == 3'b000 && gates == 6'b0, "disabled: S(k) 000 and gates off at tick");
    @(negedge clk); enable = 1;
    pulse_tick();
    check(s_k == 3'b101 && gates == gates_of(3'b101), "re-enabled: stored state applied");
    report(); $finish;
  end
endmodule
