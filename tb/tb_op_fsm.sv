// tb_op_fsm: drives command sequences (start, stop, repeated and unknown
// codes, a code present without its strobe) and checks state and enable
// against a small model after every command.
module tb_op_fsm;
  import mpc_pkg::*;
  import tb_ref_pkg::*;

  logic      clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      cmd_valid = 0;
  cmd_e      cmd = CMD_NOP;
  op_state_e state;
  logic      enable;

  op_fsm dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    check(0, "watchdog");
    report(); $finish;
  end

  initial begin
    bit running;
    running = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(state == OP_IDLE && !enable, "idle after reset");
    // code without strobe does nothing
    cmd = CMD_START;
    repeat (3) @(negedge clk);
    check(state == OP_IDLE && !enable, "no strobe, no action");
    for (int k = 0; k < 300; k++) begin
      int c;
      c = int'($urandom % 4);
      cmd = cmd_e'(c);
      cmd_valid = 1;
      @(negedge clk);
      cmd_valid = 0;
      if (c == 1) running = 1;
      else if (c == 2) running = 0;
      check((state == OP_RUN) == running && enable == running,
            $sformatf("after cmd %0d: state %0d enable %0d want %0d", c, state, enable, running));
      repeat (int'($urandom % 3)) @(negedge clk);
    end
    report(); $finish;
  end
endmodule
