// op_fsm: operating state machine of the controller. It executes the
// commands the user sends through the processor: START moves IDLE to RUN and
// raises enable, which lets the firing pulses drive the gates; STOP returns
// to IDLE and drops enable. Other codes, and commands that do not apply to
// the present state, are ignored. A command is taken on the clock its
// one-cycle cmd_valid strobe is high; enable follows one clock later.
// Following the document: a simple FSM executing user commands, reporting
// State and driving Enable. This design's own choice: the two states and
// the command codes.
module op_fsm
  import mpc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      cmd_valid,
  input  cmd_e      cmd,
  output op_state_e state,
  output logic      enable
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= OP_IDLE;
    end else if (cmd_valid) begin
      unique case (state)
        OP_IDLE: if (cmd == CMD_START) state <= OP_RUN;
        OP_RUN:  if (cmd == CMD_STOP)  state <= OP_IDLE;
        default: state <= OP_IDLE;
      endcase
    end
  end

  assign enable = (state == OP_RUN);

endmodule
