// firing_pulses: holds the optimal switching state chosen for the next
// interval and applies it to the inverter at the start of that interval.
// When opt_valid pulses the state is stored; at the next sampling tick the
// stored state becomes S(k), the state fed back to the control algorithm,
// and drives the six gate signals (upper switch = S, lower switch = not S
// per leg). With enable low the gates are all off and S(k) is 000, the
// zero vector the predictions then assume.
// Timing: S(k) and the gates change one clock after the tick.
// Following the document: store on selection, apply at the beginning of the
// next interval, S(k) fed back, gating by the FSM's Enable. This design's own
// choice: complementary gates without dead time (dead time, if any, is
// added outside) and all-off when disabled.
module firing_pulses
  import mpc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       opt_valid,
  input  sw_t        opt_state,
  input  logic       tick,        // start of a sampling interval
  input  logic       enable,      // from the operating FSM
  output sw_t        s_k,         // state applied in the present interval
  output logic [5:0] gates        // {c_lo, c_hi, b_lo, b_hi, a_lo, a_hi}
);

  sw_t stored;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      stored <= '0;
      s_k    <= '0;
      gates  <= '0;
    end else begin
      if (opt_valid) stored <= opt_state;
      if (tick) begin
        if (enable) begin
          s_k   <= stored;
          gates <= {~stored[2], stored[2], ~stored[1], stored[1], ~stored[0], stored[0]};
        end else begin
          s_k   <= '0;
          gates <= '0;
        end
      end
      if (!enable) gates <= '0;
    end
  end

endmodule
