// pred_k2_parallel: parallel exhaustive search for the optimal switching
// state. Eight k2_pred_unit blocks, one per candidate state 0..7, compute
// their k+2 prediction and cost at the same time; a combinational
// comparator picks the minimum. Nothing is registered between the units and
// the comparator; the chosen state is registered once, so optim_state and
// o_valid follow i_valid by exactly one clock (10 ns at 100 MHz).
// Following the document: eight identical prediction blocks, a
// combinational comparator, no intermediate flip-flops. This design's own
// choice: the single output register and the min_cost output.
module pred_k2_parallel
  import mpc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        i_valid,
  input  dq_t         idq_k1,
  input  sincos_t     sc_k1,
  input  sw_t         s_k,
  input  q_t          vdc,
  input  coef_t       coef,
  input  dq_t         ref_dq,
  input  logic [15:0] lambda,
  output logic        o_valid,
  output sw_t         optim_state,
  output cost_t       min_cost
);

  cost_t costs [NSW];
  sw_t   best_idx;
  cost_t best_cost;

  for (genvar s = 0; s < NSW; s++) begin : g_cand
    k2_pred_unit u_pred (
      .idq_k1 (idq_k1),
      .sc_k1  (sc_k1),
      .s_cand (sw_t'(s)),
      .s_k    (s_k),
      .vdc    (vdc),
      .coef   (coef),
      .ref_dq (ref_dq),
      .lambda (lambda),
      .cost   (costs[s])
    );
  end

  cost_argmin #(.N(NSW)) u_cmp (
    .costs    (costs),
    .idx      (best_idx),
    .min_cost (best_cost)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      o_valid     <= 1'b0;
      optim_state <= '0;
      min_cost    <= '0;
    end else begin
      o_valid <= i_valid;
      if (i_valid) begin
        optim_state <= best_idx;
        min_cost    <= best_cost;
      end
    end
  end

endmodule
