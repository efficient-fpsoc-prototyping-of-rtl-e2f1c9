// k2_pred_unit: the k+2 prediction block for one candidate switching state.
// It forms the candidate's dq voltage at the angle of interval k+1, predicts
// the current of instant k+2 from the k+1 prediction with the same discrete
// model as pred_k1, and evaluates cost function (4):
//   g = (id* - id(k+2))^2 + (iq* - iq(k+2))^2 + lambda * |S_cand - S(k)|^2
// For 0/1 switching states the squared distance |S_cand - S(k)|^2 is the
// number of legs that change, so the second term is lambda times that count.
// Purely combinational; the parallel search instantiates eight of these, the
// sequential one a single unit and registers around it.
// Following the document: the cost function with the tracking and the
// switching-limiting terms. This design's own choice: integer lambda in
// current-LSB^2 units and a 40-bit unsigned cost.
module k2_pred_unit
  import mpc_pkg::*;
(
  input  dq_t         idq_k1,
  input  sincos_t     sc_k1,
  input  sw_t         s_cand,
  input  sw_t         s_k,
  input  q_t          vdc,
  input  coef_t       coef,
  input  dq_t         ref_dq,
  input  logic [15:0] lambda,
  output cost_t       cost
);

  dq_t vdq_k1;
  dq_t idq_k2;
  logic signed [16:0] ed, eq;
  logic [1:0] nsw;

  assign vdq_k1 = sw_vdq(s_cand, sc_k1, vdc);
  assign idq_k2 = model_step(idq_k1, vdq_k1, coef);

  always_comb begin
    ed  = 17'(ref_dq.d) - 17'(idq_k2.d);
    eq  = 17'(ref_dq.q) - 17'(idq_k2.q);
    nsw = 2'(int'($countones(s_cand ^ s_k)));
    cost = cost_t'(34'(ed * ed)) + cost_t'(34'(eq * eq)) + cost_t'(lambda) * cost_t'(nsw);
  end

endmodule
