// pred_k2_sequential: sequential exhaustive search with a single k+2
// prediction block. An FSM walks the candidate states one by one, following
// the loop of the document's flowchart, one FSM state per box:
//   INIT   NextState = 0, best cost = maximum
//   CALC   the unit's cost for NextState is registered
//   CHECK  the registered cost is compared with the best so far and
//          replaces it if strictly lower
//   DECIDE more candidates left? yes: INC, no: result out
//   INC    NextState++ and back to CALC
// The candidate is held in a register, so the unit's inputs are stable for a
// whole CALC cycle and its output is registered before the compare.
// Latency from i_valid to o_valid: 1 + 8*3 + 7 = 32 clocks (320 ns at
// 100 MHz). While busy the block ignores i_valid. Ties keep the lower state.
// Following the document: one prediction block, FSM-driven loop over eight
// states, compare inside an FSM state instead of an eight-input comparator.
// This design's own choice: the exact state encoding and cycle count.
module pred_k2_sequential
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
  output logic        busy,
  output sw_t         optim_state,
  output cost_t       min_cost
);

  typedef enum logic [2:0] {
    ST_IDLE,
    ST_INIT,
    ST_CALC,
    ST_CHECK,
    ST_DECIDE,
    ST_INC
  } seq_state_e;

  seq_state_e st;
  sw_t        next_state;
  cost_t      unit_cost, cost_q, best_cost;
  sw_t        best_idx;

  k2_pred_unit u_pred (
    .idq_k1 (idq_k1),
    .sc_k1  (sc_k1),
    .s_cand (next_state),
    .s_k    (s_k),
    .vdc    (vdc),
    .coef   (coef),
    .ref_dq (ref_dq),
    .lambda (lambda),
    .cost   (unit_cost)
  );

  assign busy = (st != ST_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st          <= ST_IDLE;
      next_state  <= '0;
      cost_q      <= '0;
      best_cost   <= '0;
      best_idx    <= '0;
      o_valid     <= 1'b0;
      optim_state <= '0;
      min_cost    <= '0;
    end else begin
      o_valid <= 1'b0;
      unique case (st)
        ST_IDLE:   if (i_valid) st <= ST_INIT;
        ST_INIT: begin
          next_state <= '0;
          best_cost  <= '1;
          best_idx   <= '0;
          st         <= ST_CALC;
        end
        ST_CALC: begin
          cost_q <= unit_cost;
          st     <= ST_CHECK;
        end
        ST_CHECK: begin
          if (cost_q < best_cost) begin
            best_cost <= cost_q;
            best_idx  <= next_state;
          end
          st <= ST_DECIDE;
        end
        ST_DECIDE: begin
          if (next_state != sw_t'(NSW - 1)) begin
            st <= ST_INC;
          end else begin
            optim_state <= best_idx;
            min_cost    <= best_cost;
            o_valid     <= 1'b1;
            st          <= ST_IDLE;
          end
        end
        ST_INC: begin
          next_state <= next_state + 1'b1;
          st         <= ST_CALC;
        end
        default: st <= ST_IDLE;
      endcase
    end
  end

endmodule
