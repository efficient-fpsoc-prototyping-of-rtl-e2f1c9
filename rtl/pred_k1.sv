// pred_k1: prediction of the load current one sample ahead, which makes up
// for the one-sample delay of a digital controller. From the dq current of
// interval k, the state S(k) being applied and the dc-link voltage it forms
// v_dq(k) = vdc * Park(Clarke(S(k))) at the angle of interval k and takes
// one step of the discrete RL model
//   id(k+1) = (ka*id + kw*iq + kb*vd) >> 14
//   iq(k+1) = (ka*iq - kw*id + kb*vq) >> 14
// (forward-Euler discretisation: ka = 1 - R*Ts/L, kw = w*Ts, kb = Ts/L).
// All arithmetic is combinational, closed by one output register: o_valid
// follows i_valid by one clock.
// Following the document: the model of equation (1)-(3), prediction from
// measured state and known applied voltage, one register. This design's
// own choice: the Euler discretisation and the Q2.14 coefficient scale.
module pred_k1
  import mpc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    i_valid,
  input  dq_t     idq_k0,
  input  sincos_t sc_k0,
  input  sw_t     s_k,
  input  q_t      vdc,
  input  coef_t   coef,
  output logic    o_valid,
  output dq_t     idq_k1
);

  dq_t vdq_k0;
  assign vdq_k0 = sw_vdq(s_k, sc_k0, vdc);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      o_valid <= 1'b0;
      idq_k1  <= '0;
    end else begin
      o_valid <= i_valid;
      if (i_valid) idq_k1 <= model_step(idq_k0, vdq_k0, coef);
    end
  end

endmodule
