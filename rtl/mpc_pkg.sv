// mpc_pkg: types, constants and fixed-point helpers shared by the FCS-MPC
// controller for a two-level three-phase voltage source inverter.
//
// Number format. Every signal of the control algorithm is a 16-bit signed
// integer in a fixed scale (currents in current LSBs, the dc-link voltage in
// voltage LSBs), as the design works on 16-bit fixed-point words throughout.
// Gains, sine and cosine are Q2.14: 16384 stands for 1.0, so a product is
// brought back to the signal scale by an arithmetic shift right of 14 bits
// (rounding toward minus infinity). The Q2.14 format and the saturation to
// 16 bits are choices of this design; the 16-bit word length is the
// document's.
//
// Switching state. A state is three bits {Sc, Sb, Sa}; bit 0 is phase a.
// A 1 closes the upper switch of that leg. The eight states, two of which
// (000 and 111) give the same zero voltage, are all evaluated.
package mpc_pkg;

  localparam int unsigned DW   = 16;   // data word length
  localparam int unsigned QF   = 14;   // fraction bits of gains, sin and cos
  localparam int unsigned AW   = 12;   // binary-radian angle width
  localparam int unsigned NSW  = 8;    // number of switching states
  localparam int unsigned COST_W = 40; // cost function width

  typedef logic signed [DW-1:0] q_t;
  typedef logic        [2:0]    sw_t;
  typedef logic        [AW-1:0] angle_t;
  typedef logic [COST_W-1:0]    cost_t;

  // Measured phase currents and dc-link voltage, as written by the processor.
  typedef struct packed {
    q_t vdc;
    q_t ic;
    q_t ib;
    q_t ia;
  } meas_t;

  typedef struct packed {
    q_t c;
    q_t b;
    q_t a;
  } abc_t;

  typedef struct packed {
    q_t beta;
    q_t alpha;
  } ab_t;

  typedef struct packed {
    q_t q;
    q_t d;
  } dq_t;

  typedef struct packed {
    q_t cos_v;
    q_t sin_v;
  } sincos_t;

  // Discrete RL-load model, Q2.14:
  //   d(k+1) = (ka*d + kw*q + kb*vd) >> 14
  //   q(k+1) = (ka*q - kw*d + kb*vq) >> 14
  // with ka = 1 - R*Ts/L, kw = w*Ts and kb = Ts/L in the chosen LSB scales.
  typedef struct packed {
    q_t kb;
    q_t kw;
    q_t ka;
  } coef_t;

  // Q2.14 constants of the amplitude-invariant Clarke transformation.
  localparam q_t C_ONE_THIRD   = 16'sd5461;  // 1/3
  localparam q_t C_INV_SQRT3   = 16'sd9459;  // 1/sqrt(3)

  // Saturate a wide signed value to the 16-bit data word.
  function automatic q_t sat16(input logic signed [47:0] x);
    if (x > 48'sd32767)       return 16'sh7fff;
    else if (x < -48'sd32768) return 16'sh8000;
    else                      return x[DW-1:0];
  endfunction

  // Rotation into the dq frame: d = a*cos + b*sin, q = b*cos - a*sin.
  function automatic dq_t rotate(input ab_t x, input sincos_t sc);
    logic signed [47:0] d, q;
    d = (48'(x.alpha) * 48'(sc.cos_v) + 48'(x.beta) * 48'(sc.sin_v)) >>> QF;
    q = (48'(x.beta) * 48'(sc.cos_v) - 48'(x.alpha) * 48'(sc.sin_v)) >>> QF;
    return '{q: sat16(q), d: sat16(d)};
  endfunction

  // alpha-beta components (Q2.14) of the voltage a switching state applies,
  // per unit of dc-link voltage: alpha = (2Sa - Sb - Sc)/3, beta = (Sb - Sc)/sqrt(3).
  function automatic ab_t sw_ab(input sw_t s);
    int a, b;
    a = (2 * int'(s[0]) - int'(s[1]) - int'(s[2])) * int'(C_ONE_THIRD);
    b = (int'(s[1]) - int'(s[2])) * int'(C_INV_SQRT3);
    // |a| <= 10922 and |b| <= 9459: both fit the 16-bit word exactly
    return '{beta: q_t'(b), alpha: q_t'(a)};
  endfunction

  // One step of the discrete model from current x under dq voltage v.
  function automatic dq_t model_step(input dq_t x, input dq_t v, input coef_t k);
    logic signed [47:0] d, q;
    d = (48'(k.ka) * 48'(x.d) + 48'(k.kw) * 48'(x.q) + 48'(k.kb) * 48'(v.d)) >>> QF;
    q = (48'(k.ka) * 48'(x.q) - 48'(k.kw) * 48'(x.d) + 48'(k.kb) * 48'(v.q)) >>> QF;
    return '{q: sat16(q), d: sat16(d)};
  endfunction

  // dq voltage of switching state s at the angle given by sc, for dc-link vdc.
  function automatic dq_t sw_vdq(input sw_t s, input sincos_t sc, input q_t vdc);
    dq_t u;
    logic signed [47:0] d, q;
    u = rotate(sw_ab(s), sc);
    d = (48'(vdc) * 48'(u.d)) >>> QF;
    q = (48'(vdc) * 48'(u.q)) >>> QF;
    return '{q: sat16(q), d: sat16(d)};
  endfunction

  // AXI4-Lite register map of the shared-memory peripheral (word index).
  localparam int unsigned REG_MEAS_IAB  = 0;  // [15:0] ia, [31:16] ib
  localparam int unsigned REG_MEAS_ICV  = 1;  // [15:0] ic, [31:16] vdc
  localparam int unsigned REG_FLAG      = 2;  // [0] toggled once per new sample
  localparam int unsigned REG_CMD       = 3;  // [1:0] command, acted on when written
  localparam int unsigned REG_REF       = 4;  // [15:0] id*, [31:16] iq*
  localparam int unsigned REG_COEF_A    = 5;  // [15:0] ka, [31:16] kw
  localparam int unsigned REG_COEF_B    = 6;  // [15:0] kb, [31:16] lambda
  localparam int unsigned REG_PHASE_INC = 7;  // phase step per sample, 2^32 = one turn
  localparam int unsigned REG_PERIOD    = 8;  // sampling period in clock cycles
  localparam int unsigned REG_VARS_IDQ  = 9;  // read-only: [15:0] id(k), [31:16] iq(k)
  localparam int unsigned REG_VARS_ST   = 10; // read-only: [11:0] theta(k+1), [18:16] optimum, [22:20] S(k)
  localparam int unsigned REG_STATE     = 11; // read-only: [0] running, [1] gates enabled
  localparam int unsigned REG_VARS_COST = 12; // read-only: low 32 bits of the optimum's cost
  localparam int unsigned NREGS         = 13;

  typedef enum logic [1:0] {
    CMD_NOP   = 2'd0,
    CMD_START = 2'd1,
    CMD_STOP  = 2'd2
  } cmd_e;

  typedef enum logic {
    OP_IDLE = 1'b0,
    OP_RUN  = 1'b1
  } op_state_e;

  // Parameters written by the processor.
  typedef struct packed {
    logic [31:0] period;
    logic [31:0] phase_inc;
    logic [15:0] lambda;
    coef_t       coef;
    dq_t         ref_dq;
  } param_t;

endpackage
