// sync_signals: first stage of the dq transformation. It watches the Flag bit
// the processor toggles after writing a new set of measurements, and on each
// toggle (either edge) captures the phase currents, the dc-link voltage and
// the sine and cosine that the table presents for the angle of the interval
// now starting. Those sin/cos were looked up one sample earlier as the "k+1"
// values, so capturing them here is the one-step delay that turns
// sin,cos(k+1) into sin,cos(k).
//
// Timing: the flag is sampled every clock; one cycle after a toggle is seen,
// o_valid pulses for one cycle and the captured values are held until the
// next toggle. The captured registers reset to zero.
// Following the document: Flag toggle as the trigger, capture of iabc(k) and
// of the delayed sin/cos. This design's own choice: the dc-link voltage is
// captured in the same stage.
module sync_signals
  import mpc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    flag,      // toggled by the processor once per sample
  input  meas_t   meas,      // measurements from the register block
  input  sincos_t sc_k1,     // table output for the k+1 angle
  output logic    o_valid,   // one-cycle pulse: new sample captured
  output abc_t    iabc_k0,
  output q_t      vdc_k0,
  output sincos_t sc_k0
);

  logic flag_q;
  logic toggle;

  assign toggle = flag ^ flag_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      flag_q  <= 1'b0;
      o_valid <= 1'b0;
      iabc_k0 <= '0;
      vdc_k0  <= '0;
      sc_k0   <= '0;
    end else begin
      flag_q  <= flag;
      o_valid <= toggle;
      if (toggle) begin
        iabc_k0 <= '{c: meas.ic, b: meas.ib, a: meas.ia};
        vdc_k0  <= meas.vdc;
        sc_k0   <= sc_k1;
      end
    end
  end

endmodule
