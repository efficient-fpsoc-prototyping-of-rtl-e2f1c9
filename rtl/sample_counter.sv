// sample_counter: free-running counter that sets the sampling interval of
// the whole system. It counts clock cycles from 0 to period-1 and emits a
// one-cycle tick when it wraps; the tick interrupts the processor (which
// then reads the ADC) and tells the firing pulses to apply the next state.
// period is compared with the count on every clock: a longer period
// stretches the running interval, a shorter one ends it at once if the count
// has already passed it. Values below 2 are treated as 2.
// 40 kHz at a 100 MHz clock is period = 2500.
// Following the document: a hardware counter that times the system and
// interrupts the CPU every sampling interval. This design's own choice:
// the programmable period, 32-bit width and a one-cycle interrupt pulse.
module sample_counter #(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CNT_W-1:0] period,
  output logic             tick
);

  logic [CNT_W-1:0] cnt;
  logic [CNT_W-1:0] last;

  assign last = (period < CNT_W'(2)) ? CNT_W'(1) : period - 1'b1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else begin
      tick <= 1'b0;
      if (cnt >= last) begin
        cnt  <= '0;
        tick <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
