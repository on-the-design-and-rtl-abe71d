// amv_clock: behavioural model of the astable multivibrator clock source.
//
// This is a behavioural model, not synthesizable logic: the real part is a
// free-running transistor oscillator whose period is set by its resistors
// and capacitors. While on is high it produces a square wave of period
// 2 * HALF_PERIOD; the first rising edge comes HALF_PERIOD after on
// rises, and the wave always completes its high half before it stops. While
// on is low the output rests low, so the shift register sees no trigger
// pulses. That on/off control mirrors switching the pulses on and off during
// bring-up. The oscillator frequency is this design's own choice (500,000 time
// units per half period, 1 kHz if the unit is 1 ns, in keeping with a slow
// audio-frequency transistor circuit); the document does not give one.
// The on/off behaviour follows the document's bring-up. A synthesis tool that ignores the delays reads
// the model as a latch; it is meant for simulation only.
module amv_clock #(
  parameter int unsigned HALF_PERIOD = 500_000   // half period, in time units
) (
  input  logic on,     // 1: oscillator running
  output logic pulse   // trigger pulses to all stages
);

  initial pulse = 1'b0;

  always begin
    if (on) begin
      #(HALF_PERIOD) pulse = 1'b1;
      #(HALF_PERIOD) pulse = 1'b0;
    end else begin
      @(posedge on);
    end
  end

endmodule
