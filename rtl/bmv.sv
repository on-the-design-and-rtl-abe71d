// bmv: one storage stage (bistable multivibrator) of the shift register.
//
// Every stage of the register chain is triggered by the same clock pulse, so
// each stage is a D flip-flop on the common clock. Where the built encoder's
// stages simply came up in some state at power-on and were read before the
// clock was started, this stage has a synchronous preset: with load high,
// the next pulse stores preset instead of d. That preset path (used to clear
// the chain before a code word and to set a start pattern) is this design's
// own addition; the stage has no reset of its own.
//
// Timing: q takes d (or preset) on the rising edge of clk.
module bmv (
  input  logic clk,     // common trigger pulse
  input  logic load,    // 1: store preset on this pulse
  input  logic preset,  // value stored when load is 1
  input  logic d,       // value from the previous stage or adder
  output logic q        // stored bit
);

  always_ff @(posedge clk) begin
    if (load) q <= preset;
    else      q <= d;
  end

endmodule
