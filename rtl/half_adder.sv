// half_adder: the mod-2 adder (exclusive-OR) of the encoder.
//
// The sum is formed exactly as in the gate-level schematic of the built
// encoder: one OR gate gives X+Y, one AND gate gives XY, an inverter gives
// (XY)', and a second AND gate gives S = (X+Y)(XY)', which is X xor Y.
// Purely combinational, no clock. The transistor-diode circuit that realised
// these gates is not modelled; only its logic function is.
module half_adder (
  input  logic x,   // first addend
  input  logic y,   // second addend
  output logic s    // mod-2 sum
);

  logic x_or_y;     // X+Y
  logic x_and_y;    // XY
  logic nand_xy;    // (XY)'

  always_comb begin
    x_or_y  = x | y;
    x_and_y = x & y;
    nand_xy = ~x_and_y;
    s       = x_or_y & nand_xy;
  end

endmodule
