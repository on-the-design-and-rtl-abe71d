// fsr_divider: r-stage feedback shift register that divides by g(x).
//
// The chain has R = n - k stages, named B(R-1) (first, fed by the input) down
// to B0 (last). The last stage's output is the feedback line. Through the
// feedback switch (fb_en) it goes to a mod-2 adder in front of the first
// stage, where it is added to the serial input, and to an adder in front of
// every later stage whose generator coefficient is 1. Stages with a zero
// coefficient are wired straight from the stage before. For g(x) = x^4+x+1
// this gives
//     B3 <= data_in ^ fb,  B2 <= B3 ^ fb,  B1 <= B2,  B0 <= B1,  fb = B0.
// Reading B(R-1-i) as the coefficient of x^i, one pulse maps the register
// polynomial s(x) to x*s(x) + data_in mod g(x). After the bits of a
// polynomial have been clocked in, most significant first, the register
// holds its remainder modulo g(x). With data_in = 0 and the feedback closed
// the chain cycles through the nonzero states (period 15 for x^4+x+1); with
// the feedback open it is a plain shift register that empties through B0.
// The structure follows the document; the preset path is this design's own.
//
// Interface: b[j] is stage Bj, msb_out = B0. load stores preset[j] into Bj on
// the next pulse. Timing: all stages change together on the rising clk edge.
module fsr_divider #(
  parameter int unsigned R = fsr_pkg::CODE_R,            // number of stages
  parameter logic [R:0]  POLY = fsr_pkg::CODE_POLY       // g(x), bit i = x^i
) (
  input  logic         clk,      // common trigger pulse
  input  logic         load,     // 1: store preset on this pulse
  input  logic [R-1:0] preset,   // preset[j] goes to stage Bj
  input  logic         data_in,  // serial input (0 with the source switched off)
  input  logic         fb_en,    // feedback switch: 1 closed, 0 open
  output logic [R-1:0] b,        // stage outputs, b[j] = Bj
  output logic         msb_out   // last stage B0: feedback and parity output
);

  if (R < 1 || POLY[R] != 1'b1 || POLY[0] != 1'b1) begin : g_bad_poly
    $error("fsr_divider: POLY must have degree R and a constant term");
  end

  logic         fb;      // feedback line after the switch
  logic [R-1:0] d;       // input of each stage

  assign fb      = fb_en & b[0];
  assign msb_out = b[0];

  // Adder in front of the first stage: the constant term of g(x).
  half_adder u_add_in (.x(data_in), .y(fb), .s(d[R-1]));

  // Later stages: adder where the coefficient of x^(R-1-j) is 1.
  for (genvar j = 0; j < R - 1; j++) begin : g_tap
    if (POLY[R-1-j]) begin : g_add
      half_adder u_add (.x(b[j+1]), .y(fb), .s(d[j]));
    end else begin : g_wire
      assign d[j] = b[j+1];
    end
  end

  for (genvar j = 0; j < R; j++) begin : g_stage
    bmv u_bmv (.clk(clk), .load(load), .preset(preset[j]), .d(d[j]), .q(b[j]));
  end

endmodule
