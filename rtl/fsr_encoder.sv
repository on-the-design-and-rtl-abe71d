// fsr_encoder: systematic cyclic (N, K) encoder with a feedback shift register.
//
// A code word is the K information bits followed by the R = N - K parity bits
// r(x) = x^R d(x) mod g(x), so that the whole word is a multiple of g(x). The
// default is the (15, 11) code with g(x) = x^4 + x + 1.
//
// How it works: the information bits go to the output line and, through the
// information-source switch, into the first adder of the divider chain
// (fsr_divider) at the same time. After the K-th bit the source is switched
// off and R more pulses with the feedback closed carry the last data bit
// through the last stage; the stages then hold r(x), most significant
// coefficient in B0. The feedback is opened and R pulses shift the parity
// bits out of B0 onto the output line. encoder_ctrl works the switches.
// All of that follows the document. The flush pulses leave the output idle
// (code_valid low), so one word takes N + R = 19 pulses for 15 output bits.
//
// With cycle_mode high and no word in progress the feedback stays closed
// and the source off: every pulse then gives the cyclic shift
// B3 <= B0, B2 <= B3 ^ B0, B1 <= B2, B0 <= B1 that the built encoder was
// observed to perform, with period 2^4 - 1 = 15 from any nonzero state.
// load presets the stages (preset[j] into Bj) on the next pulse.
//
// Interface: assert start for one pulse while idle; data_req is high on the
// pulses where data_in is taken, most significant information bit first.
// code_out is combinational from data_in during data pulses and from B0
// during parity pulses; sample it together with code_valid on the rising
// clock edge. done marks the last parity bit.
module fsr_encoder #(
  parameter int unsigned         N    = fsr_pkg::CODE_N,
  parameter int unsigned         K    = fsr_pkg::CODE_K,
  parameter logic [N-K:0]        POLY = fsr_pkg::CODE_POLY
) (
  input  logic             clk,         // clock pulses (all stages at once)
  input  logic             rst_n,       // asynchronous reset of the sequencer
  input  logic             start,       // begin a code word
  input  logic             cycle_mode,  // free-run the chain when idle
  input  logic             data_in,     // serial information bit
  input  logic             load,        // preset the stages on the next pulse
  input  logic [N-K-1:0]   preset,      // preset[j] -> stage Bj
  output logic             data_req,    // data_in is taken on this pulse
  output logic             code_out,    // serial code word bit
  output logic             code_valid,  // code_out is a code word bit
  output logic             busy,        // a code word is in progress
  output logic             done,        // last parity bit on code_out
  output fsr_pkg::phase_e  phase,       // sequencer phase
  output logic [N-K-1:0]   b            // stage contents, b[j] = Bj
);

  localparam int unsigned R = N - K;

  logic source_on, fb_en, out_parity, clear;
  logic div_in, msb_out, div_load;
  logic [R-1:0] div_preset;

  encoder_ctrl #(.N(N), .K(K)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .cycle_mode (cycle_mode),
    .phase      (phase),
    .source_on  (source_on),
    .fb_en      (fb_en),
    .out_parity (out_parity),
    .code_valid (code_valid),
    .clear      (clear),
    .busy       (busy),
    .done       (done)
  );

  // Information-source switch and the preset/clear path into the stages.
  assign div_in     = source_on & data_in;
  assign div_load   = load | clear;
  assign div_preset = load ? preset : '0;

  fsr_divider #(.R(R), .POLY(POLY)) u_div (
    .clk     (clk),
    .load    (div_load),
    .preset  (div_preset),
    .data_in (div_in),
    .fb_en   (fb_en),
    .b       (b),
    .msb_out (msb_out)
  );

  // Output switch: data line during data pulses, last stage during parity.
  assign data_req = source_on;
  assign code_out = out_parity ? msb_out : div_in;

endmodule
