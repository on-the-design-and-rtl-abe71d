// fsr_encoder_top: the complete feedback shift-register encoder.
//
// The encoder is a clock source driving a four-stage feedback shift register
// with its mod-2 adders and switches. The clock source is an astable
// multivibrator (amv_clock, a behavioural model with a delay-based
// oscillator, so this top is for simulation; fsr_encoder below it is the
// synthesizable part). All stages are triggered by the same pulse.
//
// Two ways of using it:
//   * Encoding (cycle_mode low): pulse start while idle, then supply the
//     K = 11 information bits on data_in, one per pulse while data_req is
//     high. code_out carries the 15-bit code word (11 data bits, then 4
//     parity bits) wherever code_valid is high; 4 pulses without a valid
//     bit separate the two parts.
//   * Cyclic shifting (cycle_mode high, idle): preset the stages with load
//     and preset, and each pulse moves B2->B1, B1->B0, B0->B3, and B3 xor B0
//     ->B2. The pattern repeats every 15 pulses from any nonzero start.
// The four stage outputs b[3:0] are brought out for observation.
//
// Timing: everything changes on the rising edge of clk_pulse; drive the
// inputs away from that edge (for instance on its falling edge). rst_n is
// asynchronous and works with the clock source off.
module fsr_encoder_top #(
  parameter int unsigned  N              = fsr_pkg::CODE_N,
  parameter int unsigned  K              = fsr_pkg::CODE_K,
  parameter logic [N-K:0] POLY           = fsr_pkg::CODE_POLY,
  parameter int unsigned  HALF_PERIOD = 500_000
) (
  input  logic            amv_on,      // clock pulses switched on
  input  logic            rst_n,       // asynchronous reset, active low
  input  logic            start,       // begin a code word
  input  logic            cycle_mode,  // free-run as a cyclic shifter
  input  logic            data_in,     // serial information bit
  input  logic            load,        // preset the stages
  input  logic [N-K-1:0]  preset,      // preset[j] -> stage Bj
  output logic            clk_pulse,   // the clock pulses, for observation
  output logic            data_req,    // data_in taken on this pulse
  output logic            code_out,    // serial code word
  output logic            code_valid,  // code_out carries a code bit
  output logic            busy,        // code word in progress
  output logic            done,        // last parity bit on code_out
  output fsr_pkg::phase_e phase,       // sequencer phase
  output logic [N-K-1:0]  b            // stage outputs, b[j] = Bj
);

  amv_clock #(.HALF_PERIOD(HALF_PERIOD)) u_amv (
    .on    (amv_on),
    .pulse (clk_pulse)
  );

  fsr_encoder #(.N(N), .K(K), .POLY(POLY)) u_enc (
    .clk        (clk_pulse),
    .rst_n      (rst_n),
    .start      (start),
    .cycle_mode (cycle_mode),
    .data_in    (data_in),
    .load       (load),
    .preset     (preset),
    .data_req   (data_req),
    .code_out   (code_out),
    .code_valid (code_valid),
    .busy       (busy),
    .done       (done),
    .phase      (phase),
    .b          (b)
  );

endmodule
