// fsr_pkg: shared constants and types of the feedback shift-register encoder.
//
// The encoder produces a systematic cyclic (n, k) code. Its default is the
// (15, 11) code with generator polynomial g(x) = x^4 + x + 1, so r = n - k = 4
// register stages. A generator polynomial is held as a bit vector whose bit i
// is the coefficient of x^i; bit r (the leading x^r term) and bit 0 (the
// constant term) are always 1.
//
// The encoding of the controller phases is this design's own choice.
package fsr_pkg;

  localparam int unsigned CODE_N = 15;        // total bits in a code word
  localparam int unsigned CODE_K = 11;        // information bits
  localparam int unsigned CODE_R = CODE_N - CODE_K;  // parity bits = stages
  localparam logic [CODE_R:0] CODE_POLY = 5'b1_0011;  // x^4 + x + 1

  // Phases of one code word, named after the positions of the three switches.
  //   PH_IDLE   : registers cleared (or free-running in cycle mode)
  //   PH_DATA   : information source on, feedback closed, data bits to output
  //   PH_FLUSH  : source off, feedback closed, last data bit moves through
  //   PH_PARITY : source off, feedback open, parity bits to output
  typedef enum logic [1:0] {
    PH_IDLE   = 2'd0,
    PH_DATA   = 2'd1,
    PH_FLUSH  = 2'd2,
    PH_PARITY = 2'd3
  } phase_e;

endpackage
