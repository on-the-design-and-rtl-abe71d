// encoder_ctrl: switch sequencer of the feedback shift-register encoder.
//
// The encoder has three switches: the information-source switch at the
// input, the feedback switch after the last stage, and the output switch that
// chooses between the data line and the last stage. For one code word this
// controller sets them for three runs of clock pulses:
//   PH_DATA   K pulses : source on, feedback closed, output = data line
//   PH_FLUSH  R pulses : source off, feedback closed, output not valid
//                        (the last data bit moves out through the last stage)
//   PH_PARITY R pulses : source off, feedback open, output = last stage
// where R = N - K. That sequence is the one the document describes; the
// counters, the start handshake and the reset are this design's own.
// In PH_IDLE the stages are cleared on every pulse, except in cycle mode,
// where the feedback stays closed and the chain free-runs as a cyclic
// shifter (the mode in which the built encoder was observed). A start
// seen in PH_IDLE always clears the chain on that pulse.
//
// Interface: start is sampled on the rising edge in PH_IDLE only. The first
// data bit is taken on the pulse after start was seen (source_on high).
// done is high during the last parity pulse. A code word takes N + R pulses
// from the first data pulse; the code word's N bits are marked by
// code_valid. rst_n is asynchronous, so the controller can be reset while
// the clock source is switched off.
module encoder_ctrl #(
  parameter int unsigned N = fsr_pkg::CODE_N,   // code word length
  parameter int unsigned K = fsr_pkg::CODE_K    // information bits
) (
  input  logic           clk,
  input  logic           rst_n,       // asynchronous, active low
  input  logic           start,       // begin a code word (from PH_IDLE)
  input  logic           cycle_mode,  // 1: free-run the chain while idle
  output fsr_pkg::phase_e phase,      // current phase
  output logic           source_on,   // information-source switch closed
  output logic           fb_en,       // feedback switch closed
  output logic           out_parity,  // output switch on the last stage
  output logic           code_valid,  // output line carries a code bit
  output logic           clear,       // clear the stages on this pulse
  output logic           busy,        // a code word is in progress
  output logic           done         // last parity bit is on the output
);

  import fsr_pkg::*;

  localparam int unsigned R  = N - K;
  localparam int unsigned CW = $clog2((K > R ? K : R) + 1);

  if (K < 1 || N <= K) begin : g_bad_size
    $error("encoder_ctrl: need 0 < K < N");
  end

  phase_e         phase_q;
  logic [CW-1:0]  cnt_q;
  logic           last;

  assign phase = phase_q;

  always_comb begin
    unique case (phase_q)
      PH_DATA:   last = (cnt_q == CW'(K - 1));
      PH_FLUSH,
      PH_PARITY: last = (cnt_q == CW'(R - 1));
      default:   last = 1'b0;
    endcase
  end

  always_comb begin
    source_on  = (phase_q == PH_DATA);
    fb_en      = (phase_q == PH_DATA) || (phase_q == PH_FLUSH) ||
                 ((phase_q == PH_IDLE) && cycle_mode);
    out_parity = (phase_q == PH_PARITY);
    code_valid = (phase_q == PH_DATA) || (phase_q == PH_PARITY);
    clear      = (phase_q == PH_IDLE) && (!cycle_mode || start);
    busy       = (phase_q != PH_IDLE);
    done       = (phase_q == PH_PARITY) && last;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q <= PH_IDLE;
      cnt_q   <= '0;
    end else begin
      unique case (phase_q)
        PH_IDLE: begin
          cnt_q <= '0;
          if (start) phase_q <= PH_DATA;
        end
        PH_DATA, PH_FLUSH, PH_PARITY: begin
          if (last) begin
            cnt_q   <= '0;
            phase_q <= (phase_q == PH_DATA)  ? PH_FLUSH  :
                       (phase_q == PH_FLUSH) ? PH_PARITY : PH_IDLE;
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        default: phase_q <= PH_IDLE;
      endcase
    end
  end

  // The information source may only be connected while the feedback loop is
  // closed, and the output is never valid while the last data bit is flushed.
  a_source_fb: assert property (@(posedge clk) disable iff (!rst_n)
                                source_on |-> fb_en);
  a_flush_quiet: assert property (@(posedge clk) disable iff (!rst_n)
                                  (phase_q == PH_FLUSH) |-> !code_valid);
  a_parity_open: assert property (@(posedge clk) disable iff (!rst_n)
                                  out_parity |-> !fb_en && !source_on);

endmodule
