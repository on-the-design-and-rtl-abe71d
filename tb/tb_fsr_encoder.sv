// tb_fsr_encoder: end-to-end check of the (15, 11) encoder core.
// Every one of the 2^11 information words is encoded. The 15 valid output
// bits must equal the 11 data bits followed by (d(x) x^4) mod g(x) from long
// division, the whole word must be a multiple of g(x), data must be
// requested on exactly 11 pulses, and done must come on the 19th pulse
// after the first data pulse. Words whose remainder is zero must get parity
// 0000. Then, in cycle mode, the stages preset to B3..B0 = 0100 must step
// through the reference table and repeat after 15 pulses.
module tb_fsr_encoder;
  import fsr_pkg::*;
  import tb_fsr_ref_pkg::*;
  localparam int unsigned N = 15, K = 11, R = N - K;
  localparam logic [R:0] POLY = 5'b1_0011;

  logic clk = 0, rst_n = 0, start = 0, cycle_mode = 0, data_in = 0, load = 0;
  logic [R-1:0] preset = '0, b;
  logic data_req, code_out, code_valid, busy, done;
  phase_e phase;
  int checks = 0, failures = 0;

  fsr_encoder #(.N(N), .K(K), .POLY(POLY)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .cycle_mode(cycle_mode),
    .data_in(data_in), .load(load), .preset(preset), .data_req(data_req),
    .code_out(code_out), .code_valid(code_valid), .busy(busy), .done(done),
    .phase(phase), .b(b));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  int zero_parity_words = 0;

  // Encode d; inputs change on the falling edge, outputs sampled before the
  // rising edge.
  task automatic encode(input logic [K-1:0] d);
    logic [N-1:0] got, want;
    int nvalid, nreq, pulses, idx;
    want = {d, parity_of(32'(d), K, R, 32'(POLY))[R-1:0]};
    got = '0; nvalid = 0; nreq = 0; pulses = 0; idx = K - 1;
    start = 1;
    @(negedge clk);
    start = 0;
    while (1) begin
      data_in = data_req ? d[idx] : 1'($urandom);
      #1;
      if (data_req) begin nreq++; idx--; end
      if (code_valid) begin
        if (nvalid < int'(N)) got[N-1-nvalid] = code_out;
        nvalid++;
      end
      pulses++;
      if (done || pulses > 40) break;
      @(negedge clk);
    end
    @(negedge clk);
    check(got == want, $sformatf("word %h: code %b expected %b", d, got, want));
    check(nvalid == int'(N), $sformatf("word %h: %0d valid bits", d, nvalid));
    check(nreq == int'(K), $sformatf("word %h: %0d data requests", d, nreq));
    check(pulses == int'(N + R), $sformatf("word %h: done after %0d pulses", d, pulses));
    check(divisible(32'(got), N, R, 32'(POLY)), $sformatf("word %h: not a multiple of g", d));
    if (want[R-1:0] == '0) zero_parity_words++;
  endtask

  initial begin
    @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int w = 0; w < (1 << K); w++) encode(K'(w));
    // A word that is already a multiple of g(x): g(x) itself shifted up.
    encode(11'b000_0001_0011);
    check(zero_parity_words >= 2, "zero-remainder words seen");

    // Cycle mode: the cyclic shifting of the built encoder.
    cycle_mode = 1;
    load = 1; preset = TABLE1_START;
    @(negedge clk);
    load = 0;
    check(b == TABLE1_START, "preset 0100");
    for (int p = 0; p < 15; p++) begin
      @(negedge clk);
      check(b == TABLE1[p], $sformatf("cycle pulse %0d: %b expected %b", p + 1, b, TABLE1[p]));
      check(!code_valid, "no output in cycle mode");
    end
    check(b == TABLE1_START, "pattern repeats after 15 pulses");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
