// tb_fsr_encoder_top: whole-design test of the encoder at its default size,
// (15, 11) with g(x) = x^4 + x + 1, clocked by its own clock source.
// It follows the bring-up of the built encoder and then encodes:
//   1. clock source off: reset, preset the stages, check that no pulses
//      arrive and the stages hold;
//   2. preset B3..B0 = 0100 and switch the pulses on in cycle mode: the
//      stages must follow the reference table and repeat after 15 pulses;
//   3. leave cycle mode and encode every one of the 2^11 information words,
//      checking the code bits against long division, the 11 data requests,
//      the 4 idle flush pulses, the 4 parity pulses and the 19-pulse length.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_fsr_encoder_top;
  import fsr_pkg::*;
  import tb_fsr_ref_pkg::*;
  localparam int unsigned N = fsr_pkg::CODE_N, K = fsr_pkg::CODE_K, R = N - K;
  localparam logic [R:0] POLY = fsr_pkg::CODE_POLY;

  logic amv_on = 0, rst_n = 1, start = 0, cycle_mode = 0, data_in = 0, load = 0;
  logic [R-1:0] preset = '0, b;
  logic clk_pulse, data_req, code_out, code_valid, busy, done;
  phase_e phase;
  int checks = 0, failures = 0;

  fsr_encoder_top dut (
    .amv_on(amv_on), .rst_n(rst_n), .start(start), .cycle_mode(cycle_mode),
    .data_in(data_in), .load(load), .preset(preset), .clk_pulse(clk_pulse),
    .data_req(data_req), .code_out(code_out), .code_valid(code_valid),
    .busy(busy), .done(done), .phase(phase), .b(b));

  int pulses_total = 0;
  always @(posedge clk_pulse) pulses_total++;

  // Watchdog: counts clock pulses, plus a time limit for a dead clock.
  initial begin
    fork
      wait (pulses_total > 60000);
      #(64'd100_000_000_000);
    join_any
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

  // Mechanism counters.
  int n_off_hold = 0, n_async_reset = 0, n_preset = 0, n_cycle_shift = 0;
  int n_period15 = 0, n_words = 0, n_flush = 0, n_parity = 0;
  int n_zero_parity = 0, n_source_on = 0;

  task automatic encode(input logic [K-1:0] d);
    logic [N-1:0] got, want;
    int nvalid, nreq, pulses, idx;
    want = {d, parity_of(32'(d), K, R, 32'(POLY))[R-1:0]};
    got = '0; nvalid = 0; nreq = 0; pulses = 0; idx = K - 1;
    start = 1;
    @(negedge clk_pulse);
    start = 0;
    while (1) begin
      data_in = data_req ? d[idx] : 1'($urandom);
      #1;
      if (data_req) begin nreq++; n_source_on++; idx--; end
      if (phase == PH_FLUSH) begin
        n_flush++;
        check(!code_valid, "output idle while flushing");
      end
      if (phase == PH_PARITY) n_parity++;
      if (code_valid) begin
        if (nvalid < int'(N)) got[N-1-nvalid] = code_out;
        nvalid++;
      end
      pulses++;
      if (done || pulses > 40) break;
      @(negedge clk_pulse);
    end
    @(negedge clk_pulse);
    check(got == want, $sformatf("word %h: code %b expected %b", d, got, want));
    check(nvalid == int'(N) && nreq == int'(K) && pulses == int'(N + R),
          $sformatf("word %h: %0d valid, %0d requests, %0d pulses", d, nvalid, nreq, pulses));
    n_words++;
    if (want[R-1:0] == '0) n_zero_parity++;
  endtask

  initial begin
    int p0;
    // 1. Clock source off: pulse the asynchronous reset.
    #1000;
    rst_n = 0;
    #1000;
    rst_n = 1;
    #1000;
    check(phase == PH_IDLE && !busy, "idle after reset with no clock");
    n_async_reset++;
    check(pulses_total == 0 && clk_pulse == 1'b0, "no pulses while the source is off");
    n_off_hold++;

    // 2. Preset 0100, switch the pulses on, free-run.
    cycle_mode = 1;
    load = 1; preset = TABLE1_START;
    amv_on = 1;
    @(negedge clk_pulse);
    load = 0;
    check(b == TABLE1_START, "preset 0100");
    n_preset++;
    p0 = pulses_total;
    for (int p = 0; p < 15; p++) begin
      @(negedge clk_pulse);
      check(b == TABLE1[p], $sformatf("pulse %0d: B3..B0 %b expected %b", p + 1, b, TABLE1[p]));
      n_cycle_shift++;
    end
    check(b == TABLE1_START && pulses_total - p0 == 15, "pattern back after 15 pulses");
    n_period15++;

    // Pulses off: the stages must hold.
    amv_on = 0;
    #1;
    begin
      logic [R-1:0] held;
      int pt;
      @(negedge clk_pulse);   // the running pulse completes
      held = b;
      pt = pulses_total;
      #(64'd10_000_000);
      check(b == held && pulses_total == pt, "stages hold with the pulses off");
      n_off_hold++;
    end
    amv_on = 1;
    @(negedge clk_pulse);

    // 3. Encode every information word.
    cycle_mode = 0;
    @(negedge clk_pulse);
    for (int w = 0; w < (1 << K); w++) encode(K'(w));

    check(n_off_hold > 0, "clock source switched off");
    check(n_async_reset > 0, "reset without clock");
    check(n_preset > 0, "stage preset");
    check(n_cycle_shift > 0, "cyclic shift");
    check(n_period15 > 0, "period of 15 pulses");
    check(n_source_on > 0, "information source on");
    check(n_flush > 0, "flush with the source off");
    check(n_parity > 0, "parity shift-out with the feedback open");
    check(n_zero_parity > 0, "zero remainder (parity 0000)");
    check(n_words == (1 << K), "all information words encoded");
    $display("mechanisms: off_hold=%0d async_reset=%0d preset=%0d cycle_shift=%0d period15=%0d",
             n_off_hold, n_async_reset, n_preset, n_cycle_shift, n_period15);
    $display("mechanisms: source_on=%0d flush=%0d parity=%0d zero_parity=%0d words=%0d",
             n_source_on, n_flush, n_parity, n_zero_parity, n_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
