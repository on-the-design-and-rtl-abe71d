// tb_encoder_ctrl: checks the switch sequence of the (15, 11) controller.
// After start, every pulse is compared with the expected switch settings:
// 11 pulses source on / feedback closed / output on data, 4 pulses source
// off / feedback closed / output idle, 4 pulses feedback open / output on
// the last stage, done on the 19th. In idle the stages must be cleared,
// except in cycle mode, where the feedback stays closed. Also checks the
// asynchronous reset with the clock stopped.
module tb_encoder_ctrl;
  import fsr_pkg::*;
  localparam int unsigned N = 15, K = 11, R = N - K;

  logic clk = 0, clk_en = 1, rst_n = 0, start = 0, cycle_mode = 0;
  phase_e phase;
  logic source_on, fb_en, out_parity, code_valid, clear, busy, done;
  int checks = 0, failures = 0;

  encoder_ctrl #(.N(N), .K(K)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .cycle_mode(cycle_mode),
    .phase(phase), .source_on(source_on), .fb_en(fb_en),
    .out_parity(out_parity), .code_valid(code_valid), .clear(clear),
    .busy(busy), .done(done));

  always #5 if (clk_en) clk = ~clk;

  initial begin
    #200000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Expected {source_on, fb_en, out_parity, code_valid, busy, done} on
  // pulse p (0-based) of a code word.
  function automatic logic [5:0] expected(input int p);
    if (p < int'(K))          return 6'b110110;
    else if (p < int'(K + R)) return 6'b010010;
    else if (p < int'(N + R) - 1) return 6'b001110;
    else                      return 6'b001111;
  endfunction

  task automatic run_word(input int gap);
    // start seen in idle; the same pulse clears the stages.
    start = 1;
    #1;
    check(clear == 1'b1, "clear with start");
    @(posedge clk); #1;
    start = 0;
    for (int p = 0; p < int'(N + R); p++) begin
      logic [5:0] got;
      got = {source_on, fb_en, out_parity, code_valid, busy, done};
      check(got == expected(p), $sformatf("pulse %0d: got %b expected %b", p, got, expected(p)));
      @(posedge clk); #1;
    end
    check(phase == PH_IDLE && !busy, "back in idle after N+R pulses");
    repeat (gap) @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(phase == PH_IDLE && clear && !fb_en && !code_valid, "idle after reset");
    run_word(0);
    run_word(3);
    // start held high is ignored while a word is in progress
    start = 1;
    @(posedge clk); #1;
    repeat (5) @(posedge clk);
    #1;
    check(phase == PH_DATA, "start held high does not restart");
    start = 0;
    repeat (20) @(posedge clk);
    #1;
    // Cycle mode in idle: feedback closed, no clear, no output.
    cycle_mode = 1;
    #1;
    check(phase == PH_IDLE && fb_en && !clear && !source_on && !code_valid,
          "cycle mode in idle");
    run_word(1);     // a word in cycle mode still follows the sequence
    cycle_mode = 0;
    // Asynchronous reset with the clock stopped, in the middle of a word.
    start = 1; @(posedge clk); #1; start = 0;
    repeat (6) @(posedge clk);
    #1;
    clk_en = 0;
    #20 rst_n = 0;
    #1;
    check(phase == PH_IDLE && !busy, "asynchronous reset with no clock");
    #20 rst_n = 1; clk_en = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
