// tb_amv_clock: checks the clock source model. While switched off it must
// give no pulses; once on, its rising edges must be 2*HALF_PERIOD apart with
// the first HALF_PERIOD after switch-on; switched off again it must stop low.
module tb_amv_clock;
  localparam int unsigned HALF = 7;
  logic on, pulse;
  int checks = 0, failures = 0;

  amv_clock #(.HALF_PERIOD(HALF)) dut (.on(on), .pulse(pulse));

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int edges = 0;
  always @(posedge pulse) edges++;

  initial begin
    time t_on, t_prev, t_now;
    on = 0;
    #200;
    checks++;
    if (edges != 0 || pulse !== 1'b0) begin
      failures++; $display("FAIL pulses while switched off");
    end
    on = 1;
    t_on = $time;
    @(posedge pulse);
    t_now = $time;
    checks++;
    if (t_now - t_on != HALF) begin
      failures++; $display("FAIL first edge after %0t, expected %0d", t_now - t_on, HALF);
    end
    for (int i = 0; i < 20; i++) begin
      t_prev = t_now;
      @(posedge pulse);
      t_now = $time;
      checks++;
      if (t_now - t_prev != 2 * HALF) begin
        failures++; $display("FAIL period %0t, expected %0d", t_now - t_prev, 2 * HALF);
      end
    end
    #1 on = 0;
    #(4 * HALF);
    begin
      int e0;
      e0 = edges;
      #(20 * HALF);
      checks++;
      if (edges != e0 || pulse !== 1'b0) begin
        failures++; $display("FAIL pulses after switching off");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
