// tb_bmv: drives one storage stage with random data, load and preset values
// and compares q after each pulse with a one-line model of a loadable D
// flip-flop kept in the testbench.
module tb_bmv;
  logic clk = 0, load, preset, d, q;
  logic model_q;
  int checks = 0, failures = 0;

  bmv dut (.clk(clk), .load(load), .preset(preset), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int loads = 0;
    load = 1; preset = 0; d = 1;
    @(negedge clk);
    model_q = 0;
    for (int i = 0; i < 400; i++) begin
      load   = ($urandom_range(0, 3) == 0);
      preset = 1'($urandom);
      d      = 1'($urandom);
      if (load) loads++;
      @(posedge clk);
      model_q = load ? preset : d;
      @(negedge clk);
      checks++;
      if (q !== model_q) begin
        failures++;
        $display("FAIL step %0d load=%b preset=%b d=%b q=%b expected %b",
                 i, load, preset, d, q, model_q);
      end
    end
    // Hold: with load high and a fixed preset the stage keeps that value
    // whatever d does.
    load = 1; preset = 1;
    repeat (4) begin
      d = ~d;
      @(negedge clk);
      checks++;
      if (q !== 1'b1) begin failures++; $display("FAIL preset hold"); end
    end
    if (loads == 0) begin failures++; $display("FAIL no load exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
