// tb_fsr_divider: checks the four-stage divider for g(x) = x^4 + x + 1.
//  1. Cyclic shifting: preset B3..B0 = 0100, feedback closed, no input; the
//     stage patterns must follow the reference table pulse by pulse and be
//     back at the first pattern after 15 pulses.
//  2. Period: from every nonzero preset the chain returns after exactly 15
//     pulses and not earlier.
//  3. Division: random bit strings clocked in must leave the remainder that
//     long division gives, read as B(3-i) = coefficient of x^i.
//  4. Shift-out: with the feedback open and no input, B0 must show the
//     stages in the order B0, B1, B2, B3 and the chain must end empty.
module tb_fsr_divider;
  import tb_fsr_ref_pkg::*;
  localparam int unsigned R = 4;
  localparam logic [R:0] POLY = 5'b1_0011;

  logic clk = 0, load = 0, data_in = 0, fb_en = 0, msb_out;
  logic [R-1:0] preset = '0, b;
  int checks = 0, failures = 0;

  fsr_divider #(.R(R), .POLY(POLY)) dut (
    .clk(clk), .load(load), .preset(preset), .data_in(data_in),
    .fb_en(fb_en), .b(b), .msb_out(msb_out));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic pulse();
    @(posedge clk);
    @(negedge clk);
  endtask

  task automatic do_preset(input logic [R-1:0] v);
    load = 1; preset = v; pulse(); load = 0;
  endtask

  // Remainder with bit i = coefficient of x^i, mapped onto {B3,B2,B1,B0}.
  function automatic logic [R-1:0] to_stages(input logic [R-1:0] rem);
    logic [R-1:0] s;
    for (int i = 0; i < R; i++) s[R-1-i] = rem[i];
    return s;
  endfunction

  initial begin
    @(negedge clk);
    // 1. Table of patterns.
    do_preset(TABLE1_START);
    check(b == TABLE1_START, "preset");
    fb_en = 1; data_in = 0;
    for (int p = 0; p < 15; p++) begin
      pulse();
      check(b == TABLE1[p], $sformatf("pulse %0d: B3..B0=%b expected %b", p + 1, b, TABLE1[p]));
    end
    check(b == TABLE1_START, "pattern repeats after 15 pulses");

    // 2. Period 15 from every nonzero state.
    for (int s0 = 1; s0 < 16; s0++) begin
      int first_back;
      do_preset(4'(s0));
      fb_en = 1;
      first_back = 0;
      for (int p = 1; p <= 15; p++) begin
        pulse();
        if (b == 4'(s0) && first_back == 0) first_back = p;
      end
      check(first_back == 15, $sformatf("state %b returned after %0d pulses", 4'(s0), first_back));
    end

    // 3. Division of random bit strings.
    for (int t = 0; t < 200; t++) begin
      int unsigned len;
      logic [31:0] word, rem;
      len  = $urandom_range(1, 24);
      word = $urandom & ((32'd1 << len) - 1);
      do_preset('0);
      fb_en = 1;
      for (int i = int'(len) - 1; i >= 0; i--) begin
        data_in = word[i];
        pulse();
      end
      data_in = 0;
      rem = poly_mod({32'd0, word}, len, R, {27'd0, POLY});
      check(b == to_stages(rem[R-1:0]),
            $sformatf("remainder of %b: stages %b expected %b", word, b, to_stages(rem[R-1:0])));
    end

    // 4. Shift-out with the feedback open.
    for (int t = 0; t < 16; t++) begin
      logic [R-1:0] v;
      v = 4'(t);
      do_preset(v);
      fb_en = 0; data_in = 0;
      for (int i = 0; i < R; i++) begin
        check(msb_out == v[i], $sformatf("shift-out bit %0d of %b", i, v));
        pulse();
      end
      check(b == '0, "chain empty after shift-out");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
