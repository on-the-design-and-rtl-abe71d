// tb_half_adder: exhaustive check of the mod-2 adder against its truth table.
module tb_half_adder;
  logic x, y, s;
  int checks = 0, failures = 0;

  half_adder dut (.x(x), .y(y), .s(s));

  initial begin
    #1000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Truth table of modulo-2 addition: 0+0=0, 0+1=1, 1+0=1, 1+1=0.
    logic expect_s [4] = '{1'b0, 1'b1, 1'b1, 1'b0};
    for (int i = 0; i < 4; i++) begin
      x = i[1]; y = i[0];
      #1;
      checks++;
      if (s !== expect_s[i]) begin
        failures++;
        $display("FAIL x=%b y=%b s=%b expected %b", x, y, s, expect_s[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
