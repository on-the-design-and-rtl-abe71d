// tb_fsr_encoder_generic: checks that the encoder core is correct for other
// generator polynomials, as its general r-stage structure promises. Two
// instances are run with every information word: the (7, 4) code with
// g(x) = x^3 + x + 1 (one feedback adder) and the (15, 7) code with
// g(x) = x^8 + x^7 + x^6 + x^4 + 1 (four feedback adders). Each code word is
// compared with long division and the word length in pulses is checked.
module tb_fsr_encoder_generic;
  import tb_fsr_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- (7, 4), g = x^3 + x + 1 ----
  localparam int unsigned N1 = 7, K1 = 4, R1 = 3;
  localparam logic [R1:0] G1 = 4'b1011;
  logic start1 = 0, din1 = 0, req1, out1, val1, busy1, done1;
  logic [R1-1:0] b1;
  fsr_pkg::phase_e ph1;
  fsr_encoder #(.N(N1), .K(K1), .POLY(G1)) dut1 (
    .clk(clk), .rst_n(rst_n), .start(start1), .cycle_mode(1'b0), .data_in(din1),
    .load(1'b0), .preset('0), .data_req(req1), .code_out(out1), .code_valid(val1),
    .busy(busy1), .done(done1), .phase(ph1), .b(b1));

  // ---- (15, 7), g = x^8 + x^7 + x^6 + x^4 + 1 ----
  localparam int unsigned N2 = 15, K2 = 7, R2 = 8;
  localparam logic [R2:0] G2 = 9'b1_1101_0001;
  logic start2 = 0, din2 = 0, req2, out2, val2, busy2, done2;
  logic [R2-1:0] b2;
  fsr_pkg::phase_e ph2;
  fsr_encoder #(.N(N2), .K(K2), .POLY(G2)) dut2 (
    .clk(clk), .rst_n(rst_n), .start(start2), .cycle_mode(1'b0), .data_in(din2),
    .load(1'b0), .preset('0), .data_req(req2), .code_out(out2), .code_valid(val2),
    .busy(busy2), .done(done2), .phase(ph2), .b(b2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int w = 0; w < (1 << K1); w++) begin
      logic [N1-1:0] got, want;
      int nv, idx, pulses;
      want = {K1'(w), parity_of(32'(w), K1, R1, 32'(G1))[R1-1:0]};
      got = '0; nv = 0; idx = K1 - 1; pulses = 0;
      start1 = 1; @(negedge clk); start1 = 0;
      while (1) begin
        din1 = req1 ? want[N1-1-(K1-1-idx)] : 1'b0;
        #1;
        if (req1) idx--;
        if (val1) begin got[N1-1-nv] = out1; nv++; end
        pulses++;
        if (done1 || pulses > 30) break;
        @(negedge clk);
      end
      @(negedge clk);
      check(got == want && nv == int'(N1) && pulses == int'(N1 + R1),
            $sformatf("(7,4) word %h: %b expected %b, %0d pulses", w, got, want, pulses));
    end
    for (int w = 0; w < (1 << K2); w++) begin
      logic [N2-1:0] got, want;
      int nv, idx, pulses;
      want = {K2'(w), parity_of(32'(w), K2, R2, 32'(G2))[R2-1:0]};
      got = '0; nv = 0; idx = K2 - 1; pulses = 0;
      start2 = 1; @(negedge clk); start2 = 0;
      while (1) begin
        din2 = req2 ? want[N2-1-(K2-1-idx)] : 1'b0;
        #1;
        if (req2) idx--;
        if (val2) begin got[N2-1-nv] = out2; nv++; end
        pulses++;
        if (done2 || pulses > 40) break;
        @(negedge clk);
      end
      @(negedge clk);
      check(got == want && nv == int'(N2) && pulses == int'(N2 + R2),
            $sformatf("(15,7) word %h: %b expected %b, %0d pulses", w, got, want, pulses));
      check(divisible(32'(got), N2, R2, 32'(G2)), "(15,7) word not a multiple of g");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
