// tb_aes_clock_gate -- latch-based clock gate.
// With a random enable pattern (changed just after each rising edge, as a
// register would) the gated clock must pulse exactly in the cycles whose
// enable was high, must be high only while clk is high, and must not follow
// an enable change while clk is high.
module tb_aes_clock_gate;
  logic clk = 0, en = 0, gclk;
  int checks = 0, failures = 0;
  int pulses = 0, expected = 0;
  logic prev;

  aes_clock_gate dut (.clk, .en, .gclk);

  always #5 clk = ~clk;

  always @(posedge gclk) pulses++;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    #1;
    for (int n = 0; n < 400; n++) begin
      prev = en;
      en = 1'($urandom);
      if (en) expected++;
      // while clk is high a new enable must not reach gclk
      #1;
      checks++;
      if (gclk !== prev) begin failures++; $display("FAIL enable passed while clk high"); end
      @(negedge clk); #1;
      checks++;
      if (gclk !== 1'b0) begin failures++; $display("FAIL gclk high while clk low"); end
      @(posedge clk); #1;
      checks++;
      if (gclk !== en) begin failures++; $display("FAIL gclk %b enable %b", gclk, en); end
    end
    en = 1'b0;
    @(negedge clk); #1;
    checks++;
    if (pulses != expected) begin
      failures++;
      $display("FAIL pulses %0d expected %0d", pulses, expected);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
