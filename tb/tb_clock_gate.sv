// tb_clock_gate: the gated clock must pulse in exactly the cycles whose
// enable was set before the rising edge, stay low otherwise, and not
// glitch when the enable changes while the clock is high.
module tb_clock_gate;
  logic clk = 0, en = 0, gclk;
  int checks = 0, failures = 0, pulses = 0, expected = 0;

  clock_gate dut (.clk, .en, .gclk);
  always #5 clk = ~clk;
  always @(posedge gclk) pulses++;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      #1;
      checks++;
      if (gclk !== 1'b0) begin failures++; $display("t=%0d gclk high in low phase", t); end
      e = 1'($urandom);
      en = e;
      expected += e;
      @(posedge clk);
      #1;
      checks++;
      if (gclk !== e) begin failures++; $display("t=%0d gclk=%b during high phase, en=%b", t, gclk, e); end
      en = ~e;                       // change while clk is high: no effect
      #2;
      checks++;
      if (gclk !== e) begin failures++; $display("t=%0d glitch on gclk", t); end
    end
    @(negedge clk);
    checks++;
    if (pulses != expected) begin failures++; $display("pulses %0d exp %0d", pulses, expected); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
