// tb_clk_gate: self-checking test of the latch-based clock gate.
// A counter on the gated clock must advance exactly in the cycles whose enable
// was high before the rising edge, and the gated clock must never rise while
// the source clock is low (no glitches when the enable changes mid-cycle).
module tb_clk_gate;
  logic clk = 0, en = 0, gclk;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int gcnt = 0, exp = 0;

  clk_gate dut (.*);

  always @(posedge gclk) gcnt++;
  always @(posedge gclk) begin
    checks++;
    if (clk !== 1'b1) failures++;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e;
    @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      e = 1'($urandom);
      en = e;
      #2 en = 1'($urandom);   // change while clk is low: the later value counts
      e = en;
      @(posedge clk);
      #1 en = ~en;            // changes while clk is high must be ignored
      if (e) exp++;
      @(negedge clk);
      checks++;
      if (gcnt != exp) begin failures++; $display("cycle %0d gcnt=%0d exp=%0d", i, gcnt, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
