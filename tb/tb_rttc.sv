// tb_rttc: self-checking test of the RT token checker: the token must visit
// PEs 0..N-1 in order, one per enabled clock, hold while disabled, and the
// one-hot output must match the index.
module tb_rttc;
  logic clk = 0, rst_n = 0, en;
  always #5 clk = ~clk;
  logic [2:0] sel;
  logic [4:0] sel_oh;
  int checks = 0, failures = 0;

  rttc #(.N(5)) dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int exp;
    en = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    exp = 0;
    for (int i = 0; i < 60; i++) begin
      en = (i % 7 != 3);
      checks++;
      if (sel !== 3'(exp) || sel_oh !== 5'(1 << exp)) begin failures++; $display("i=%0d sel=%0d exp=%0d", i, sel, exp); end
      @(negedge clk);
      if (en) exp = (exp + 1) % 5;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
