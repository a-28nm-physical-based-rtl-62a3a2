// tb_mp_mac: self-checking test of the mixed-precision MAC.
// Random operands in all three precisions are accumulated and compared with a
// reference sum of sign-extended lane products; clear and clear+load are
// checked, and the accumulator must update one clock after `en`.
module tb_mp_mac;
  import prt_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  prec_e prec;
  logic [31:0] a, b;
  logic en, clr;
  logic signed [63:0] acc;
  int checks = 0, failures = 0;

  mp_mac dut (.*);

  function automatic longint lanes(input prec_e p, input logic [31:0] x, input logic [31:0] y);
    longint s = 0;
    case (p)
      PREC_8:  for (int i = 0; i < 4; i++) s += longint'($signed(x[8*i +: 8])) * longint'($signed(y[8*i +: 8]));
      PREC_16: for (int i = 0; i < 2; i++) s += longint'($signed(x[16*i +: 16])) * longint'($signed(y[16*i +: 16]));
      default: s = longint'($signed(x)) * longint'($signed(y));
    endcase
    return s;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint model;
    en = 0; clr = 0; a = 0; b = 0; prec = PREC_8;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    model = 0;
    for (int n = 0; n < 300; n++) begin
      prec = prec_e'(n % 3);
      a = $urandom; b = $urandom;
      en = 1;
      clr = (n % 50 == 49);
      @(posedge clk); #1;
      model = clr ? lanes(prec, a, b) : model + lanes(prec, a, b);
      checks++;
      if (acc !== model) begin
        failures++;
        $display("mismatch n=%0d prec=%0d acc=%0d exp=%0d", n, prec, acc, model);
      end
      @(negedge clk);
    end
    // hold without en
    en = 0; clr = 0;
    @(posedge clk); #1;
    checks++; if (acc !== model) failures++;
    // clear alone
    clr = 1; @(posedge clk); #1; clr = 0;
    checks++; if (acc !== 0) failures++;
    // exact small example: 8b lanes (1*2)+(-1*3)+(4*-5)+(6*7) = 2-3-20+42 = 21
    @(negedge clk);
    prec = PREC_8; a = {8'd6, 8'd4, 8'hFF, 8'd1}; b = {8'd7, 8'hFB, 8'd3, 8'd2}; en = 1;
    @(posedge clk); #1; en = 0;
    checks++; if (acc !== 21) begin failures++; $display("example got %0d", acc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
