// tb_pcu: self-checking test of the PE compute unit.
// Issues CLR, 32-bit MACs, divides and square roots through the op interface
// and checks results (roots against a bisection reference) and latencies (MAC 1, DIV 65, SQRT 33 clocks). It also
// checks the clock gating: in IR mode a divide must not advance, and it must
// finish once RT mode is restored.
module tb_pcu;
  import prt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mode_e mode;
  logic start, busy, done;
  pcu_op_e op;
  prec_e prec;
  logic [63:0] a, b, result;
  int checks = 0, failures = 0;

  pcu dut (.*);

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference root by bisection on the square, independent of the unit's method
  function automatic logic [63:0] isqrt(input logic [63:0] x);
    logic [63:0] lo, hi, mid;
    lo = 0; hi = 64'd4294967295;
    while (lo < hi) begin
      mid = lo + (hi - lo + 1) / 2;
      if (128'(mid) * 128'(mid) <= 128'(x)) lo = mid; else hi = mid - 1;
    end
    return lo;
  endfunction

  task automatic issue(input pcu_op_e o, input logic [63:0] x, input logic [63:0] y,
                       input logic [63:0] exp, input int lat);
    int cyc;
    @(negedge clk);
    op = o; a = x; b = y; start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done && cyc < 200) begin @(negedge clk); cyc++; end
    checks++;
    if (result !== exp) begin failures++; $display("op %0d got %0d exp %0d", o, result, exp); end
    checks++;
    if (cyc != lat) begin failures++; $display("op %0d latency %0d exp %0d", o, cyc, lat); end
  endtask

  initial begin
    longint s;
    int cyc;
    mode = MODE_RT; start = 0; op = OP_CLR; prec = PREC_32; a = 0; b = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    issue(OP_CLR, 0, 0, 0, 1);
    issue(OP_MAC, 64'(-32'sd300), 64'd7, 64'(-64'sd2100), 1);
    issue(OP_MAC, 64'd1000, 64'd1000, 64'd997900, 1);
    issue(OP_DIV, 64'd1 << 24, 64'd37, (64'd1 << 24) / 37, 65);
    issue(OP_SQRT, 64'd1000000007, 0, 64'd31622, 33);
    for (int i = 0; i < 10; i++) begin
      logic [63:0] x, y;
      x = {$urandom, $urandom}; y = 64'($urandom) + 1;
      issue(OP_DIV, x, y, x / y, 65);
    end
    for (int i = 0; i < 5; i++) begin
      logic [63:0] x;
      x = {$urandom, $urandom};
      issue(OP_SQRT, x, 0, isqrt(x), 33);
    end
    // accumulator survives divide/sqrt
    s = 997900 + 12 * 12;
    issue(OP_MAC, 64'd12, 64'd12, 64'(s), 1);
    // clock gating: in IR mode the divider is frozen
    @(negedge clk);
    mode = MODE_IR; op = OP_DIV; a = 64'd99; b = 64'd4; start = 1;
    @(negedge clk); start = 0;
    cyc = 0;
    repeat (100) begin if (done) cyc++; @(negedge clk); end
    checks++;
    if (cyc != 0 || !busy) begin failures++; $display("gated divider ran"); end
    mode = MODE_RT;
    cyc = 0;
    while (!done && cyc < 200) begin @(negedge clk); cyc++; end
    checks++;
    if (result !== 64'd24) begin failures++; $display("resumed divide %0d", result); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
