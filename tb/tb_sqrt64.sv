// tb_sqrt64: self-checking test of the iterative integer square root.
// For random and corner-case radicands the result r must satisfy
// r*r <= x < (r+1)*(r+1); done must come exactly 33 clocks after start.
module tb_sqrt64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done;
  logic [63:0] rad;
  logic [31:0] root;
  int checks = 0, failures = 0;

  sqrt64 #(.W(64)) dut (.*);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [63:0] x);
    int cyc;
    logic [127:0] r, r1;
    @(negedge clk);
    rad = x; start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    r  = 128'(root);
    r1 = r + 1;
    checks++;
    if (!(r * r <= 128'(x) && 128'(x) < r1 * r1)) begin
      failures++;
      $display("sqrt %0d got %0d", x, root);
    end
    checks++;
    if (cyc != 33) begin failures++; $display("latency %0d", cyc); end
  endtask

  initial begin
    start = 0; rad = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    run(0); run(1); run(2); run(3); run(4); run(15); run(16); run(17);
    run(64'd1000000); run('1); run(64'hFFFF_FFFE_0000_0001); run(64'hFFFF_FFFE_0000_0000);
    for (int i = 0; i < 40; i++) run({$urandom, $urandom} >> (i % 40));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
