// tb_div64: self-checking test of the iterative 64-bit divider.
// Random and corner-case operands are divided and the quotient and remainder
// compared with the simulator's own / and %; the done pulse must come exactly
// W+1 = 65 clocks after start.
module tb_div64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done;
  logic [63:0] dividend, divisor, quo, rem;
  int checks = 0, failures = 0;

  div64 #(.W(64)) dut (.*);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [63:0] n, input logic [63:0] d);
    int cyc;
    @(negedge clk);
    dividend = n; divisor = d; start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (d != 0 && (quo !== n / d || rem !== n % d)) begin
      failures++;
      $display("div %h / %h got q=%h r=%h", n, d, quo, rem);
    end
    if (d == 0 && quo !== '1) failures++;
    checks++;
    if (cyc != 65) begin failures++; $display("latency %0d", cyc); end
  endtask

  initial begin
    start = 0; dividend = 0; divisor = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    run(64'd100, 64'd7);
    run(64'd1 << 24, 64'd3);
    run('1, 64'd1);
    run('1, '1);
    run(64'd5, 64'd9);
    run(64'd5, 64'd0);
    for (int i = 0; i < 40; i++) run({$urandom, $urandom}, (i % 2) ? 64'($urandom) : {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
