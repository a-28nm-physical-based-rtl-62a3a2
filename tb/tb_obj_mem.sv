// tb_obj_mem: self-checking test of the local object memory.
// Fills every entry with a random word, reads all back (one-clock read
// latency) and checks a write/read to the same address in one cycle returns
// the old word.
module tb_obj_mem;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we;
  logic [7:0] waddr, raddr;
  logic [143:0] wdata, rdata;
  logic [143:0] model [256];
  int checks = 0, failures = 0;

  obj_mem #(.DEPTH(256), .DW(144)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      we = 1; waddr = 8'(i);
      wdata = {16'($urandom), $urandom, $urandom, $urandom, $urandom};
      model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 255; i >= 0; i--) begin
      @(negedge clk); raddr = 8'(i);
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[i]) begin failures++; $display("addr %0d", i); end
    end
    @(negedge clk);
    we = 1; waddr = 8'd9; raddr = 8'd9; wdata = '1;
    @(posedge clk); #1; we = 0;
    checks++; if (rdata !== model[9]) failures++;
    @(posedge clk); #1;
    checks++; if (rdata !== '1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
