// tb_ppcd: self-checking test of the per-pixel compression decoder together
// with the PA memory. The index and cluster tables are filled with random
// contents; then a request is issued every cycle and each response, two
// clocks later, must carry the request's tag and the record of the cluster
// that the tile maps to.
module tb_ppcd;
  import prt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic idx_we, cl_we, req_valid, resp_valid;
  logic [7:0] idx_waddr, idx_raddr, req_idx;
  logic [5:0] idx_wdata, idx_rdata, cl_waddr, cl_raddr, req_tag, resp_tag;
  pa_t cl_wdata, cl_rdata, resp_pa;
  logic [5:0] itab [256];
  pa_t ctab [64];
  int checks = 0, failures = 0;
  logic [7:0] q_idx [$];
  logic [5:0] q_tag [$];

  pamem #(.NTILES(256), .NCLUST(64)) u_mem (.*);
  ppcd #(.IDXW(8), .CIDW(6), .TAGW(6)) dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (resp_valid) begin
      logic [7:0] ix; logic [5:0] tg;
      ix = q_idx.pop_front(); tg = q_tag.pop_front();
      checks++;
      if (resp_tag !== tg || resp_pa !== ctab[itab[ix]]) begin failures++; $display("tile %0d", ix); end
    end
    if (req_valid) begin q_idx.push_back(req_idx); q_tag.push_back(req_tag); end
  end

  initial begin
    idx_we = 0; cl_we = 0; req_valid = 0; req_idx = 0; req_tag = 0;
    idx_waddr = 0; idx_wdata = 0; cl_waddr = 0; cl_wdata = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); cl_we = 1; cl_waddr = 6'(i); cl_wdata = pa_t'({$urandom, $urandom});
      ctab[i] = cl_wdata;
    end
    @(negedge clk); cl_we = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); idx_we = 1; idx_waddr = 8'(i); idx_wdata = 6'($urandom);
      itab[i] = idx_wdata;
    end
    @(negedge clk); idx_we = 0;
    for (int i = 0; i < 500; i++) begin
      req_valid = (i % 5 != 4); req_idx = 8'($urandom); req_tag = 6'($urandom);
      @(negedge clk);
    end
    req_valid = 0;
    repeat (4) @(negedge clk);
    checks++; if (q_idx.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
