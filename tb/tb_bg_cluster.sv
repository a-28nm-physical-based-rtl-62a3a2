// tb_bg_cluster: self-checking test of the background clustering unit.
// Run 1: a 32 x 32 map (4 x 4 tiles of 8 x 8) made of four regions with very
// different attributes plus small per-pixel noise that the average filter
// removes. Every tile must map to a cluster whose record is within the noise
// of its region's value, tiles of one region must share one cluster, and
// exactly four clusters must be opened.
// Run 2: with NCLUST = 4 entries used up, a map of 16 all-different tiles must
// still give every tile a valid ID and stop at 4 clusters.
// Run 1 also checks the cycle count: TILE*TILE + 1 cycles per tile.
module tb_bg_cluster;
  import prt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, pix_valid, pix_ready, idx_we, cl_we, busy, done;
  logic [7:0] thr;
  logic [15:0] thr_d;
  pa_t pix, cl_wdata;
  logic [3:0] idx_waddr;
  logic [1:0] idx_wdata, cl_waddr;
  logic [2:0] nclust;
  logic [1:0] itab [16];
  pa_t ctab [4];
  int checks = 0, failures = 0;

  bg_cluster #(.IMG_W(32), .IMG_H(32), .TILE(8), .NCLUST(4)) dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (idx_we) itab[idx_waddr] <= idx_wdata;
    if (cl_we) ctab[cl_waddr] <= cl_wdata;
  end

  function automatic pa_t region_val(input int r);
    pa_t p;
    p.albedo = 8'(40 + 50 * r); p.lighting = 8'(200 - 40 * r);
    p.nx = 8'(r * 20 - 30); p.ny = 8'(10 * r); p.nz = -8'sd100;
    p.depth = 16'(1000 + 300 * r);
    return p;
  endfunction

  function automatic int region_of(input int tx, input int ty);
    return (tx < 2 ? 0 : 1) + (ty < 2 ? 0 : 2);
  endfunction

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cyc, id0[4];
    pa_t v;
    start = 0; pix_valid = 0; pix = '0; thr = 8'd6; thr_d = 16'd20;
    repeat (2) @(negedge clk); rst_n = 1;
    // run 1
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 0;
    fork
      begin
        while (busy) begin @(negedge clk); cyc++; end
      end
    join_none
    for (int t = 0; t < 16; t++) begin
      for (int p = 0; p < 64; p++) begin
        while (!pix_ready) @(negedge clk);
        v = region_val(region_of(t % 4, t / 4));
        // noise of +1/-1 alternating averages to zero
        v.albedo = v.albedo + ((p % 2) ? 8'd1 : -8'd1);
        v.depth  = v.depth + ((p % 2) ? 16'd3 : -16'd3);
        pix_valid = 1; pix = v;
        @(negedge clk);
      end
      pix_valid = 0;
    end
    pix_valid = 0;
    while (busy) @(negedge clk);
    @(negedge clk);
    checks++;
    if (nclust !== 3'd4) begin failures++; $display("nclust %0d", nclust); end
    checks++;
    if (cyc != 16 * 65) begin failures++; $display("cycles %0d", cyc); end
    for (int r = 0; r < 4; r++) id0[r] = -1;
    for (int t = 0; t < 16; t++) begin
      int r;
      r = region_of(t % 4, t / 4);
      if (id0[r] < 0) id0[r] = itab[t];
      checks++;
      if (int'(itab[t]) != id0[r]) begin failures++; $display("tile %0d id %0d region id %0d", t, itab[t], id0[r]); end
      checks++;
      if (ctab[itab[t]] !== region_val(r)) begin failures++; $display("tile %0d record differs", t); end
    end
    // run 2: sixteen different tiles, table of four fills up
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int t = 0; t < 16; t++) begin
      for (int p = 0; p < 64; p++) begin
        while (!pix_ready) @(negedge clk);
        pix_valid = 1; pix = region_val(t % 4); pix.depth = 16'(t * 500);
        @(negedge clk);
      end
      pix_valid = 0;
    end
    while (busy) @(negedge clk);
    checks++;
    if (nclust !== 3'd4) begin failures++; $display("run2 nclust %0d", nclust); end
    for (int t = 0; t < 16; t++) begin
      checks++;
      if (itab[t] > 2'd3) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
