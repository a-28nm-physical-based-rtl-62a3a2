// tb_gmac: self-checking test of the global memory access controller with 2
// requesting model PEs (so the token returns to a PE while its answer is
// still on the way) and a two-cycle model memory. Checks: only the
// token-selected PE is issued, a PE is never issued twice for one request,
// each PE receives exactly the record for its own task ID, the conflict flag
// is seen, and no request starves.
module tb_gmac;
  import prt_pkg::*;
  localparam int N = 2, TIDW = 8, SW = 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [SW-1:0] sel, rq_pe, rs_pe;
  logic [N-1:0] sel_oh, pa_req, pa_valid;
  logic [TIDW-1:0] pa_req_id [N];
  pa_t pa_data, rs_data;
  logic rq_valid, rs_valid, conflict;
  logic [TIDW-1:0] rq_id;
  logic v1, v2; logic [SW-1:0] p1, p2; logic [TIDW-1:0] i1, i2;
  int checks = 0, failures = 0, nconf = 0, served = 0;

  rttc #(.N(N)) u_tok (.clk, .rst_n, .en(1'b1), .sel, .sel_oh);
  gmac #(.N(N), .TIDW(TIDW)) dut (.*);

  function automatic pa_t rec(input logic [TIDW-1:0] id);
    pa_t p; p = '0; p.albedo = id; p.depth = 16'(id) * 16'd3; return p;
  endfunction

  // two-stage memory model
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin v1 <= 0; v2 <= 0; p1 <= 0; p2 <= 0; i1 <= 0; i2 <= 0; end
    else begin v1 <= rq_valid; p1 <= rq_pe; i1 <= rq_id; v2 <= v1; p2 <= p1; i2 <= i1; end
  end
  assign rs_valid = v2; assign rs_pe = p2; assign rs_data = rec(i2);

  // model PEs: request, wait for the answer, pause, request again
  int wait_cyc [N];
  logic [N-1:0] outstanding;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pa_req <= '1; outstanding <= '0;
      for (int i = 0; i < N; i++) begin pa_req_id[i] <= TIDW'(i * 10); wait_cyc[i] <= 0; end
    end else begin
      if (rq_valid && rq_pe != sel) failures++;
      if (rq_valid) begin
        checks++;
        if (outstanding[rq_pe]) begin failures++; $display("PE %0d issued twice", rq_pe); end
        outstanding[rq_pe] <= 1'b1;
      end
      if (rs_valid) outstanding[rs_pe] <= 1'b0;
      if (conflict) nconf++;
      for (int i = 0; i < N; i++) begin
        if (pa_req[i]) wait_cyc[i] <= wait_cyc[i] + 1;
        if (wait_cyc[i] > 3 * N + 4) begin failures++; wait_cyc[i] <= 0; $display("PE %0d starves", i); end
        if (pa_valid[i]) begin
          checks++; served++;
          if (!pa_req[i] || pa_data !== rec(pa_req_id[i])) failures++;
          pa_req[i] <= 0; wait_cyc[i] <= 0;
        end else if (!pa_req[i] && $urandom_range(0, 3) == 0) begin
          pa_req[i] <= 1; pa_req_id[i] <= TIDW'($urandom);
        end
      end
    end
  end

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (2000) @(negedge clk);
    checks++; if (nconf == 0) failures++;
    checks++; if (served < 100) failures++;
    $display("served=%0d conflicts=%0d", served, nconf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
