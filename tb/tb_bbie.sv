// tb_bbie: self-checking test of the BBOX intersection evaluator.
// Random rays and boxes are tested; the expected hit is computed with real
// arithmetic from the ray direction itself (t = (b - o) / d), independent of
// the fixed-point reciprocal. Cases within a small margin of grazing the box
// are not counted. A few hand-made cases (box behind the origin, ray along an
// axis) are checked too, as is the one-clock latency.
module tb_bbie;
  import prt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, out_valid, hit;
  vec3_t org, bmin, bmax;
  logic signed [31:0] inv [3];
  logic signed [63:0] tmin, tmax;
  int checks = 0, failures = 0, hits = 0;

  bbie dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [31:0] recip(input int d);
    if (d == 0) return 32'sh7FFF_FFFF;
    return (d > 0) ? 32'((64'd1 << FRAC) / longint'(d)) : -32'((64'd1 << FRAC) / longint'(-d));
  endfunction

  task automatic one(input int o[3], input int d[3], input int lo[3], input int hi[3],
                     input logic force_chk, input logic exp_force);
    real tn, tf, t1, t2, margin;
    logic exp;
    tn = -1.0e30; tf = 1.0e30; margin = 1.0e30;
    for (int k = 0; k < 3; k++) begin
      if (d[k] == 0) begin
        if (o[k] < lo[k] || o[k] > hi[k]) tf = -1.0e30;
      end else begin
        t1 = real'(lo[k] - o[k]) / real'(d[k]);
        t2 = real'(hi[k] - o[k]) / real'(d[k]);
        if (t1 > t2) begin real tt = t1; t1 = t2; t2 = tt; end
        if (t1 > tn) tn = t1;
        if (t2 < tf) tf = t2;
      end
    end
    exp = (tf >= tn) && (tf >= 0.0);
    margin = (tf - tn < 0 ? tn - tf : tf - tn);
    if (tf < 0 && -tf < margin) margin = -tf;
    if (tf >= 0 && tf < margin) margin = tf;
    @(negedge clk);
    org.x = coord_t'(o[0]); org.y = coord_t'(o[1]); org.z = coord_t'(o[2]);
    bmin.x = coord_t'(lo[0]); bmin.y = coord_t'(lo[1]); bmin.z = coord_t'(lo[2]);
    bmax.x = coord_t'(hi[0]); bmax.y = coord_t'(hi[1]); bmax.z = coord_t'(hi[2]);
    for (int k = 0; k < 3; k++) inv[k] = recip(d[k]);
    in_valid = 1;
    @(posedge clk); #1;
    in_valid = 0;
    checks++;
    if (!out_valid) failures++;
    if (force_chk) begin
      checks++;
      if (hit !== exp_force) begin failures++; $display("fixed case hit=%0b exp=%0b", hit, exp_force); end
    end else if (margin > 0.05) begin
      checks++;
      if (hit) hits++;
      if (hit !== exp) begin failures++; $display("rand case hit=%0b exp=%0b tn=%f tf=%f dut %0d %0d o=%p d=%p lo=%p hi=%p", hit, exp, tn, tf, tmin, tmax, o, d, lo, hi); end
    end
    @(posedge clk); #1;
    checks++;
    if (out_valid) failures++;
  endtask

  initial begin
    int o[3], d[3], lo[3], hi[3];
    in_valid = 0; org = '0; bmin = '0; bmax = '0;
    for (int k = 0; k < 3; k++) inv[k] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    // straight on
    one('{0,0,0}, '{0,0,10}, '{-5,-5,50}, '{5,5,60}, 1, 1);
    // box behind the origin
    one('{0,0,100}, '{0,0,10}, '{-5,-5,50}, '{5,5,60}, 1, 0);
    // origin inside the box
    one('{0,0,55}, '{1,2,3}, '{-5,-5,50}, '{5,5,60}, 1, 1);
    // miss sideways
    one('{20,0,0}, '{0,0,10}, '{-5,-5,50}, '{5,5,60}, 1, 0);
    for (int i = 0; i < 2000; i++) begin
      for (int k = 0; k < 3; k++) begin
        o[k]  = int'($urandom_range(0, 400)) - 200;
        d[k]  = int'($urandom_range(0, 400)) - 200;
        lo[k] = int'($urandom_range(0, 400)) - 200;
        hi[k] = lo[k] + int'($urandom_range(1, 150));
      end
      one(o, d, lo, hi, 0, 0);
    end
    checks++;
    if (hits < 20) begin failures++; $display("too few hits %0d", hits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
