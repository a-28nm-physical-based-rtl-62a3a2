// tb_tie: self-checking test of the triangle intersection evaluator.
// Random triangles are placed in front of random rays; a real-valued
// Moller-Trumbore reference (with the usual division by the determinant)
// gives the expected hit and distance t. Hits must agree and tnum/tden must
// equal t. Cases within a small margin of an edge are not counted. The normal
// is compared with e1 x e2 and the two-clock latency is checked.
module tb_tie;
  import prt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, out_valid, hit;
  vec3_t org, dir;
  tri_t tri_in;
  logic signed [63:0] tnum, tden;
  logic signed [39:0] nrm [3];
  int checks = 0, failures = 0, hits = 0;

  tie dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void xprod(input real a[3], input real b[3], output real c[3]);
    c[0] = a[1]*b[2] - a[2]*b[1];
    c[1] = a[2]*b[0] - a[0]*b[2];
    c[2] = a[0]*b[1] - a[1]*b[0];
  endfunction
  function automatic real dot(input real a[3], input real b[3]);
    return a[0]*b[0] + a[1]*b[1] + a[2]*b[2];
  endfunction

  initial begin
    int o[3], d[3], v0[3], v1[3], v2[3];
    real e1[3], e2[3], s[3], p[3], q[3], dr[3], n[3];
    real det, u, v, t, margin;
    logic exp;
    in_valid = 0; org = '0; dir = '0; tri_in = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      for (int k = 0; k < 3; k++) begin
        o[k]  = int'($urandom_range(0, 200)) - 100;
        d[k]  = int'($urandom_range(0, 200)) - 100;
        v0[k] = int'($urandom_range(0, 2000)) - 1000;
        v1[k] = v0[k] + int'($urandom_range(0, 600)) - 300;
        v2[k] = v0[k] + int'($urandom_range(0, 600)) - 300;
      end
      // aim half of the rays at the triangle's centroid
      if (i % 2 == 0)
        for (int k = 0; k < 3; k++) d[k] = (v0[k] + v1[k] + v2[k]) / 3 - o[k] + int'($urandom_range(0, 60)) - 30;
      for (int k = 0; k < 3; k++) begin
        e1[k] = real'(v1[k] - v0[k]); e2[k] = real'(v2[k] - v0[k]);
        s[k] = real'(o[k] - v0[k]); dr[k] = real'(d[k]);
      end
      xprod(dr, e2, p); xprod(s, e1, q); xprod(e1, e2, n);
      det = dot(e1, p);
      exp = 0; margin = 0; t = 0;
      if (det != 0) begin
        u = dot(s, p) / det; v = dot(dr, q) / det; t = dot(e2, q) / det;
        exp = (u >= 0) && (v >= 0) && (u + v <= 1) && (t > 0);
        margin = u < 0 ? -u : u;
        if ((v < 0 ? -v : v) < margin) margin = v < 0 ? -v : v;
        if (((1-u-v) < 0 ? (u+v-1) : (1-u-v)) < margin) margin = (1-u-v) < 0 ? (u+v-1) : (1-u-v);
        if ((t < 0 ? -t : t) < margin) margin = t < 0 ? -t : t;
      end
      @(negedge clk);
      org.x = coord_t'(o[0]); org.y = coord_t'(o[1]); org.z = coord_t'(o[2]);
      dir.x = coord_t'(d[0]); dir.y = coord_t'(d[1]); dir.z = coord_t'(d[2]);
      tri_in.v0.x = coord_t'(v0[0]); tri_in.v0.y = coord_t'(v0[1]); tri_in.v0.z = coord_t'(v0[2]);
      tri_in.v1.x = coord_t'(v1[0]); tri_in.v1.y = coord_t'(v1[1]); tri_in.v1.z = coord_t'(v1[2]);
      tri_in.v2.x = coord_t'(v2[0]); tri_in.v2.y = coord_t'(v2[1]); tri_in.v2.z = coord_t'(v2[2]);
      in_valid = 1;
      @(posedge clk); #1; in_valid = 0;
      checks++; if (out_valid) failures++;          // not yet: latency 2
      @(posedge clk); #1;
      checks++; if (!out_valid) failures++;
      if (margin > 1.0e-6) begin
        checks++;
        if (hit !== exp) begin failures++; $display("i=%0d hit=%0b exp=%0b", i, hit, exp); end
        if (hit && exp) begin
          hits++;
          checks++;
          if ((real'(tnum) / real'(tden) - t) > 1.0e-9 * (t + 1) || (t - real'(tnum) / real'(tden)) > 1.0e-9 * (t + 1)) begin
            failures++; $display("t mismatch %f vs %f", real'(tnum) / real'(tden), t);
          end
        end
      end
      checks++;
      if (real'(nrm[0]) != n[0] || real'(nrm[1]) != n[1] || real'(nrm[2]) != n[2]) begin
        failures++; $display("normal mismatch");
      end
    end
    checks++;
    if (hits < 50) begin failures++; $display("too few hits %0d", hits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
