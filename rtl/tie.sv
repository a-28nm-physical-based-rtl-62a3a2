// tie: triangle mesh intersection evaluator (ray versus one triangle).
//
// Division-free Moller-Trumbore test in integer arithmetic. With
// e1 = v1-v0, e2 = v2-v0, s = O-v0, p = D x e2 and q = s x e1 it forms
//   det = e1.p,  u = s.p,  v = D.q,  t = e2.q
// and, after flipping all four so that det > 0, reports a hit when
//   u >= 0, v >= 0, u + v <= det and t > 0.
// The hit distance is returned as the fraction t = tnum / tden (tden = |det|),
// so no divider is needed to compare two hits; the geometric normal e1 x e2 is
// returned for shading. Triangles are hit from either side.
// Pipeline: two register stages, one triangle per cycle, results two clocks
// after in_valid. The TIE as a unit of the PE follows the processor
// description; the algorithm and number format are this design's own.
module tie
  import prt_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  vec3_t              org,
  input  vec3_t              dir,
  input  tri_t               tri_in,
  output logic               out_valid,
  output logic               hit,
  output logic signed [63:0] tnum,
  output logic signed [63:0] tden,
  output logic signed [39:0] nrm [3]
);

  typedef logic signed [39:0] w40_t;

  function automatic w40_t ext(input coord_t c);
    return 40'(c);
  endfunction

  // stage 1: edges, p and q
  w40_t e1 [3], e2 [3], sv [3], dv [3], p [3], q [3];
  w40_t e1_q [3], e2_q [3], p_q [3], q_q [3], s_q [3], d_q [3];
  logic v1_q;

  always_comb begin
    e1[0] = ext(tri_in.v1.x) - ext(tri_in.v0.x);
    e1[1] = ext(tri_in.v1.y) - ext(tri_in.v0.y);
    e1[2] = ext(tri_in.v1.z) - ext(tri_in.v0.z);
    e2[0] = ext(tri_in.v2.x) - ext(tri_in.v0.x);
    e2[1] = ext(tri_in.v2.y) - ext(tri_in.v0.y);
    e2[2] = ext(tri_in.v2.z) - ext(tri_in.v0.z);
    sv[0] = ext(org.x) - ext(tri_in.v0.x);
    sv[1] = ext(org.y) - ext(tri_in.v0.y);
    sv[2] = ext(org.z) - ext(tri_in.v0.z);
    dv[0] = ext(dir.x);
    dv[1] = ext(dir.y);
    dv[2] = ext(dir.z);
    p[0] = dv[1] * e2[2] - dv[2] * e2[1];
    p[1] = dv[2] * e2[0] - dv[0] * e2[2];
    p[2] = dv[0] * e2[1] - dv[1] * e2[0];
    q[0] = sv[1] * e1[2] - sv[2] * e1[1];
    q[1] = sv[2] * e1[0] - sv[0] * e1[2];
    q[2] = sv[0] * e1[1] - sv[1] * e1[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1_q <= 1'b0;
      for (int k = 0; k < 3; k++) begin
        e1_q[k] <= '0; e2_q[k] <= '0; p_q[k] <= '0;
        q_q[k]  <= '0; s_q[k]  <= '0; d_q[k] <= '0;
      end
    end else begin
      v1_q <= in_valid;
      if (in_valid) begin
        e1_q <= e1; e2_q <= e2; p_q <= p; q_q <= q; s_q <= sv; d_q <= dv;
      end
    end
  end

  // stage 2: determinant, barycentrics, distance, normal
  function automatic logic signed [63:0] dot(input w40_t x [3], input w40_t y [3]);
    return 64'(x[0]) * 64'(y[0]) + 64'(x[1]) * 64'(y[1]) + 64'(x[2]) * 64'(y[2]);
  endfunction

  logic signed [63:0] det_c, u_c, v_c, t_c;
  logic               hit_c;
  w40_t               n_c [3];

  always_comb begin
    det_c = dot(e1_q, p_q);
    u_c   = dot(s_q, p_q);
    v_c   = dot(d_q, q_q);
    t_c   = dot(e2_q, q_q);
    if (det_c < 0) begin
      det_c = -det_c; u_c = -u_c; v_c = -v_c; t_c = -t_c;
    end
    hit_c = (det_c != 0) && (u_c >= 0) && (v_c >= 0) && (u_c + v_c <= det_c) && (t_c > 0);
    n_c[0] = e1_q[1] * e2_q[2] - e1_q[2] * e2_q[1];
    n_c[1] = e1_q[2] * e2_q[0] - e1_q[0] * e2_q[2];
    n_c[2] = e1_q[0] * e2_q[1] - e1_q[1] * e2_q[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      hit       <= 1'b0;
      tnum      <= '0;
      tden      <= '0;
      for (int k = 0; k < 3; k++) nrm[k] <= '0;
    end else begin
      out_valid <= v1_q;
      if (v1_q) begin
        hit  <= hit_c;
        tnum <= t_c;
        tden <= det_c;
        nrm  <= n_c;
      end
    end
  end

endmodule
