// prt_ref_pkg: reference model of the renderer for the testbenches.
//
// Holds a small test scene (boxes, triangles, camera, light) and computes the
// expected colour of a pixel from its background attributes. Intersections,
// normals and the Lambert term are worked out in real arithmetic; only the
// background point (depth along the ray, floored as specified for the
// hardware) and the final integer colour formulas are integer. A pixel whose
// outcome depends on a test that passes within a tiny margin is flagged as
// ambiguous and object pixels get a tolerance of a few codes, because the
// hardware rounds square roots and reciprocals.
package prt_ref_pkg;
  import prt_pkg::*;

  typedef struct {
    int  kind;             // 0 EBBOX, 1 TBBOX
    int  lo[3];
    int  hi[3];
    int  tri_base;
    int  tri_cnt;
    int  albedo;
  } rbox_t;

  typedef struct {
    int v[3][3];
  } rtri_t;

  rbox_t boxes[$];
  rtri_t tris[$];
  int cam_o[3] = '{0, 0, 0};
  int cam_cx = 32, cam_cy = 32, cam_f = 64;
  int light[3] = '{4000, 0, -8000};

  // scene used by the testbenches for a square image of `side` pixels; the
  // focal length equals the side, so the field of view stays the same
  function automatic void build_scene(input int side);
    rtri_t t;
    rbox_t b;
    boxes.delete(); tris.delete();
    cam_cx = side / 2; cam_cy = side / 2; cam_f = side;
    // OBJMEM layout: boxes at 0..2, triangles from address 16
    // tilted quad (two triangles) in a target box
    t.v = '{'{-150, -60, 280}, '{-30, -60, 320}, '{-30, 60, 320}};   tris.push_back(t);
    t.v = '{'{-150, -60, 280}, '{-30, 60, 320}, '{-150, 60, 280}};   tris.push_back(t);
    // triangle hidden behind the background
    t.v = '{'{-400, -400, 2000}, '{400, -400, 2000}, '{0, 400, 2000}}; tris.push_back(t);
    b.kind = 1; b.lo = '{-152, -62, 278}; b.hi = '{-28, 62, 322}; b.tri_base = 16; b.tri_cnt = 2; b.albedo = 230;
    boxes.push_back(b);
    b.kind = 0; b.lo = '{250, -50, 500}; b.hi = '{450, 50, 600}; b.tri_base = 0; b.tri_cnt = 0; b.albedo = 0;
    boxes.push_back(b);
    b.kind = 1; b.lo = '{-402, -402, 1998}; b.hi = '{402, 402, 2002}; b.tri_base = 18; b.tri_cnt = 1; b.albedo = 90;
    boxes.push_back(b);
  endfunction

  function automatic logic [OBJ_DW-1:0] box_word(input int i);
    bbox_t r;
    r.kind = boxes[i].kind ? BB_TARGET : BB_EMPTY;
    r.bmin.x = coord_t'(boxes[i].lo[0]); r.bmin.y = coord_t'(boxes[i].lo[1]); r.bmin.z = coord_t'(boxes[i].lo[2]);
    r.bmax.x = coord_t'(boxes[i].hi[0]); r.bmax.y = coord_t'(boxes[i].hi[1]); r.bmax.z = coord_t'(boxes[i].hi[2]);
    r.tri_base = 8'(boxes[i].tri_base);
    r.tri_cnt  = 8'(boxes[i].tri_cnt);
    r.albedo   = 8'(boxes[i].albedo);
    return bbox2word(r);
  endfunction

  function automatic logic [OBJ_DW-1:0] tri_word(input int i);
    tri_t r;
    r.v0.x = coord_t'(tris[i].v[0][0]); r.v0.y = coord_t'(tris[i].v[0][1]); r.v0.z = coord_t'(tris[i].v[0][2]);
    r.v1.x = coord_t'(tris[i].v[1][0]); r.v1.y = coord_t'(tris[i].v[1][1]); r.v1.z = coord_t'(tris[i].v[1][2]);
    r.v2.x = coord_t'(tris[i].v[2][0]); r.v2.y = coord_t'(tris[i].v[2][1]); r.v2.z = coord_t'(tris[i].v[2][2]);
    return OBJ_DW'(r);
  endfunction

  // background attributes used for pixel (x, y) of the test image
  function automatic pa_t bg_pa(input int x, input int y);
    pa_t p;
    p.albedo   = 8'(100 + (x * 3) % 100);
    p.lighting = 8'(200 - y);
    p.nx = 0; p.ny = 0; p.nz = -8'sd127;
    p.depth = 16'(900 + x + y);
    return p;
  endfunction

  // clustered background of the full-chip tests: four quadrants, each with
  // constant attributes, so the clustered map equals the original one
  function automatic pa_t quad_pa(input int x, input int y, input int side);
    pa_t p;
    int r;
    r = (x < side / 2 ? 0 : 1) + (y < side / 2 ? 0 : 2);
    p.albedo   = 8'(120 + 40 * r);
    p.lighting = 8'(230 - 30 * r);
    p.nx = 8'(10 * r); p.ny = 0; p.nz = -8'sd120;
    p.depth = 16'(900 + 60 * r);
    return p;
  endfunction

  function automatic real rabs(input real a);
    return a < 0 ? -a : a;
  endfunction

  // real slab test; margin = distance of the decision from flipping
  function automatic logic slab(input real o[3], input real d[3], input int lo[3], input int hi[3],
                                output real margin);
    real tn, tf, t1, t2, tt;
    tn = -1.0e30; tf = 1.0e30;
    for (int k = 0; k < 3; k++) begin
      if (d[k] == 0.0) begin
        if (o[k] < lo[k] || o[k] > hi[k]) tf = -1.0e30;
      end else begin
        t1 = (lo[k] - o[k]) / d[k];
        t2 = (hi[k] - o[k]) / d[k];
        if (t1 > t2) begin tt = t1; t1 = t2; t2 = tt; end
        if (t1 > tn) tn = t1;
        if (t2 < tf) tf = t2;
      end
    end
    margin = rabs(tf - tn);
    if (rabs(tf) < margin) margin = rabs(tf);
    // a ray running inside a face plane grazes the box
    for (int k = 0; k < 3; k++)
      if (d[k] == 0.0 && (o[k] == lo[k] || o[k] == hi[k])) margin = 0.0;
    return (tf >= tn) && (tf >= 0.0);
  endfunction

  // expected colour; obj = pixel shows an object; amb = outcome uncertain
  function automatic int ref_pixel(input int x, input int y, input pa_t pa,
                                   output logic obj, output logic amb);
    real o[3], d[3], best, m, e1[3], e2[3], s[3], p[3], q[3], n[3], det, u, v, t, nl, cosv;
    int  d_i[3];
    int  al, lit, cq, col, alb;
    logic shadow;
    longint tbg, pb[3];
    amb = 0; obj = 0;
    d_i = '{x - cam_cx, y - cam_cy, cam_f};
    for (int k = 0; k < 3; k++) begin o[k] = cam_o[k]; d[k] = d_i[k]; end
    best = real'(pa.depth) / real'(cam_f);
    alb = 0;
    foreach (boxes[b]) begin
      if (boxes[b].kind == 1 && slab(o, d, boxes[b].lo, boxes[b].hi, m)) begin
        for (int i = boxes[b].tri_base - 16; i < boxes[b].tri_base - 16 + boxes[b].tri_cnt; i++) begin
          for (int k = 0; k < 3; k++) begin
            e1[k] = tris[i].v[1][k] - tris[i].v[0][k];
            e2[k] = tris[i].v[2][k] - tris[i].v[0][k];
            s[k]  = o[k] - tris[i].v[0][k];
          end
          p[0] = d[1]*e2[2] - d[2]*e2[1]; p[1] = d[2]*e2[0] - d[0]*e2[2]; p[2] = d[0]*e2[1] - d[1]*e2[0];
          q[0] = s[1]*e1[2] - s[2]*e1[1]; q[1] = s[2]*e1[0] - s[0]*e1[2]; q[2] = s[0]*e1[1] - s[1]*e1[0];
          det = e1[0]*p[0] + e1[1]*p[1] + e1[2]*p[2];
          if (det == 0.0) continue;
          u = (s[0]*p[0] + s[1]*p[1] + s[2]*p[2]) / det;
          v = (d[0]*q[0] + d[1]*q[1] + d[2]*q[2]) / det;
          t = (e2[0]*q[0] + e2[1]*q[1] + e2[2]*q[2]) / det;
          if (rabs(u) < 1e-9 || rabs(v) < 1e-9 || rabs(1 - u - v) < 1e-9) amb = 1;
          if (u >= 0 && v >= 0 && u + v <= 1 && t > 0) begin
            if (rabs(t - best) < 1e-9 * best) amb = 1;
            if (t < best) begin
              best = t; obj = 1; alb = boxes[b].albedo;
              n[0] = e1[1]*e2[2] - e1[2]*e2[1]; n[1] = e1[2]*e2[0] - e1[0]*e2[2]; n[2] = e1[0]*e2[1] - e1[1]*e2[0];
              if (n[0]*d[0] + n[1]*d[1] + n[2]*d[2] > 0) for (int k = 0; k < 3; k++) n[k] = -n[k];
            end
          end
        end
      end
    end
    lit = pa.lighting;
    if (obj) begin
      nl = n[0]*light[0] + n[1]*light[1] + n[2]*light[2];
      cosv = nl <= 0 ? 0.0 : nl / ($sqrt(n[0]*n[0] + n[1]*n[1] + n[2]*n[2]) *
                                   $sqrt(real'(light[0])*light[0] + real'(light[1])*light[1] + real'(light[2])*light[2]));
      cq = int'($floor(256.0 * cosv));
      if (cq > 255) cq = 255;
      al = alb * lit;
      col = (al >> 11) + ((al * cq) >> 16);
      if (col > 255) col = 255;
      return col;
    end
    // background point as the hardware forms it, then the shadow ray
    tbg = longint'(pa.depth) * longint'((64'd1 << FRAC) / longint'(cam_f));
    for (int k = 0; k < 3; k++) pb[k] = cam_o[k] + ((longint'(d_i[k]) * tbg) >>> FRAC);
    for (int k = 0; k < 3; k++) begin o[k] = pb[k]; d[k] = light[k]; end
    shadow = 0;
    foreach (boxes[b]) begin
      if (slab(o, d, boxes[b].lo, boxes[b].hi, m)) shadow = 1;
      if (m * $sqrt(d[0]*d[0] + d[1]*d[1] + d[2]*d[2]) < 0.5) amb = 1;   // within half a unit
    end
    al = pa.albedo * lit;
    return shadow ? (al >> 9) : (al >> 8);
  endfunction

endpackage
