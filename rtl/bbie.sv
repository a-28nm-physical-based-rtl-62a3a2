// bbie: BBOX intersection evaluator (ray versus axis-aligned box, slab method).
//
// For each axis k the ray O + t*D meets the two box planes at
//   t = (bmin_k - O_k) * inv_k  and  t = (bmax_k - O_k) * inv_k,
// where inv_k = 2^FRAC / D_k is supplied by the caller, so the t values carry
// FRAC fractional bits. The entry distance tmin is the largest of the three
// near values and the exit distance tmax the smallest of the far values; the
// ray hits when tmax >= tmin and tmax >= 0 (the box is not behind the origin).
// One test is accepted every cycle; results appear one clock later with
// out_valid. The BBIE as a unit of the PE follows the processor description;
// the slab method and the number format are this design's own.
module bbie
  import prt_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  vec3_t              org,
  input  logic signed [31:0] inv [3],
  input  vec3_t              bmin,
  input  vec3_t              bmax,
  output logic               out_valid,
  output logic               hit,
  output logic signed [63:0] tmin,
  output logic signed [63:0] tmax
);

  logic signed [63:0] tn [3];
  logic signed [63:0] tf [3];
  logic signed [63:0] tmin_c, tmax_c;

  always_comb begin
    coord_t o [3];
    coord_t lo [3];
    coord_t hi [3];
    logic signed [63:0] t1, t2;
    o[0] = org.x;   o[1] = org.y;   o[2] = org.z;
    lo[0] = bmin.x; lo[1] = bmin.y; lo[2] = bmin.z;
    hi[0] = bmax.x; hi[1] = bmax.y; hi[2] = bmax.z;
    for (int k = 0; k < 3; k++) begin
      t1 = 64'(64'(signed'({lo[k][CW-1], lo[k]}) - signed'({o[k][CW-1], o[k]})) * 64'(inv[k]));
      t2 = 64'(64'(signed'({hi[k][CW-1], hi[k]}) - signed'({o[k][CW-1], o[k]})) * 64'(inv[k]));
      tn[k] = (t1 < t2) ? t1 : t2;
      tf[k] = (t1 < t2) ? t2 : t1;
    end
    tmin_c = tn[0];
    tmax_c = tf[0];
    for (int k = 1; k < 3; k++) begin
      if (tn[k] > tmin_c) tmin_c = tn[k];
      if (tf[k] < tmax_c) tmax_c = tf[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      hit       <= 1'b0;
      tmin      <= '0;
      tmax      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        hit  <= (tmax_c >= tmin_c) && (tmax_c >= 0);
        tmin <= tmin_c;
        tmax <= tmax_c;
      end
    end
  end

endmodule
