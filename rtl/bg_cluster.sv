// bg_cluster: background clustering of the inverse-rendering attribute maps.
//
// The full-resolution PA maps (albedo, lighting, normal, depth) arrive one
// pixel per cycle (pix_valid/pix_ready), TILE x TILE pixels of one tile after
// another, tiles in raster order. For each tile the unit
//   1. applies an average filter: every attribute is summed over the tile and
//      divided by TILE^2 (a shift; signed for the normal),
//   2. compares the average with the cluster of the left neighbour tile and
//      then with that of the upper neighbour. A neighbour is similar when
//      albedo, lighting and each normal component differ by at most `thr` and
//      the depth by at most `thr_d`. The tile joins the first similar
//      neighbour's cluster;
//   3. otherwise opens a new cluster whose record is the tile average. When
//      all NCLUST clusters are in use the tile joins its left (else upper,
//      else the first) cluster.
// The tile's cluster ID is written to the index table and new records to the
// cluster table of the PA memory. The decision takes one extra cycle per tile
// (pix_ready low). `done` pulses after the last tile; `nclust` is the number
// of clusters used. A new `start` restarts from cluster 0.
// Merging neighbours by their similarity after an average filter follows the
// processor description; tile size, thresholds, the tile order and the
// left-then-up rule are this design's own.
module bg_cluster
  import prt_pkg::*;
#(
  parameter int IMG_W  = 128,
  parameter int IMG_H  = 128,
  parameter int TILE   = 8,
  parameter int NCLUST = 64,
  parameter int NTILES = (IMG_W / TILE) * (IMG_H / TILE),
  parameter int IDXW   = $clog2(NTILES),
  parameter int CIDW   = $clog2(NCLUST)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [7:0]      thr,
  input  logic [15:0]     thr_d,
  input  logic            pix_valid,
  input  pa_t             pix,
  output logic            pix_ready,
  output logic            idx_we,
  output logic [IDXW-1:0] idx_waddr,
  output logic [CIDW-1:0] idx_wdata,
  output logic            cl_we,
  output logic [CIDW-1:0] cl_waddr,
  output pa_t             cl_wdata,
  output logic            busy,
  output logic            done,
  output logic [CIDW:0]   nclust
);

  localparam int LT  = $clog2(TILE);
  localparam int SH  = 2 * LT;
  localparam int NPT = TILE * TILE;
  localparam int TX  = IMG_W / TILE;
  localparam int TXW = (TX > 1) ? $clog2(TX) : 1;

  typedef enum logic [1:0] {C_IDLE, C_ACC, C_DEC} cstate_e;
  cstate_e cst;

  logic [SH-1:0]          pcnt;
  logic [IDXW-1:0]        tile;
  logic [TXW-1:0]         tx;
  logic                   top_row;
  logic [8+SH-1:0]        s_alb, s_lit;
  logic signed [8+SH-1:0] s_nx, s_ny, s_nz;
  logic [16+SH-1:0]       s_dep;

  pa_t             left_rec;
  logic [CIDW-1:0] left_id;
  pa_t             up_rec [TX];
  logic [CIDW-1:0] up_id  [TX];

  pa_t avg;
  always_comb begin
    avg.albedo   = 8'(s_alb >> SH);
    avg.lighting = 8'(s_lit >> SH);
    avg.nx       = 8'(s_nx >>> SH);
    avg.ny       = 8'(s_ny >>> SH);
    avg.nz       = 8'(s_nz >>> SH);
    avg.depth    = 16'(s_dep >> SH);
  end

  function automatic logic close8u(input logic [7:0] a, input logic [7:0] b, input logic [7:0] t);
    return ((a > b) ? (a - b) : (b - a)) <= t;
  endfunction
  function automatic logic close8s(input logic signed [7:0] a, input logic signed [7:0] b, input logic [7:0] t);
    logic signed [9:0] d;
    d = 10'(a) - 10'(b);
    if (d < 0) d = -d;
    return d <= $signed({2'b00, t});
  endfunction
  function automatic logic similar(input pa_t a, input pa_t b, input logic [7:0] t, input logic [15:0] td);
    return close8u(a.albedo, b.albedo, t) && close8u(a.lighting, b.lighting, t) &&
           close8s(a.nx, b.nx, t) && close8s(a.ny, b.ny, t) && close8s(a.nz, b.nz, t) &&
           (((a.depth > b.depth) ? (a.depth - b.depth) : (b.depth - a.depth)) <= td);
  endfunction

  logic            sim_l, sim_u, full;
  logic [CIDW-1:0] ch_id;
  pa_t             ch_rec;
  logic            ch_new;

  always_comb begin
    sim_l = (tx != 0) && similar(avg, left_rec, thr, thr_d);
    sim_u = !top_row && similar(avg, up_rec[tx], thr, thr_d);
    full  = (nclust == (CIDW+1)'(NCLUST));
    ch_new = 1'b0;
    if (sim_l) begin
      ch_id = left_id;  ch_rec = left_rec;
    end else if (sim_u) begin
      ch_id = up_id[tx]; ch_rec = up_rec[tx];
    end else if (!full) begin
      ch_id = CIDW'(nclust); ch_rec = avg; ch_new = 1'b1;
    end else if (tx != 0) begin
      ch_id = left_id;  ch_rec = left_rec;
    end else if (!top_row) begin
      ch_id = up_id[tx]; ch_rec = up_rec[tx];
    end else begin
      ch_id = '0; ch_rec = avg;
    end
  end

  assign pix_ready = (cst == C_ACC);
  assign busy      = (cst != C_IDLE);
  assign idx_we    = (cst == C_DEC);
  assign idx_waddr = tile;
  assign idx_wdata = ch_id;
  assign cl_we     = (cst == C_DEC) && ch_new;
  assign cl_waddr  = ch_id;
  assign cl_wdata  = avg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cst <= C_IDLE; pcnt <= '0; tile <= '0; tx <= '0; top_row <= 1'b1;
      s_alb <= '0; s_lit <= '0; s_nx <= '0; s_ny <= '0; s_nz <= '0; s_dep <= '0;
      left_rec <= '0; left_id <= '0; done <= 1'b0; nclust <= '0;
      for (int i = 0; i < TX; i++) begin
        up_rec[i] <= '0; up_id[i] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (cst)
        C_IDLE: if (start) begin
          cst <= C_ACC; pcnt <= '0; tile <= '0; tx <= '0; top_row <= 1'b1; nclust <= '0;
          s_alb <= '0; s_lit <= '0; s_nx <= '0; s_ny <= '0; s_nz <= '0; s_dep <= '0;
        end
        C_ACC: if (pix_valid) begin
          s_alb <= s_alb + (8+SH)'(pix.albedo);
          s_lit <= s_lit + (8+SH)'(pix.lighting);
          s_nx  <= s_nx + (8+SH)'(pix.nx);
          s_ny  <= s_ny + (8+SH)'(pix.ny);
          s_nz  <= s_nz + (8+SH)'(pix.nz);
          s_dep <= s_dep + (16+SH)'(pix.depth);
          pcnt  <= pcnt + 1'b1;
          if (pcnt == SH'(NPT - 1)) cst <= C_DEC;
        end
        C_DEC: begin
          if (ch_new) nclust <= nclust + 1'b1;
          left_rec   <= ch_rec;
          left_id    <= ch_id;
          up_rec[tx] <= ch_rec;
          up_id[tx]  <= ch_id;
          s_alb <= '0; s_lit <= '0; s_nx <= '0; s_ny <= '0; s_nz <= '0; s_dep <= '0;
          if (tile == IDXW'(NTILES - 1)) begin
            cst  <= C_IDLE;
            done <= 1'b1;
          end else begin
            cst  <= C_ACC;
            tile <= tile + 1'b1;
            if (tx == TXW'(TX - 1)) begin
              tx      <= '0;
              top_row <= 1'b0;
            end else tx <= tx + 1'b1;
          end
        end
        default: cst <= C_IDLE;
      endcase
    end
  end

endmodule
