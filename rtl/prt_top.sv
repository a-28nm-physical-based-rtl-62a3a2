// prt_top: ray-tracing rendering processor for augmented reality.
//
// Data flow of one frame:
//   1. Background: the inverse-rendering maps of the camera image (albedo,
//      lighting, normal, depth; produced by a CNN run on the PE array in IR
//      mode) are streamed into bg_cluster, which compresses them into a few
//      clusters and fills the PA memory (pamem).
//   2. Scene: the virtual objects, as BBOX records and triangles, are
//      broadcast into the OBJMEM of every PE; camera and light are set on the
//      configuration ports.
//   3. Rendering (RT mode): after `start` the global scheduler (grts) hands
//      one pixel per task to whichever PE the RT token checker (rttc) selects
//      and is idle. PEs fetch their pixel's background attributes through the
//      global memory access controller (gmac), which serves only the
//      token-selected PE, via the unified address converter (uac) and the
//      per-pixel compression decoder (ppcd). Each PE then traces its pixel on
//      its own and returns a colour, which leaves on px_valid/px_id/px_color
//      in completion order. frame_done pulses after the last pixel.
//   IR mode: the 48 PEs act as stationary MACs with a broadcast operand
//   (ir_* ports); the token checker is stopped.
// Timing: all ports are synchronous to clk, reset is active-low and
// asynchronous. The block structure follows the processor description; image
// size, tile size, cluster count and OBJMEM size are this design's own
// defaults.
module prt_top
  import prt_pkg::*;
#(
  parameter int ROWS   = 8,
  parameter int COLS   = 6,
  parameter int IMG_W  = 128,
  parameter int IMG_H  = 128,
  parameter int TILE   = 8,
  parameter int NCLUST = 64,
  parameter int N      = ROWS * COLS,
  parameter int SW     = (N > 1) ? $clog2(N) : 1,
  parameter int TIDW   = $clog2(IMG_W * IMG_H),
  parameter int NTILES = (IMG_W / TILE) * (IMG_H / TILE),
  parameter int IDXW   = $clog2(NTILES),
  parameter int CIDW   = $clog2(NCLUST)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  mode_e             mode,
  // scene configuration and OBJMEM broadcast load (RT mode)
  input  vec3_t             cam_org,
  input  coord_t            cam_cx,
  input  coord_t            cam_cy,
  input  coord_t            cam_f,
  input  vec3_t             light,
  input  logic [OBJ_AW-1:0] nbbox,
  input  logic              obj_we,
  input  logic [OBJ_AW-1:0] obj_waddr,
  input  logic [OBJ_DW-1:0] obj_wdata,
  // background clustering
  input  logic              cl_start,
  input  logic [7:0]        cl_thr,
  input  logic [15:0]       cl_thr_d,
  input  logic              pix_valid,
  input  pa_t               pix,
  output logic              pix_ready,
  output logic              cl_busy,
  output logic              cl_done,
  output logic [CIDW:0]     nclust,
  // rendering
  input  logic              start,
  output logic              busy,
  output logic              frame_done,
  output logic              px_valid,
  output logic [TIDW-1:0]   px_id,
  output logic [7:0]        px_color,
  // IR mode
  input  logic              ir_ld,
  input  logic [SW-1:0]     ir_ld_sel,
  input  logic [31:0]       ir_wdata,
  input  prec_e             ir_prec,
  input  logic              ir_valid,
  input  logic [31:0]       ir_data,
  input  logic              ir_clr,
  input  logic [SW-1:0]     ir_rsel,
  output logic signed [63:0] ir_racc,
  // events, one bit per PE, and memory conflicts
  output logic [N-1:0]      ev_tbbox,
  output logic [N-1:0]      ev_ebbox_skip,
  output logic [N-1:0]      ev_tri_hit,
  output logic [N-1:0]      ev_shadow,
  output logic [N-1:0]      ev_bg,
  output logic              ev_conflict
);

  // token checker
  logic [SW-1:0] sel;
  rttc #(.N(N), .SW(SW)) u_rttc (.clk, .rst_n, .en(mode == MODE_RT), .sel, .sel_oh());

  // PE array
  logic [N-1:0]    task_valid, idle, done, done_ack, pa_req, pa_valid;
  logic [TIDW-1:0] task_id;
  logic [15:0]     task_x, task_y;
  logic [TIDW-1:0] done_id [N];
  logic [7:0]      color [N];
  logic [TIDW-1:0] pa_req_id [N];
  pa_t             pa_data;

  pe_array #(.ROWS(ROWS), .COLS(COLS), .TIDW(TIDW)) u_arr (
    .clk, .rst_n, .mode, .cam_org, .cam_cx, .cam_cy, .cam_f, .light, .nbbox,
    .obj_we, .obj_waddr, .obj_wdata,
    .task_valid, .task_id, .task_x, .task_y, .idle, .done, .done_id, .color, .done_ack,
    .pa_req, .pa_req_id, .pa_valid, .pa_data,
    .ir_ld, .ir_ld_sel, .ir_wdata, .ir_prec, .ir_valid, .ir_data, .ir_clr, .ir_rsel, .ir_racc,
    .ev_tbbox, .ev_ebbox_skip, .ev_tri_hit, .ev_shadow, .ev_bg
  );

  // scheduler
  grts #(.N(N), .IMG_W(IMG_W), .IMG_H(IMG_H), .TIDW(TIDW), .SW(SW)) u_grts (
    .clk, .rst_n, .start, .sel, .pe_idle(idle), .pe_done(done), .pe_done_id(done_id),
    .pe_color(color), .task_valid, .task_id, .task_x, .task_y, .done_ack,
    .px_valid, .px_id, .px_color, .busy, .frame_done
  );

  // memory access path: gmac -> uac -> ppcd -> pamem
  logic            rq_valid, rs_valid;
  logic [TIDW-1:0] rq_id;
  logic [SW-1:0]   rq_pe, rs_pe;
  pa_t             rs_data;
  logic [IDXW-1:0] rq_idx;

  gmac #(.N(N), .TIDW(TIDW), .SW(SW)) u_gmac (
    .clk, .rst_n, .sel, .pa_req, .pa_req_id, .pa_valid, .pa_data,
    .rq_valid, .rq_id, .rq_pe, .rs_valid, .rs_pe, .rs_data, .conflict(ev_conflict)
  );

  uac #(.IMG_W(IMG_W), .IMG_H(IMG_H), .TILE(TILE), .TIDW(TIDW), .IDXW(IDXW)) u_uac (
    .task_id(rq_id), .idx_addr(rq_idx)
  );

  logic [IDXW-1:0] idx_raddr, idx_waddr;
  logic [CIDW-1:0] idx_rdata, idx_wdata, cl_raddr, cl_waddr;
  pa_t             cl_rdata, cl_wdata;
  logic            idx_we, cl_we;

  ppcd #(.IDXW(IDXW), .CIDW(CIDW), .TAGW(SW)) u_ppcd (
    .clk, .rst_n, .req_valid(rq_valid), .req_idx(rq_idx), .req_tag(rq_pe),
    .idx_raddr, .idx_rdata, .cl_raddr, .cl_rdata,
    .resp_valid(rs_valid), .resp_tag(rs_pe), .resp_pa(rs_data)
  );

  pamem #(.NTILES(NTILES), .NCLUST(NCLUST), .IDXW(IDXW), .CIDW(CIDW)) u_pamem (
    .clk, .idx_we, .idx_waddr, .idx_wdata, .idx_raddr, .idx_rdata,
    .cl_we, .cl_waddr, .cl_wdata, .cl_raddr, .cl_rdata
  );

  bg_cluster #(.IMG_W(IMG_W), .IMG_H(IMG_H), .TILE(TILE), .NCLUST(NCLUST),
               .NTILES(NTILES), .IDXW(IDXW), .CIDW(CIDW)) u_clu (
    .clk, .rst_n, .start(cl_start), .thr(cl_thr), .thr_d(cl_thr_d),
    .pix_valid, .pix, .pix_ready,
    .idx_we, .idx_waddr, .idx_wdata, .cl_we, .cl_waddr, .cl_wdata,
    .busy(cl_busy), .done(cl_done), .nclust
  );

endmodule
