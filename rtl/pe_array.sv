// pe_array: the ROWS x COLS array of processing elements (8 x 6 = 48 PEs).
//
// Every PE gets the same scene configuration, the same OBJMEM write port (the
// scene is broadcast so that each PE holds a full copy) and the same IR
// operand broadcast. Per-PE signals (task hand-over, results, PA requests and
// answers, events) are brought out as arrays indexed by PE number
// r*COLS + c. In IR mode `ir_ld` with `ir_ld_sel` loads the stationary
// register of one PE, and `ir_rsel` selects which PE accumulator appears on
// `ir_racc`. The 8 x 6 size follows the processor description; the
// numbering, the broadcast buses and the read-back multiplexer are this
// design's own.
module pe_array
  import prt_pkg::*;
#(
  parameter int ROWS = 8,
  parameter int COLS = 6,
  parameter int TIDW = 14,
  parameter int N    = ROWS * COLS,
  parameter int SW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  mode_e             mode,
  input  vec3_t             cam_org,
  input  coord_t            cam_cx,
  input  coord_t            cam_cy,
  input  coord_t            cam_f,
  input  vec3_t             light,
  input  logic [OBJ_AW-1:0] nbbox,
  input  logic              obj_we,
  input  logic [OBJ_AW-1:0] obj_waddr,
  input  logic [OBJ_DW-1:0] obj_wdata,
  input  logic [N-1:0]      task_valid,
  input  logic [TIDW-1:0]   task_id,
  input  logic [15:0]       task_x,
  input  logic [15:0]       task_y,
  output logic [N-1:0]      idle,
  output logic [N-1:0]      done,
  output logic [TIDW-1:0]   done_id [N],
  output logic [7:0]        color [N],
  input  logic [N-1:0]      done_ack,
  output logic [N-1:0]      pa_req,
  output logic [TIDW-1:0]   pa_req_id [N],
  input  logic [N-1:0]      pa_valid,
  input  pa_t               pa_data,
  input  logic              ir_ld,
  input  logic [SW-1:0]     ir_ld_sel,
  input  logic [31:0]       ir_wdata,
  input  prec_e             ir_prec,
  input  logic              ir_valid,
  input  logic [31:0]       ir_data,
  input  logic              ir_clr,
  input  logic [SW-1:0]     ir_rsel,
  output logic signed [63:0] ir_racc,
  output logic [N-1:0]      ev_tbbox,
  output logic [N-1:0]      ev_ebbox_skip,
  output logic [N-1:0]      ev_tri_hit,
  output logic [N-1:0]      ev_shadow,
  output logic [N-1:0]      ev_bg
);

  logic signed [63:0] acc [N];

  for (genvar i = 0; i < N; i++) begin : g_pe
    pe #(.TIDW(TIDW)) u_pe (
      .clk, .rst_n, .mode, .cam_org, .cam_cx, .cam_cy, .cam_f, .light, .nbbox,
      .obj_we, .obj_waddr, .obj_wdata,
      .task_valid(task_valid[i]), .task_id, .task_x, .task_y,
      .idle(idle[i]), .done(done[i]), .done_id(done_id[i]), .color(color[i]),
      .done_ack(done_ack[i]),
      .pa_req(pa_req[i]), .pa_req_id(pa_req_id[i]), .pa_valid(pa_valid[i]), .pa_data,
      .ir_ld(ir_ld && ir_ld_sel == SW'(i)), .ir_wdata, .ir_prec, .ir_valid, .ir_data, .ir_clr,
      .ir_acc(acc[i]),
      .ev_tbbox(ev_tbbox[i]), .ev_ebbox_skip(ev_ebbox_skip[i]), .ev_tri_hit(ev_tri_hit[i]),
      .ev_shadow(ev_shadow[i]), .ev_bg(ev_bg[i])
    );
  end

  assign ir_racc = acc[ir_rsel];

endmodule
