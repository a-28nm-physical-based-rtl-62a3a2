// pe: one reconfigurable mixed-precision processing element.
//
// Contents: the local controller (pe_ctrl), the compute unit (pcu: MAC,
// divider, square root), the local object memory (obj_mem), the BBOX
// intersection evaluator (bbie), the triangle intersection evaluator (tie) and
// the clock-gating control.
//
// RT mode (mode = MODE_RT): the controller traces one pixel task at a time, as
// described in pe_ctrl, and owns the PCU.
// IR mode (mode = MODE_IR): the PE is a stationary MAC for CNN inference. A
// 32-bit stationary register is loaded with `ir_ld`; it holds either weights
// (weight stationary) or activations (input stationary), and the operand
// broadcast on `ir_data` is the other one. Every cycle with `ir_valid` the PCU
// accumulates stationary (x) ir_data at precision `ir_prec`; `ir_clr` clears the
// accumulator (and takes priority over `ir_valid`). `ir_acc` shows the
// accumulator one cycle after the operation.
// Clock gating: OBJMEM, BBIE and TIE run on a clock that is enabled only in RT
// mode; the PCU gates its divider and square root itself. The PE contents, the
// two modes and both stationary dataflows follow the processor description;
// the single stationary register and the gating granularity are this design's
// own. OBJMEM is written by broadcast (`obj_we`), in RT mode only.
module pe
  import prt_pkg::*;
#(
  parameter int TIDW = 14
) (
  input  logic              clk,
  input  logic              rst_n,
  input  mode_e             mode,
  // scene configuration and OBJMEM load
  input  vec3_t             cam_org,
  input  coord_t            cam_cx,
  input  coord_t            cam_cy,
  input  coord_t            cam_f,
  input  vec3_t             light,
  input  logic [OBJ_AW-1:0] nbbox,
  input  logic              obj_we,
  input  logic [OBJ_AW-1:0] obj_waddr,
  input  logic [OBJ_DW-1:0] obj_wdata,
  // RT task interface
  input  logic              task_valid,
  input  logic [TIDW-1:0]   task_id,
  input  logic [15:0]       task_x,
  input  logic [15:0]       task_y,
  output logic              idle,
  output logic              done,
  output logic [TIDW-1:0]   done_id,
  output logic [7:0]        color,
  input  logic              done_ack,
  output logic              pa_req,
  output logic [TIDW-1:0]   pa_req_id,
  input  logic              pa_valid,
  input  pa_t               pa_data,
  // IR interface
  input  logic              ir_ld,
  input  logic [31:0]       ir_wdata,
  input  prec_e             ir_prec,
  input  logic              ir_valid,
  input  logic [31:0]       ir_data,
  input  logic              ir_clr,
  output logic signed [63:0] ir_acc,
  // events
  output logic              ev_tbbox,
  output logic              ev_ebbox_skip,
  output logic              ev_tri_hit,
  output logic              ev_shadow,
  output logic              ev_bg
);

  logic rt_clk;
  clk_gate u_cg_rt (.clk, .en(mode == MODE_RT), .gclk(rt_clk));

  // OBJMEM
  logic [OBJ_AW-1:0] obj_raddr;
  logic [OBJ_DW-1:0] obj_rdata;
  obj_mem #(.DEPTH(1 << OBJ_AW), .DW(OBJ_DW)) u_obj (
    .clk(rt_clk), .we(obj_we), .waddr(obj_waddr), .wdata(obj_wdata),
    .raddr(obj_raddr), .rdata(obj_rdata)
  );

  // BBIE
  logic               bb_valid, bb_ovalid, bb_hit;
  vec3_t              bb_org, bb_min, bb_max;
  logic signed [31:0] bb_inv [3];
  logic signed [63:0] bb_tmin, bb_tmax;
  bbie u_bbie (
    .clk(rt_clk), .rst_n, .in_valid(bb_valid), .org(bb_org), .inv(bb_inv),
    .bmin(bb_min), .bmax(bb_max), .out_valid(bb_ovalid), .hit(bb_hit),
    .tmin(bb_tmin), .tmax(bb_tmax)
  );

  // TIE
  logic               tie_valid, tie_ovalid, tie_hit;
  vec3_t              tie_org, tie_dir;
  tri_t               tie_tri;
  logic signed [63:0] tie_tnum, tie_tden;
  logic signed [39:0] tie_nrm [3];
  tie u_tie (
    .clk(rt_clk), .rst_n, .in_valid(tie_valid), .org(tie_org), .dir(tie_dir),
    .tri_in(tie_tri), .out_valid(tie_ovalid), .hit(tie_hit), .tnum(tie_tnum),
    .tden(tie_tden), .nrm(tie_nrm)
  );

  // PCU, shared by the RT controller and the IR dataflow
  logic        c_start, p_start, p_done, p_busy;
  pcu_op_e     c_op, p_op;
  prec_e       p_prec;
  logic [63:0] c_a, c_b, p_a, p_b, p_result;
  logic [31:0] stat_q;

  always_comb begin
    if (mode == MODE_RT) begin
      p_start = c_start;
      p_op    = c_op;
      p_prec  = PREC_32;
      p_a     = c_a;
      p_b     = c_b;
    end else begin
      p_start = ir_valid || ir_clr;
      p_op    = ir_clr ? OP_CLR : OP_MAC;
      p_prec  = ir_prec;
      p_a     = {32'd0, stat_q};
      p_b     = {32'd0, ir_data};
    end
  end

  pcu u_pcu (
    .clk, .rst_n, .mode, .start(p_start), .op(p_op), .prec(p_prec),
    .a(p_a), .b(p_b), .busy(p_busy), .done(p_done), .result(p_result)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     stat_q <= '0;
    else if (ir_ld) stat_q <= ir_wdata;
  end

  assign ir_acc = p_result;

  pe_ctrl #(.TIDW(TIDW)) u_ctrl (
    .clk, .rst_n, .mode, .cam_org, .cam_cx, .cam_cy, .cam_f, .light, .nbbox,
    .task_valid, .task_id, .task_x, .task_y, .idle, .done, .done_id, .color, .done_ack,
    .pa_req, .pa_req_id, .pa_valid, .pa_data,
    .obj_raddr, .obj_rdata,
    .bb_valid, .bb_org, .bb_inv, .bb_min, .bb_max, .bb_ovalid, .bb_hit,
    .tie_valid, .tie_org, .tie_dir, .tie_tri, .tie_ovalid, .tie_hit, .tie_tnum, .tie_tden, .tie_nrm,
    .pcu_start(c_start), .pcu_op(c_op), .pcu_a(c_a), .pcu_b(c_b), .pcu_done(p_done), .pcu_result(p_result),
    .ev_tbbox, .ev_ebbox_skip, .ev_tri_hit, .ev_shadow, .ev_bg
  );

endmodule
