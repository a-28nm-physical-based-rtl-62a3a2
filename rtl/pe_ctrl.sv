// pe_ctrl: local controller of one processing element in ray-tracing (RT) mode.
//
// For each pixel task handed over by the global scheduler it runs:
//   1. PA fetch    ask the global memory access controller for the pixel's
//                  clustered background attributes (albedo, lighting, normal,
//                  depth) and wait for them.
//   2. ray set-up  primary ray O + t*D with D = (x-cx, y-cy, f); the PCU
//                  divider forms inv_k = 2^FRAC / D_k for the box tests.
//   3. traversal   every BBOX record in OBJMEM is visited. Empty boxes
//                  (EBBOX) are skipped for primary rays; a target box (TBBOX)
//                  that the BBIE reports hit has each of its triangles tested
//                  by the TIE. The nearest hit is kept as a fraction
//                  tnum/tden and starts as the background distance depth/f, so
//                  a triangle only wins when it lies in front of the
//                  background surface.
//   4a. object     Lambert shading with the directional light L, all on the
//                  PCU: N.L, N.N and L.L by 32-bit MACs, two square roots and
//                  one divide give cos = 256*N.L/(|N||L|). The shading
//                  register holds ambient + diffuse:
//                  (a*l)>>11 + (a*l*cos)>>16, saturated to 255
//                  (a = box albedo, l = background lighting at the pixel).
//   4b. background the ray meets the background at t = depth/f. A shadow ray
//                  from that point towards L is tested against all boxes,
//                  EBBOX and TBBOX alike; colour = (albedo*lighting)>>8,
//                  halved when the point is in shadow.
//   5. result      `done` with the colour and task ID is held until `done_ack`.
// The steps, the EBBOX/TBBOX roles and the in-PE shading on the PCU follow the
// processor description; the shading formula, the directional light, the
// shadow attenuation of one half and all number formats are this design's
// own. Normals are reduced by a right shift to below 2^14 per component before
// shading, and L must already be within that range.
// The controller only accepts tasks in RT mode; `ev_*` are one-cycle event
// pulses for performance counting.
module pe_ctrl
  import prt_pkg::*;
#(
  parameter int TIDW = 14
) (
  input  logic               clk,
  input  logic               rst_n,
  input  mode_e              mode,
  // scene configuration
  input  vec3_t              cam_org,
  input  coord_t             cam_cx,
  input  coord_t             cam_cy,
  input  coord_t             cam_f,
  input  vec3_t              light,
  input  logic [OBJ_AW-1:0]  nbbox,
  // task from / result to the scheduler
  input  logic               task_valid,
  input  logic [TIDW-1:0]    task_id,
  input  logic [15:0]        task_x,
  input  logic [15:0]        task_y,
  output logic               idle,
  output logic               done,
  output logic [TIDW-1:0]    done_id,
  output logic [7:0]         color,
  input  logic               done_ack,
  // background attribute fetch
  output logic               pa_req,
  output logic [TIDW-1:0]    pa_req_id,
  input  logic               pa_valid,
  input  pa_t                pa_data,
  // OBJMEM read port
  output logic [OBJ_AW-1:0]  obj_raddr,
  input  logic [OBJ_DW-1:0]  obj_rdata,
  // BBIE
  output logic               bb_valid,
  output vec3_t              bb_org,
  output logic signed [31:0] bb_inv [3],
  output vec3_t              bb_min,
  output vec3_t              bb_max,
  input  logic               bb_ovalid,
  input  logic               bb_hit,
  // TIE
  output logic               tie_valid,
  output vec3_t              tie_org,
  output vec3_t              tie_dir,
  output tri_t               tie_tri,
  input  logic               tie_ovalid,
  input  logic               tie_hit,
  input  logic signed [63:0] tie_tnum,
  input  logic signed [63:0] tie_tden,
  input  logic signed [39:0] tie_nrm [3],
  // PCU
  output logic               pcu_start,
  output pcu_op_e            pcu_op,
  output logic [63:0]        pcu_a,
  output logic [63:0]        pcu_b,
  input  logic               pcu_done,
  input  logic [63:0]        pcu_result,
  // events
  output logic               ev_tbbox,
  output logic               ev_ebbox_skip,
  output logic               ev_tri_hit,
  output logic               ev_shadow,
  output logic               ev_bg
);

  typedef enum logic [4:0] {
    S_IDLE, S_PA, S_INV_GO, S_INV_WT, S_BB_RD, S_BB_EV, S_BB_WT,
    S_TR_RD, S_TR_EV, S_TR_WT, S_SH_NORM, S_SH_GO, S_SH_WT, S_SH_OUT,
    S_BG, S_DONE
  } state_e;

  state_e state;

  logic [TIDW-1:0]    tid;
  pa_t                pa;
  vec3_t              dir;         // primary direction
  vec3_t              org;         // current ray origin
  vec3_t              vdir;        // vector being inverted
  logic               shadow_pass; // 0: primary traversal, 1: shadow ray
  logic [1:0]         axis;
  logic signed [31:0] inv [3];
  logic [OBJ_AW-1:0]  bi;          // BBOX index
  logic [OBJ_AW-1:0]  ti;          // triangle address
  logic [OBJ_AW-1:0]  tc;          // triangles left in the box
  logic [7:0]         box_alb;
  logic               obj_hit;
  logic signed [63:0] best_num, best_den;
  logic signed [39:0] best_n [3];
  logic [7:0]         best_alb;
  logic signed [31:0] sn [3];      // reduced normal
  logic [3:0]         step;
  logic signed [63:0] nl, nn, ll;
  logic [31:0]        sqn, sql;
  logic               in_shadow;
  logic [7:0]         shade;

  function automatic logic signed [16:0] cx17(input coord_t c);
    return 17'(c);
  endfunction

  function automatic coord_t vsel(input vec3_t v, input logic [1:0] k);
    return (k == 2'd0) ? v.x : (k == 2'd1) ? v.y : v.z;
  endfunction

  // ---------------- datapath helpers ----------------
  bbox_t rec;
  assign rec = word2bbox(obj_rdata);

  coord_t cur_d;
  assign cur_d = vsel(vdir, axis);

  // nearest-hit comparison: tnum/tden < best_num/best_den, both dens > 0
  logic signed [127:0] lhs, rhs;
  assign lhs = 128'(tie_tnum) * 128'(best_den);
  assign rhs = 128'(best_num) * 128'(tie_tden);

  // orientation of the new normal with respect to the primary ray
  logic signed [63:0] ndotd;
  assign ndotd = 64'(tie_nrm[0]) * 64'(dir.x) + 64'(tie_nrm[1]) * 64'(dir.y) + 64'(tie_nrm[2]) * 64'(dir.z);

  // background point O + (depth/f)*D, using inv[2] = 2^FRAC / f
  logic signed [63:0] tbg;
  vec3_t              pbg;
  assign tbg   = 64'(pa.depth) * 64'(inv[2]);
  assign pbg.x = coord_t'(64'(cam_org.x) + ((64'(dir.x) * tbg) >>> FRAC));
  assign pbg.y = coord_t'(64'(cam_org.y) + ((64'(dir.y) * tbg) >>> FRAC));
  assign pbg.z = coord_t'(64'(cam_org.z) + ((64'(dir.z) * tbg) >>> FRAC));

  // right shift that brings every normal component below 2^14 in magnitude
  logic [5:0] nshift;
  always_comb begin
    logic [39:0] mag;
    nshift = '0;
    mag    = '0;
    for (int k = 0; k < 3; k++)
      mag |= best_n[k][39] ? 40'(-best_n[k]) : 40'(best_n[k]);
    for (int s = 0; s < 27; s++)
      if ((mag >> s) >= 40'(1 << 14)) nshift = 6'(s + 1);
  end

  // shading micro-sequence operands
  always_comb begin
    pcu_op = OP_CLR;
    pcu_a  = '0;
    pcu_b  = '0;
    if (state == S_INV_GO) begin
      pcu_op = OP_DIV;
      pcu_a  = 64'(1) << FRAC;
      pcu_b  = cur_d[CW-1] ? 64'(-cx17(cur_d)) : 64'(cx17(cur_d));
    end else begin
      unique case (step)
        4'd0, 4'd4, 4'd8: pcu_op = OP_CLR;
        4'd1, 4'd2, 4'd3: begin
          pcu_op = OP_MAC;
          pcu_a  = 64'(sn[2'(step - 4'd1)]);
          pcu_b  = 64'(vsel(light, 2'(step - 4'd1)));
        end
        4'd5, 4'd6, 4'd7: begin
          pcu_op = OP_MAC;
          pcu_a  = 64'(sn[2'(step - 4'd5)]);
          pcu_b  = 64'(sn[2'(step - 4'd5)]);
        end
        4'd9, 4'd10, 4'd11: begin
          pcu_op = OP_MAC;
          pcu_a  = 64'(vsel(light, 2'(step - 4'd9)));
          pcu_b  = 64'(vsel(light, 2'(step - 4'd9)));
        end
        4'd12: begin pcu_op = OP_SQRT; pcu_a = nn; end
        4'd13: begin pcu_op = OP_SQRT; pcu_a = ll; end
        default: begin
          pcu_op = OP_DIV;
          pcu_a  = 64'(nl) << 8;
          pcu_b  = 64'(sqn) * 64'(sql);
        end
      endcase
    end
  end

  assign pcu_start = (state == S_INV_GO && cur_d != 0) || (state == S_SH_GO);

  // ---------------- outputs ----------------
  assign idle      = (state == S_IDLE) && (mode == MODE_RT);
  assign done      = (state == S_DONE);
  assign done_id   = tid;
  assign color     = shade;
  assign pa_req    = (state == S_PA);
  assign pa_req_id = tid;
  assign obj_raddr = (state == S_TR_RD) ? ti : bi;
  assign bb_valid  = (state == S_BB_EV) && (shadow_pass || rec.kind == BB_TARGET);
  assign bb_org    = org;
  assign bb_inv    = inv;
  assign bb_min    = rec.bmin;
  assign bb_max    = rec.bmax;
  assign tie_valid = (state == S_TR_EV);
  assign tie_org   = org;
  assign tie_dir   = dir;
  assign tie_tri   = tri_t'(obj_rdata);

  assign ev_ebbox_skip = (state == S_BB_EV) && !shadow_pass && rec.kind == BB_EMPTY;

  // ---------------- sequencer ----------------
  logic last_box;
  assign last_box = (bi + 1'b1 == nbbox);

  // colour products
  logic [15:0] al_prod;
  logic [31:0] diff_prod;
  logic [16:0] shade_sum;
  logic [7:0]  cos_q8;
  assign al_prod   = best_alb * pa.lighting;
  assign cos_q8    = (nl <= 0 || sqn == 0 || sql == 0) ? 8'd0 :
                     (pcu_result > 64'd255) ? 8'd255 : pcu_result[7:0];
  assign diff_prod = 32'(al_prod) * 32'(cos_q8);
  assign shade_sum = 17'(al_prod >> 11) + 17'(diff_prod >> 16);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      tid <= '0; pa <= '0; dir <= '0; org <= '0; vdir <= '0;
      shadow_pass <= 1'b0; axis <= '0;
      for (int k = 0; k < 3; k++) begin
        inv[k] <= '0; best_n[k] <= '0; sn[k] <= '0;
      end
      bi <= '0; ti <= '0; tc <= '0; box_alb <= '0; obj_hit <= 1'b0;
      best_num <= '0; best_den <= 64'd1; best_alb <= '0; step <= '0;
      nl <= '0; nn <= '0; ll <= '0; sqn <= '0; sql <= '0;
      in_shadow <= 1'b0; shade <= '0;
      ev_tbbox <= 1'b0; ev_tri_hit <= 1'b0; ev_shadow <= 1'b0; ev_bg <= 1'b0;
    end else begin
      ev_tbbox <= 1'b0; ev_tri_hit <= 1'b0; ev_shadow <= 1'b0; ev_bg <= 1'b0;
      unique case (state)
        S_IDLE: if (task_valid && mode == MODE_RT) begin
          tid   <= task_id;
          dir.x <= coord_t'($signed({1'b0, task_x}) - 17'(cam_cx));
          dir.y <= coord_t'($signed({1'b0, task_y}) - 17'(cam_cy));
          dir.z <= cam_f;
          state <= S_PA;
        end
        S_PA: if (pa_valid) begin
          pa          <= pa_data;
          obj_hit     <= 1'b0;
          best_num    <= 64'(pa_data.depth);
          best_den    <= 64'(cam_f);
          org         <= cam_org;
          vdir        <= dir;
          shadow_pass <= 1'b0;
          axis        <= '0;
          state       <= S_INV_GO;
        end
        S_INV_GO: begin
          if (cur_d == 0) begin
            inv[axis] <= 32'sh7FFF_FFFF;
            if (axis == 2'd2) begin
              bi    <= '0;
              state <= (nbbox == 0) ? (shadow_pass ? S_BG : S_SH_NORM) : S_BB_RD;
            end else axis <= axis + 1'b1;
          end else state <= S_INV_WT;
        end
        S_INV_WT: if (pcu_done) begin
          inv[axis] <= cur_d[CW-1] ? -32'(pcu_result) : 32'(pcu_result);
          if (axis == 2'd2) begin
            bi    <= '0;
            state <= (nbbox == 0) ? (shadow_pass ? S_BG : S_SH_NORM) : S_BB_RD;
          end else begin
            axis  <= axis + 1'b1;
            state <= S_INV_GO;
          end
        end
        S_BB_RD: state <= S_BB_EV;
        S_BB_EV: begin
          box_alb <= rec.albedo;
          ti      <= rec.tri_base;
          tc      <= rec.tri_cnt;
          if (bb_valid) state <= S_BB_WT;
          else if (last_box) state <= S_SH_NORM;   // primary pass only
          else begin
            bi    <= bi + 1'b1;
            state <= S_BB_RD;
          end
        end
        S_BB_WT: if (bb_ovalid) begin
          if (shadow_pass) begin
            if (bb_hit) begin
              in_shadow <= 1'b1;
              state     <= S_BG;
            end else if (last_box) state <= S_BG;
            else begin
              bi    <= bi + 1'b1;
              state <= S_BB_RD;
            end
          end else if (bb_hit && tc != 0) begin
            ev_tbbox <= 1'b1;
            state    <= S_TR_RD;
          end else if (last_box) state <= S_SH_NORM;
          else begin
            bi    <= bi + 1'b1;
            state <= S_BB_RD;
          end
        end
        S_TR_RD: state <= S_TR_EV;
        S_TR_EV: state <= S_TR_WT;
        S_TR_WT: if (tie_ovalid) begin
          if (tie_hit && lhs < rhs) begin
            ev_tri_hit <= 1'b1;
            obj_hit    <= 1'b1;
            best_num   <= tie_tnum;
            best_den   <= tie_tden;
            best_alb   <= box_alb;
            for (int k = 0; k < 3; k++)
              best_n[k] <= (ndotd > 0) ? -tie_nrm[k] : tie_nrm[k];
          end
          if (tc != 1) begin
            tc    <= tc - 1'b1;
            ti    <= ti + 1'b1;
            state <= S_TR_RD;
          end else if (last_box) state <= S_SH_NORM;
          else begin
            bi    <= bi + 1'b1;
            state <= S_BB_RD;
          end
        end
        // end of the primary traversal: object or background
        S_SH_NORM: begin
          if (obj_hit) begin
            for (int k = 0; k < 3; k++) sn[k] <= 32'(best_n[k] >>> nshift);
            step  <= '0;
            state <= S_SH_GO;
          end else begin
            // shadow ray from the background point towards the light
            ev_bg       <= 1'b1;
            org         <= pbg;
            vdir        <= light;
            shadow_pass <= 1'b1;
            in_shadow   <= 1'b0;
            axis        <= '0;
            state       <= S_INV_GO;
          end
        end
        S_SH_GO: begin
          if (step == 4'd14 && (nl <= 0 || sqn == 0 || sql == 0)) state <= S_SH_OUT;
          else state <= S_SH_WT;
        end
        S_SH_WT: if (pcu_done) begin
          if (step == 4'd3)  nl  <= pcu_result;
          if (step == 4'd7)  nn  <= pcu_result;
          if (step == 4'd11) ll  <= pcu_result;
          if (step == 4'd12) sqn <= pcu_result[31:0];
          if (step == 4'd13) sql <= pcu_result[31:0];
          if (step == 4'd14) state <= S_SH_OUT;
          else begin
            step  <= step + 1'b1;
            state <= S_SH_GO;
          end
        end
        S_SH_OUT: begin
          shade <= shade_sum[16:8] != 0 ? 8'd255 : shade_sum[7:0];
          state <= S_DONE;
        end
        S_BG: begin
          // reached after the shadow traversal (or with no boxes at all)
          if (in_shadow) ev_shadow <= 1'b1;
          shade <= in_shadow ? 8'((16'(pa.albedo) * 16'(pa.lighting)) >> 9)
                            : 8'((16'(pa.albedo) * 16'(pa.lighting)) >> 8);
          state <= S_DONE;
        end
        S_DONE: if (done_ack) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
