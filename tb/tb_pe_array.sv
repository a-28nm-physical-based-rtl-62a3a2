// tb_pe_array: self-checking test of a 2 x 2 PE array.
// IR mode: a different stationary word is loaded into each PE, operands are
// broadcast at all three precisions (the accumulators are cleared between
// them), and every PE's accumulator is read back through ir_rsel and compared
// with a reference dot product. RT mode: with an empty scene each PE is given
// one pixel task and must return the unshadowed background colour
// (albedo*lighting)>>8 with its own task ID.
module tb_pe_array;
  import prt_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mode_e mode;
  vec3_t cam_org, light;
  coord_t cam_cx, cam_cy, cam_f;
  logic [OBJ_AW-1:0] nbbox, obj_waddr;
  logic obj_we;
  logic [OBJ_DW-1:0] obj_wdata;
  logic [N-1:0] task_valid, idle, done, done_ack, pa_req, pa_valid;
  logic [13:0] task_id;
  logic [13:0] done_id [N];
  logic [13:0] pa_req_id [N];
  logic [7:0] color [N];
  logic [15:0] task_x, task_y;
  pa_t pa_data;
  logic ir_ld, ir_valid, ir_clr;
  logic [1:0] ir_ld_sel, ir_rsel;
  logic [31:0] ir_wdata, ir_data;
  prec_e ir_prec;
  logic signed [63:0] ir_racc;
  logic [N-1:0] ev_tbbox, ev_ebbox_skip, ev_tri_hit, ev_shadow, ev_bg;
  int checks = 0, failures = 0;

  pe_array #(.ROWS(2), .COLS(2), .TIDW(14)) dut (.*);

  function automatic longint mac(input prec_e p, input logic [31:0] x, input logic [31:0] y);
    longint s = 0;
    case (p)
      PREC_8:  for (int i = 0; i < 4; i++) s += longint'($signed(x[8*i +: 8])) * longint'($signed(y[8*i +: 8]));
      PREC_16: for (int i = 0; i < 2; i++) s += longint'($signed(x[16*i +: 16])) * longint'($signed(y[16*i +: 16]));
      default: s = longint'($signed(x)) * longint'($signed(y));
    endcase
    return s;
  endfunction

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] st [N];
    longint accm [N];
    mode = MODE_IR; cam_org = '0; light = '0; cam_cx = 0; cam_cy = 0; cam_f = 16'sd64; nbbox = '0;
    obj_we = 0; obj_waddr = 0; obj_wdata = 0; task_valid = 0; task_id = 0; task_x = 0; task_y = 0;
    done_ack = 0; pa_valid = 0; pa_data = '0;
    ir_ld = 0; ir_valid = 0; ir_clr = 0; ir_ld_sel = 0; ir_rsel = 0; ir_wdata = 0; ir_data = 0; ir_prec = PREC_8;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < N; i++) begin
      st[i] = $urandom;
      @(negedge clk); ir_ld = 1; ir_ld_sel = 2'(i); ir_wdata = st[i];
    end
    @(negedge clk); ir_ld = 0;
    for (int p = 0; p < 3; p++) begin
      ir_clr = 1; @(negedge clk); ir_clr = 0;
      for (int i = 0; i < N; i++) accm[i] = 0;
      for (int k = 0; k < 16; k++) begin
        ir_valid = 1; ir_prec = prec_e'(p); ir_data = $urandom;
        for (int i = 0; i < N; i++) accm[i] += mac(prec_e'(p), st[i], ir_data);
        @(negedge clk);
      end
      ir_valid = 0;
      for (int i = 0; i < N; i++) begin
        ir_rsel = 2'(i); #1;
        checks++;
        if (ir_racc !== accm[i]) begin failures++; $display("prec %0d PE %0d acc %0d exp %0d", p, i, ir_racc, accm[i]); end
      end
      @(negedge clk);
    end
    // RT mode, empty scene
    mode = MODE_RT;
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      while (!idle[i]) @(negedge clk);
      task_valid = '0; task_valid[i] = 1; task_id = 14'(100 + i); task_x = 16'(i); task_y = 16'(i);
      @(negedge clk); task_valid = '0;
      while (!pa_req[i]) @(negedge clk);
      pa_valid = '0; pa_valid[i] = 1; pa_data = '0; pa_data.albedo = 8'(50 + 40 * i); pa_data.lighting = 8'd200; pa_data.depth = 16'd500;
      @(negedge clk); pa_valid = '0;
      while (!done[i]) @(negedge clk);
      checks++;
      if (done_id[i] !== 14'(100 + i) || color[i] !== 8'(((50 + 40 * i) * 200) >> 8)) begin
        failures++; $display("PE %0d id %0d colour %0d", i, done_id[i], color[i]);
      end
      done_ack = '0; done_ack[i] = 1; @(negedge clk); done_ack = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
