// tb_pe: end-to-end test of one processing element (controller, PCU, OBJMEM,
// BBIE, TIE, clock gating).
// RT mode: the test scene of prt_ref_pkg is loaded into OBJMEM, pixel tasks of
// a 64 x 64 image (every third pixel in x and y) are handed to the PE, its
// PA requests are answered after a random delay, and each returned colour is
// compared with the reference model (object pixels within 3 codes, ambiguous
// pixels not counted). Every mechanism must occur at least once: TBBOX hit,
// EBBOX skipped, triangle hit, background pixel, shadowed background.
// IR mode: a stationary 4 x 8-bit word is multiplied with broadcast operands
// and the accumulator compared with a reference dot product.
module tb_pe;
  import prt_pkg::*;
  import prt_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mode_e mode;
  vec3_t cam_org, light;
  coord_t cam_cx, cam_cy, cam_f;
  logic [OBJ_AW-1:0] nbbox, obj_waddr;
  logic obj_we;
  logic [OBJ_DW-1:0] obj_wdata;
  logic task_valid, idle, done, done_ack, pa_req, pa_valid;
  logic [13:0] task_id, done_id, pa_req_id;
  logic [15:0] task_x, task_y;
  logic [7:0] color;
  pa_t pa_data;
  logic ir_ld, ir_valid, ir_clr;
  logic [31:0] ir_wdata, ir_data;
  prec_e ir_prec;
  logic signed [63:0] ir_acc;
  logic ev_tbbox, ev_ebbox_skip, ev_tri_hit, ev_shadow, ev_bg;
  int checks = 0, failures = 0;
  int n_tbbox = 0, n_eskip = 0, n_tri = 0, n_shadow = 0, n_bg = 0, n_amb = 0;

  pe #(.TIDW(14)) dut (.*);

  always @(posedge clk) if (rst_n) begin
    n_tbbox  += int'(ev_tbbox);
    n_eskip  += int'(ev_ebbox_skip);
    n_tri    += int'(ev_tri_hit);
    n_shadow += int'(ev_shadow);
    n_bg     += int'(ev_bg);
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic obj, amb;
    int exp, cyc;
    longint accm;
    logic [31:0] st;
    mode = MODE_RT; task_valid = 0; done_ack = 0; pa_valid = 0; pa_data = '0;
    obj_we = 0; obj_waddr = 0; obj_wdata = 0;
    ir_ld = 0; ir_valid = 0; ir_clr = 0; ir_wdata = 0; ir_data = 0; ir_prec = PREC_8;
    task_id = 0; task_x = 0; task_y = 0;
    build_scene(64);
    cam_org = '0;
    cam_cx = coord_t'(prt_ref_pkg::cam_cx); cam_cy = coord_t'(prt_ref_pkg::cam_cy); cam_f = coord_t'(prt_ref_pkg::cam_f);
    light.x = coord_t'(prt_ref_pkg::light[0]); light.y = coord_t'(prt_ref_pkg::light[1]); light.z = coord_t'(prt_ref_pkg::light[2]);
    nbbox = OBJ_AW'(boxes.size());
    repeat (2) @(negedge clk); rst_n = 1;
    // load OBJMEM
    foreach (boxes[i]) begin
      @(negedge clk); obj_we = 1; obj_waddr = OBJ_AW'(i); obj_wdata = box_word(i);
    end
    foreach (tris[i]) begin
      @(negedge clk); obj_we = 1; obj_waddr = OBJ_AW'(16 + i); obj_wdata = tri_word(i);
    end
    @(negedge clk); obj_we = 0;
    for (int y = 1; y < 64; y += 3) begin
      for (int x = 1; x < 64; x += 3) begin
        while (!idle) @(negedge clk);
        task_valid = 1; task_id = 14'(y * 64 + x); task_x = 16'(x); task_y = 16'(y);
        @(negedge clk); task_valid = 0;
        while (!pa_req) @(negedge clk);
        checks++;
        if (pa_req_id !== 14'(y * 64 + x)) failures++;
        repeat ($urandom_range(0, 5)) @(negedge clk);
        pa_valid = 1; pa_data = bg_pa(x, y);
        @(negedge clk); pa_valid = 0;
        cyc = 0;
        while (!done && cyc < 5000) begin @(negedge clk); cyc++; end
        exp = ref_pixel(x, y, bg_pa(x, y), obj, amb);
        checks++;
        if (done_id !== 14'(y * 64 + x)) failures++;
        if (amb) n_amb++;
        else begin
          checks++;
          if (obj ? (int'(color) > exp + 3 || int'(color) < exp - 3) : (int'(color) != exp)) begin
            failures++;
            $display("pixel (%0d,%0d) colour %0d expected %0d obj=%0b", x, y, color, exp, obj);
          end
        end
        done_ack = 1; @(negedge clk); done_ack = 0;
      end
    end
    $display("events: tbbox=%0d ebbox_skip=%0d tri_hit=%0d shadow=%0d bg=%0d ambiguous=%0d",
             n_tbbox, n_eskip, n_tri, n_shadow, n_bg, n_amb);
    checks += 5;
    if (n_tbbox == 0) failures++;
    if (n_eskip == 0) failures++;
    if (n_tri == 0) failures++;
    if (n_shadow == 0) failures++;
    if (n_bg == 0) failures++;
    // IR mode: stationary weights, broadcast activations
    mode = MODE_IR;
    @(negedge clk);
    checks++; if (idle) failures++;
    st = {8'd3, 8'hFE, 8'd5, 8'd7};
    ir_ld = 1; ir_wdata = st; @(negedge clk); ir_ld = 0;
    ir_clr = 1; @(negedge clk); ir_clr = 0;
    accm = 0;
    for (int i = 0; i < 20; i++) begin
      ir_valid = 1; ir_prec = PREC_8; ir_data = $urandom;
      for (int l = 0; l < 4; l++) accm += longint'($signed(st[8*l +: 8])) * longint'($signed(ir_data[8*l +: 8]));
      @(negedge clk);
    end
    ir_valid = 0;
    @(negedge clk);
    checks++;
    if (ir_acc !== accm) begin failures++; $display("IR acc %0d exp %0d", ir_acc, accm); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
