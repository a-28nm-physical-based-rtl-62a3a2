// tb_prt_top: end-to-end test of the whole processor at reduced size
// (2 x 2 PEs, 32 x 32 image, 8 x 8 tiles).
//   1. The test scene (tilted quad in a TBBOX, a shadow-casting EBBOX and a
//      TBBOX hidden behind the background) is broadcast into every OBJMEM.
//   2. A four-quadrant background map is streamed through the clustering
//      unit; exactly four clusters must result.
//   3. A frame is rendered; every pixel must come back once, with the colour
//      of the reference model (object pixels within 3 codes, ambiguous pixels
//      not counted), and frame_done must pulse once.
//   4. The chip is switched to IR mode and each PE's stationary MAC is
//      checked through the read-back port.
// Each mechanism (TBBOX hit, EBBOX skipped, triangle hit, background pixel,
// shadowed background, memory access conflict, tile merged into a cluster,
// mode switch with IR MACs) is counted and must occur at least once.
module tb_prt_top;
  import prt_pkg::*;
  import prt_ref_pkg::*;

  localparam int ROWS = 2, COLS = 2, SIDE = 32, TILE = 8, NCL = 8;
  localparam int N = ROWS * COLS;
  localparam int SW = (N > 1) ? $clog2(N) : 1;
  localparam int TIDW = $clog2(SIDE * SIDE);
  localparam int NCLUST_W = $clog2(NCL) + 1;
  localparam int NT = (SIDE / TILE) * (SIDE / TILE);
  localparam longint WATCHDOG = 64'd2_000_000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mode_e mode;
  vec3_t cam_org, light;
  coord_t cam_cx, cam_cy, cam_f;
  logic [OBJ_AW-1:0] nbbox, obj_waddr;
  logic obj_we;
  logic [OBJ_DW-1:0] obj_wdata;
  logic cl_start, pix_valid, pix_ready, cl_busy, cl_done;
  logic [7:0] cl_thr;
  logic [15:0] cl_thr_d;
  pa_t pix;
  logic [NCLUST_W-1:0] nclust;
  logic start, busy, frame_done, px_valid;
  logic [TIDW-1:0] px_id;
  logic [7:0] px_color;
  logic ir_ld, ir_valid, ir_clr;
  logic [SW-1:0] ir_ld_sel, ir_rsel;
  logic [31:0] ir_wdata, ir_data;
  prec_e ir_prec;
  logic signed [63:0] ir_racc;
  logic [N-1:0] ev_tbbox, ev_ebbox_skip, ev_tri_hit, ev_shadow, ev_bg;
  logic ev_conflict;

  prt_top #(.ROWS(ROWS), .COLS(COLS), .IMG_W(SIDE), .IMG_H(SIDE), .TILE(TILE), .NCLUST(NCL)) dut (.*);

  int checks = 0, failures = 0;
  longint cycles = 0;
  int n_tbbox = 0, n_eskip = 0, n_tri = 0, n_shadow = 0, n_bg = 0, n_conf = 0, n_fd = 0, n_amb = 0, n_ir = 0;
  int got [SIDE * SIDE];
  int col [SIDE * SIDE];

  always @(posedge clk) if (rst_n) begin
    cycles++;
    n_tbbox  += $countones(ev_tbbox);
    n_eskip  += $countones(ev_ebbox_skip);
    n_tri    += $countones(ev_tri_hit);
    n_shadow += $countones(ev_shadow);
    n_bg     += $countones(ev_bg);
    n_conf   += int'(ev_conflict);
    n_fd     += int'(frame_done);
    if (px_valid) begin
      got[px_id]++;
      col[px_id] = int'(px_color);
    end
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic obj, amb;
    int exp, nobj;
    longint t0;
    logic [31:0] st [N];
    longint accm [N];
    mode = MODE_RT; obj_we = 0; obj_waddr = 0; obj_wdata = 0;
    cl_start = 0; pix_valid = 0; pix = '0; cl_thr = 8'd4; cl_thr_d = 16'd8; start = 0;
    ir_ld = 0; ir_valid = 0; ir_clr = 0; ir_ld_sel = 0; ir_rsel = 0; ir_wdata = 0; ir_data = 0; ir_prec = PREC_8;
    foreach (got[i]) begin got[i] = 0; col[i] = 0; end
    build_scene(SIDE);
    cam_org = '0;
    cam_cx = coord_t'(prt_ref_pkg::cam_cx); cam_cy = coord_t'(prt_ref_pkg::cam_cy); cam_f = coord_t'(prt_ref_pkg::cam_f);
    light.x = coord_t'(prt_ref_pkg::light[0]); light.y = coord_t'(prt_ref_pkg::light[1]); light.z = coord_t'(prt_ref_pkg::light[2]);
    nbbox = OBJ_AW'(boxes.size());
    repeat (3) @(negedge clk); rst_n = 1;
    // 1. scene broadcast
    foreach (boxes[i]) begin @(negedge clk); obj_we = 1; obj_waddr = OBJ_AW'(i); obj_wdata = box_word(i); end
    foreach (tris[i])  begin @(negedge clk); obj_we = 1; obj_waddr = OBJ_AW'(16 + i); obj_wdata = tri_word(i); end
    @(negedge clk); obj_we = 0;
    // 2. background clustering, tile by tile
    cl_start = 1; @(negedge clk); cl_start = 0;
    for (int ty = 0; ty < SIDE / TILE; ty++)
      for (int tx = 0; tx < SIDE / TILE; tx++)
        for (int p = 0; p < TILE * TILE; p++) begin
          while (!pix_ready) @(negedge clk);
          pix_valid = 1; pix = quad_pa(tx * TILE + p % TILE, ty * TILE + p / TILE, SIDE);
          @(negedge clk);
          pix_valid = 0;
        end
    while (cl_busy) @(negedge clk);
    checks++;
    if (nclust != NCLUST_W'(4)) begin failures++; $display("clusters %0d", nclust); end
    // 3. render one frame
    t0 = cycles;
    start = 1; @(negedge clk); start = 0;
    while (busy) @(negedge clk);
    repeat (3) @(negedge clk);
    $display("frame of %0d x %0d pixels on %0d PEs: %0d cycles", SIDE, SIDE, N, cycles - t0);
    nobj = 0;
    for (int y = 0; y < SIDE; y++)
      for (int x = 0; x < SIDE; x++) begin
        checks++;
        if (got[y * SIDE + x] != 1) begin failures++; $display("pixel %0d returned %0d times", y * SIDE + x, got[y * SIDE + x]); end
        exp = ref_pixel(x, y, quad_pa(x, y, SIDE), obj, amb);
        if (obj) nobj++;
        if (amb) n_amb++;
        else begin
          checks++;
          if (obj ? (col[y * SIDE + x] > exp + 3 || col[y * SIDE + x] < exp - 3) : (col[y * SIDE + x] != exp)) begin
            failures++;
            $display("pixel (%0d,%0d) colour %0d expected %0d obj=%0b", x, y, col[y * SIDE + x], exp, obj);
          end
        end
      end
    checks++;
    if (n_fd != 1) begin failures++; $display("frame_done pulses %0d", n_fd); end
    // 4. IR mode
    mode = MODE_IR;
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      st[i] = $urandom;
      ir_ld = 1; ir_ld_sel = SW'(i); ir_wdata = st[i]; @(negedge clk);
    end
    ir_ld = 0;
    ir_clr = 1; @(negedge clk); ir_clr = 0;
    for (int i = 0; i < N; i++) accm[i] = 0;
    for (int k = 0; k < 8; k++) begin
      ir_valid = 1; ir_prec = PREC_16; ir_data = $urandom;
      for (int i = 0; i < N; i++)
        for (int l = 0; l < 2; l++) accm[i] += longint'($signed(st[i][16*l +: 16])) * longint'($signed(ir_data[16*l +: 16]));
      @(negedge clk);
    end
    ir_valid = 0;
    for (int i = 0; i < N; i++) begin
      ir_rsel = SW'(i); #1;
      checks++;
      if (ir_racc !== accm[i]) begin failures++; $display("IR PE %0d", i); end
      else n_ir++;
    end
    $display("events: tbbox=%0d ebbox_skip=%0d tri_hit=%0d shadow=%0d bg=%0d conflict=%0d merged_tiles=%0d ir_macs=%0d obj_pixels=%0d ambiguous=%0d",
             n_tbbox, n_eskip, n_tri, n_shadow, n_bg, n_conf, NT - int'(nclust), n_ir, nobj, n_amb);
    checks += 8;
    if (n_tbbox == 0) begin failures++; $display("no TBBOX hit"); end
    if (n_eskip == 0) begin failures++; $display("no EBBOX skipped"); end
    if (n_tri == 0) begin failures++; $display("no triangle hit"); end
    if (n_shadow == 0) begin failures++; $display("no shadow"); end
    if (n_bg == 0) begin failures++; $display("no background pixel"); end
    if (n_conf == 0) begin failures++; $display("no memory conflict"); end
    if (NT - int'(nclust) <= 0) begin failures++; $display("no tile merged"); end
    if (n_ir == 0) begin failures++; $display("no IR MAC"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
