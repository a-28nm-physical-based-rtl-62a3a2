// tb_grts: self-checking test of the global scheduler with 4 model PEs that
// take a random time per task. Checks: tasks go only to the token-selected,
// idle PE; x/y match the task ID; every pixel of an 8 x 4 frame is dispatched
// and returned exactly once with the colour the PE produced; frame_done pulses
// once at the end and busy falls with it.
module tb_grts;
  localparam int N = 4, W = 8, H = 4, TIDW = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, px_valid, busy, frame_done;
  logic [1:0] sel;
  logic [N-1:0] sel_oh, pe_idle, pe_done, task_valid, done_ack;
  logic [TIDW-1:0] pe_done_id [N];
  logic [7:0] pe_color [N];
  logic [TIDW-1:0] task_id, px_id;
  logic [15:0] task_x, task_y;
  logic [7:0] px_color;
  int checks = 0, failures = 0;
  int seen [W*H];
  int rets [W*H];
  int timer [N];
  int fdone = 0;

  rttc #(.N(N)) u_tok (.clk, .rst_n, .en(1'b1), .sel, .sel_oh);
  grts #(.N(N), .IMG_W(W), .IMG_H(H), .TIDW(TIDW)) dut (.*);

  // model PEs
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pe_idle <= '1; pe_done <= '0;
      for (int i = 0; i < N; i++) begin timer[i] <= 0; pe_done_id[i] <= '0; pe_color[i] <= '0; end
    end else begin
      for (int i = 0; i < N; i++) begin
        if (task_valid[i]) begin
          if (!pe_idle[i] || sel != 2'(i)) begin failures++; $display("dispatch to busy or unselected PE %0d", i); end
          if (int'(task_x) != int'(task_id) % W || int'(task_y) != int'(task_id) / W) begin failures++; $display("xy %0d %0d id %0d", task_x, task_y, task_id); end
          seen[task_id]++;
          pe_idle[i] <= 0; timer[i] <= $urandom_range(1, 12);
          pe_done_id[i] <= task_id; pe_color[i] <= 8'(task_id * 7 + 3);
        end else if (!pe_idle[i] && !pe_done[i]) begin
          if (timer[i] == 0) pe_done[i] <= 1; else timer[i] <= timer[i] - 1;
        end
        if (done_ack[i]) begin
          if (!pe_done[i]) begin failures++; $display("ack without done %0d", i); end
          pe_done[i] <= 0; pe_idle[i] <= 1;
        end
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (px_valid) begin
      rets[px_id]++;
      checks++;
      if (px_color !== 8'(px_id * 7 + 3)) begin failures++; $display("colour id %0d", px_id); end
    end
    if (frame_done) fdone++;
  end

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    foreach (seen[i]) begin seen[i] = 0; rets[i] = 0; end
    start = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    checks++; if (!busy) begin failures++; $display("not busy"); end
    while (busy) @(negedge clk);
    repeat (3) @(negedge clk);
    foreach (seen[i]) begin
      checks++;
      if (seen[i] != 1 || rets[i] != 1) begin failures++; $display("id %0d seen %0d returned %0d", i, seen[i], rets[i]); end
    end
    checks++; if (fdone != 1) begin failures++; $display("frame_done %0d", fdone); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
