// grts: global ray-tracing scheduler.
//
// A frame is IMG_W x IMG_H pixel tasks, numbered in raster order (ID = y*IMG_W
// + x). After `start`, in every cycle the scheduler looks only at the PE that
// the RT token checker selects (`sel`):
//   - if that PE has finished (`pe_done`), its colour is passed out on the
//     pixel port and the PE is acknowledged (`done_ack`), which returns it to
//     idle: the scheduler refreshes the checked PE's status;
//   - otherwise, if it is idle and tasks remain, the next task (ID, x, y) is
//     handed to it with a one-cycle `task_valid`.
// `frame_done` pulses when every task has been handed out and retired; `busy`
// is high from `start` until then. The pixel port (px_valid/px_id/px_color)
// is registered: it shows a result the cycle after the PE was acknowledged.
// Serving one selected PE per cycle and refreshing finished PEs follow the
// processor description; one-pixel tasks and raster order are this design's
// own.
module grts #(
  parameter int N     = 48,
  parameter int IMG_W = 128,
  parameter int IMG_H = 128,
  parameter int TIDW  = $clog2(IMG_W * IMG_H),
  parameter int SW    = (N > 1) ? $clog2(N) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [SW-1:0]   sel,
  input  logic [N-1:0]    pe_idle,
  input  logic [N-1:0]    pe_done,
  input  logic [TIDW-1:0] pe_done_id [N],
  input  logic [7:0]      pe_color [N],
  output logic [N-1:0]    task_valid,
  output logic [TIDW-1:0] task_id,
  output logic [15:0]     task_x,
  output logic [15:0]     task_y,
  output logic [N-1:0]    done_ack,
  output logic            px_valid,
  output logic [TIDW-1:0] px_id,
  output logic [7:0]      px_color,
  output logic            busy,
  output logic            frame_done
);

  localparam int NPIX = IMG_W * IMG_H;

  logic [TIDW:0] next_id;      // tasks handed out
  logic [TIDW:0] retired;      // tasks finished
  logic [15:0]   x_q, y_q;
  logic          dispatch, retire;

  assign retire   = busy && pe_done[sel];
  assign dispatch = busy && !pe_done[sel] && pe_idle[sel] && (next_id != (TIDW+1)'(NPIX));

  always_comb begin
    task_valid = '0;
    done_ack   = '0;
    task_valid[sel] = dispatch;
    done_ack[sel]   = retire;
  end

  assign task_id = next_id[TIDW-1:0];
  assign task_x  = x_q;
  assign task_y  = y_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      frame_done <= 1'b0;
      next_id    <= '0;
      retired    <= '0;
      x_q        <= '0;
      y_q        <= '0;
      px_valid   <= 1'b0;
      px_id      <= '0;
      px_color   <= '0;
    end else begin
      frame_done <= 1'b0;
      px_valid   <= retire;
      if (retire) begin
        px_id    <= pe_done_id[sel];
        px_color <= pe_color[sel];
      end
      if (start && !busy) begin
        busy    <= 1'b1;
        next_id <= '0;
        retired <= '0;
        x_q     <= '0;
        y_q     <= '0;
      end else if (busy) begin
        if (dispatch) begin
          next_id <= next_id + 1'b1;
          if (x_q == 16'(IMG_W - 1)) begin
            x_q <= '0;
            y_q <= y_q + 1'b1;
          end else x_q <= x_q + 1'b1;
        end
        if (retire) retired <= retired + 1'b1;
        if (retire && retired + 1'b1 == (TIDW+1)'(NPIX)) begin
          busy       <= 1'b0;
          frame_done <= 1'b1;
        end
      end
    end
  end

endmodule
