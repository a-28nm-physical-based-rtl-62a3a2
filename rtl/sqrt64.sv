// sqrt64: iterative integer square root of a W-bit unsigned radicand.
//
// Digit-by-digit (binary restoring) method: each clock brings down two radicand
// bits and decides one root bit, so `done` pulses W/2 clock edges after the
// edge that takes `start`, with root = floor(sqrt(rad)) held until the next start. The 64-bit width
// follows the processor description; the method and latency are this design's
// own. A start while busy is ignored.
module sqrt64 #(
  parameter int W = 64
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [W-1:0]   rad,
  output logic           busy,
  output logic           done,
  output logic [W/2-1:0] root
);

  localparam int H    = W / 2;
  localparam int CNTW = $clog2(H + 1);

  logic [W-1:0]    x_q;     // radicand bits not yet consumed (top first)
  logic [H+2:0]    r_q;     // partial remainder
  logic [H-1:0]    q_q;     // partial root
  logic [CNTW-1:0] cnt;

  logic [H+2:0] r_bring;
  logic [H+2:0] trial;
  logic [H+2:0] r_sub;
  always_comb begin
    r_bring = {r_q[H:0], x_q[W-1 -: 2]};
    trial   = {1'b0, q_q, 2'b01};
    r_sub   = r_bring - trial;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      x_q  <= '0;
      r_q  <= '0;
      q_q  <= '0;
      cnt  <= '0;
      root <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          x_q  <= rad;
          r_q  <= '0;
          q_q  <= '0;
          cnt  <= CNTW'(H);
        end
      end else begin
        logic [H-1:0] q_nx;
        q_nx = {q_q[H-2:0], !r_sub[H+2]};
        x_q <= {x_q[W-3:0], 2'b00};
        r_q <= r_sub[H+2] ? r_bring : r_sub;
        q_q <= q_nx;
        cnt <= cnt - 1'b1;
        if (cnt == CNTW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          root <= q_nx;
        end
      end
    end
  end

endmodule
