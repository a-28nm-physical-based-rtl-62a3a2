// div64: iterative unsigned divider (W-bit dividend and divisor).
//
// Radix-2 restoring division, one quotient bit per clock. A `start` pulse
// latches the operands; `done` pulses for one cycle W clock edges after the
// edge that takes `start`, with `quo` and `rem` valid (they hold until the next start). `busy` is high in
// between; a start while busy is ignored. Division by zero gives an all-ones
// quotient and the dividend as remainder. The 64-bit width follows the
// processor description; the algorithm and latency are this design's own.
module div64 #(
  parameter int W = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quo,
  output logic [W-1:0] rem
);

  localparam int CNTW = $clog2(W + 1);

  logic [W-1:0]    d_q;
  logic [W:0]      r_q;
  logic [W-1:0]    n_q;
  logic [CNTW-1:0] cnt;

  logic [W:0] r_shift;
  logic [W:0] r_sub;
  always_comb begin
    r_shift = {r_q[W-1:0], n_q[W-1]};
    r_sub   = r_shift - {1'b0, d_q};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      d_q  <= '0;
      r_q  <= '0;
      n_q  <= '0;
      cnt  <= '0;
      quo  <= '0;
      rem  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          d_q  <= divisor;
          n_q  <= dividend;
          r_q  <= '0;
          cnt  <= CNTW'(W);
        end
      end else begin
        // n_q shifts out the dividend at the top and collects quotient bits below
        logic [W-1:0] n_nx;
        logic [W:0]   r_nx;
        n_nx = {n_q[W-2:0], !r_sub[W]};
        r_nx = r_sub[W] ? r_shift : r_sub;
        n_q <= n_nx;
        r_q <= r_nx;
        cnt <= cnt - 1'b1;
        if (cnt == CNTW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          quo  <= n_nx;
          rem  <= r_nx[W-1:0];
        end
      end
    end
  end

endmodule
