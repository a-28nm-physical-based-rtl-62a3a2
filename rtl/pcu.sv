// pcu: PE compute unit, the arithmetic core of one processing element.
//
// It places a mixed-precision MAC (mp_mac), a 64-bit divider (div64) and a
// 64-bit square-root unit (sqrt64) behind one start/done operation interface:
//   OP_CLR  clear the accumulator              done 1 cycle after start
//   OP_MAC  acc += a[31:0] (x) b[31:0] at prec  done 1 cycle after start
//   OP_DIV  result = a / b (unsigned)           done 65 cycles after start
//   OP_SQRT result = floor(sqrt(a))             done 33 cycles after start
// `result` holds the last operation's answer (the accumulator for CLR/MAC)
// until the next start. MAC and CLR can be issued every cycle; `start` is
// ignored while a divide or square root is in progress (`busy`). The divider and the square root each run on a gated clock that is
// enabled only while they work (the iterations in RT mode only), which is the PE's
// clock-gating control. Which units the PE holds follows the processor
// description; the op encoding, the latencies and the gating rule are this
// design's own.
module pcu
  import prt_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  mode_e       mode,
  input  logic        start,
  input  pcu_op_e     op,
  input  prec_e       prec,
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic        busy,
  output logic        done,
  output logic [63:0] result
);

  pcu_op_e     op_q;
  logic        mac_pend;
  logic        go;
  logic        div_busy, div_done, sq_busy, sq_done;
  logic [63:0] quo, rem_unused;
  logic [31:0] root;
  logic signed [63:0] acc;
  logic        div_clk, sq_clk;

  assign go = start && !busy;

  // clock gating: the iterative units see a clock only when they are needed.
  // The edge that takes `start` always passes, so the operands are captured
  // even in IR mode; the iterations themselves only run in RT mode.
  clk_gate u_cg_div (.clk(clk), .en((go && op == OP_DIV) || ((mode == MODE_RT) && (div_busy || div_done))), .gclk(div_clk));
  clk_gate u_cg_sq  (.clk(clk), .en((go && op == OP_SQRT) || ((mode == MODE_RT) && (sq_busy || sq_done))), .gclk(sq_clk));

  mp_mac #(.ACC_W(64)) u_mac (
    .clk, .rst_n, .prec, .a(a[31:0]), .b(b[31:0]),
    .en(go && op == OP_MAC), .clr(go && op == OP_CLR), .acc
  );

  div64 #(.W(64)) u_div (
    .clk(div_clk), .rst_n, .start(go && op == OP_DIV), .dividend(a), .divisor(b),
    .busy(div_busy), .done(div_done), .quo, .rem(rem_unused)
  );

  sqrt64 #(.W(64)) u_sqrt (
    .clk(sq_clk), .rst_n, .start(go && op == OP_SQRT), .rad(a),
    .busy(sq_busy), .done(sq_done), .root
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_q     <= OP_CLR;
      mac_pend <= 1'b0;
    end else begin
      mac_pend <= go && (op == OP_MAC || op == OP_CLR);
      if (go) op_q <= op;
    end
  end

  logic pend_long;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                   pend_long <= 1'b0;
    else if (go && (op == OP_DIV || op == OP_SQRT)) pend_long <= 1'b1;
    else if (div_done || sq_done)                 pend_long <= 1'b0;
  end

  assign busy = pend_long;
  assign done = mac_pend || (pend_long && (div_done || sq_done));

  always_comb begin
    unique case (op_q)
      OP_DIV:  result = quo;
      OP_SQRT: result = {32'd0, root};
      default: result = acc;
    endcase
  end

endmodule
