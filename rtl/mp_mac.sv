// mp_mac: reconfigurable mixed-precision multiply-accumulate unit.
//
// The two 32-bit operands are read as four signed 8-bit lanes, two signed
// 16-bit lanes or one signed 32-bit value, selected by `prec`. All lane
// products are summed and added to a signed ACC_W-bit accumulator, so the unit
// performs a 4-, 2- or 1-element dot product step each cycle. The 8/16/32b
// precisions follow the processor description; the lane packing and the
// reduction into one accumulator are this design's own.
//
// Timing: when `en` is high the accumulator takes acc + sum on the next rising
// edge; `clr` (priority over `en`) clears it. `clr` and `en` together load the
// new sum alone. Reset is active-low, asynchronous.
module mp_mac
  import prt_pkg::*;
#(
  parameter int ACC_W = 64
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  prec_e                   prec,
  input  logic [31:0]             a,
  input  logic [31:0]             b,
  input  logic                    en,
  input  logic                    clr,
  output logic signed [ACC_W-1:0] acc
);

  logic signed [ACC_W-1:0] sum;

  always_comb begin
    sum = '0;
    unique case (prec)
      PREC_8: begin
        for (int i = 0; i < 4; i++)
          sum += ACC_W'($signed(a[8*i +: 8]) * $signed(b[8*i +: 8]));
      end
      PREC_16: begin
        for (int i = 0; i < 2; i++)
          sum += ACC_W'($signed(a[16*i +: 16]) * $signed(b[16*i +: 16]));
      end
      default: sum = ACC_W'($signed(a) * $signed(b));
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               acc <= '0;
    else if (clr && en)       acc <= sum;
    else if (clr)             acc <= '0;
    else if (en)              acc <= acc + sum;
  end

endmodule
