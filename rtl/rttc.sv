// rttc: RT token checker.
//
// A token visits the N processing elements in turn, one per clock, while `en`
// is high: `sel` names the PE whose status the global scheduler and the global
// memory access controller look at in this cycle, `sel_oh` is the same as a
// one-hot vector. Checking exactly one PE per cycle, shared by both global
// units, follows the processor description; the plain round-robin order is
// this design's own. Reset puts the token on PE 0.
module rttc #(
  parameter int N  = 48,
  parameter int SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  output logic [SW-1:0] sel,
  output logic [N-1:0]  sel_oh
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  sel <= '0;
    else if (en) sel <= (sel == SW'(N - 1)) ? '0 : sel + 1'b1;
  end

  always_comb begin
    sel_oh = '0;
    sel_oh[sel] = 1'b1;
  end

endmodule
