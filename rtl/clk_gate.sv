// clk_gate: integrated clock gate (latch plus AND), as used by the PE clock-gating control.
//
// The enable is captured by a latch that is transparent while the clock is low,
// so `gclk` only ever carries whole clock pulses: it follows `clk` in cycles
// whose enable was high before the rising edge and stays low otherwise. The
// latch is intended (it is the gate's storage element, and the circuit warning
// for it stands); a chip would use the library's ICG cell in its place. The
// PE gating its idle units follows the processor description; using a
// latch-based gate is this design's own (standard) choice.
module clk_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_l;

  always_latch begin
    if (!clk) en_l = en;
  end

  assign gclk = clk & en_l;

endmodule
