// obj_mem: local object memory (OBJMEM) of one processing element.
//
// A DEPTH x DW single-port-write, single-port-read RAM written as an array.
// It holds the scene as the PE sees it: bounding-box records at the low
// addresses and the triangles they point to above them (see prt_pkg). The
// write port is loaded by broadcast so that every PE owns a full copy and can
// trace its rays alone. Read is synchronous: rdata is valid the clock after
// raddr. Contents are not reset. The local OBJMEM follows the processor
// description; its size and word layout are this design's own.
module obj_mem #(
  parameter int DEPTH = 256,
  parameter int DW    = 144,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
