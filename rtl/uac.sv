// uac: unified address converter.
//
// Turns the task ID of a PE (a pixel number in raster order) into the address
// of that pixel's entry in the cluster-index table of the PA memory. The
// index table has one entry per TILE x TILE block of the image, stored in
// raster order of blocks, and serves all four attribute maps (albedo, normal,
// lighting, depth) at once, since one cluster record carries all four:
//   x = id mod IMG_W, y = id div IMG_W,
//   idx_addr = (y div TILE) * (IMG_W div TILE) + (x div TILE).
// Purely combinational. That a unified converter maps task IDs to PA memory
// addresses follows the processor description; the tile layout is this
// design's own. IMG_W must be a multiple of TILE.
module uac #(
  parameter int IMG_W = 128,
  parameter int IMG_H = 128,
  parameter int TILE  = 8,
  parameter int TIDW  = $clog2(IMG_W * IMG_H),
  parameter int IDXW  = $clog2((IMG_W / TILE) * (IMG_H / TILE))
) (
  input  logic [TIDW-1:0] task_id,
  output logic [IDXW-1:0] idx_addr
);

  localparam int TX = IMG_W / TILE;

  logic [TIDW-1:0] x, y;
  always_comb begin
    x = task_id % TIDW'(IMG_W);
    y = task_id / TIDW'(IMG_W);
    idx_addr = IDXW'((y / TIDW'(TILE)) * TIDW'(TX) + (x / TIDW'(TILE)));
  end

endmodule
