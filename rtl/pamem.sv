// pamem: physical-attributes memory holding the clustered background maps.
//
// Two tables written as arrays: the cluster-index table (one CIDW-bit cluster
// ID per image tile) and the cluster table (one pa_t record per cluster:
// albedo, lighting, normal, depth). Each has one write port (filled by the
// background clustering unit) and one synchronous read port (used by the
// per-pixel compression decoder); read data appear the clock after the
// address. Contents are not reset. Storing the compressed maps on chip
// follows the processor description; the two-table organisation and the sizes
// are this design's own.
module pamem
  import prt_pkg::*;
#(
  parameter int NTILES = 256,
  parameter int NCLUST = 64,
  parameter int IDXW   = $clog2(NTILES),
  parameter int CIDW   = $clog2(NCLUST)
) (
  input  logic            clk,
  input  logic            idx_we,
  input  logic [IDXW-1:0] idx_waddr,
  input  logic [CIDW-1:0] idx_wdata,
  input  logic [IDXW-1:0] idx_raddr,
  output logic [CIDW-1:0] idx_rdata,
  input  logic            cl_we,
  input  logic [CIDW-1:0] cl_waddr,
  input  pa_t             cl_wdata,
  input  logic [CIDW-1:0] cl_raddr,
  output pa_t             cl_rdata
);

  logic [CIDW-1:0] idx_tab [NTILES];
  pa_t             cl_tab  [NCLUST];

  always_ff @(posedge clk) begin
    if (idx_we) idx_tab[idx_waddr] <= idx_wdata;
    idx_rdata <= idx_tab[idx_raddr];
  end

  always_ff @(posedge clk) begin
    if (cl_we) cl_tab[cl_waddr] <= cl_wdata;
    cl_rdata <= cl_tab[cl_raddr];
  end

endmodule
