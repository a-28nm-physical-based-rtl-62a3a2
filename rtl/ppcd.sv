// ppcd: per-pixel compression decoder.
//
// Recovers a pixel's background attributes from the clustered PA memory in two
// pipelined look-ups: cycle 1 reads the cluster ID of the pixel's tile
// (idx_raddr = req_idx), cycle 2 reads that cluster's record
// (cl_raddr = cluster ID), and the record leaves on resp_pa with resp_valid
// two clocks after req_valid. A tag (the requesting PE) travels alongside.
// One request per cycle is accepted. Decoding per pixel in front of the PA
// memory follows the processor description; the two-level table is this
// design's own reading of it.
module ppcd
  import prt_pkg::*;
#(
  parameter int IDXW = 8,
  parameter int CIDW = 6,
  parameter int TAGW = 6
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            req_valid,
  input  logic [IDXW-1:0] req_idx,
  input  logic [TAGW-1:0] req_tag,
  output logic [IDXW-1:0] idx_raddr,
  input  logic [CIDW-1:0] idx_rdata,
  output logic [CIDW-1:0] cl_raddr,
  input  pa_t             cl_rdata,
  output logic            resp_valid,
  output logic [TAGW-1:0] resp_tag,
  output pa_t             resp_pa
);

  logic            v1, v2;
  logic [TAGW-1:0] tag1, tag2;

  assign idx_raddr = req_idx;
  assign cl_raddr  = idx_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; tag1 <= '0; tag2 <= '0;
    end else begin
      v1   <= req_valid;
      tag1 <= req_tag;
      v2   <= v1;
      tag2 <= tag1;
    end
  end

  assign resp_valid = v2;
  assign resp_tag   = tag2;
  assign resp_pa    = cl_rdata;

endmodule
