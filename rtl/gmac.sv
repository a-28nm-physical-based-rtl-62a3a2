// gmac: global memory access controller for the shared PA memory.
//
// Many PEs ask for background attributes at unpredictable times. Instead of
// arbitrating all of them, the controller serves only the PE chosen this cycle
// by the RT token checker (`sel`): if that PE requests (`pa_req`) and has no
// request in flight, its task ID is sent down the address path
// (rq_valid/rq_id, tagged with the PE number rq_pe), at most one per cycle.
// The answer comes back tagged (rs_valid/rs_pe/rs_data) and is delivered to
// that PE with a one-cycle `pa_valid`; `pa_data` is shared by all PEs.
// `conflict` flags cycles in which more than one PE is waiting for memory,
// which is the access conflict this unit resolves. Serving the token-selected
// PE follows the processor description; the tagged pipelined path and the
// per-PE in-flight bit are this design's own.
module gmac
  import prt_pkg::*;
#(
  parameter int N    = 48,
  parameter int TIDW = 14,
  parameter int SW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [SW-1:0]   sel,
  input  logic [N-1:0]    pa_req,
  input  logic [TIDW-1:0] pa_req_id [N],
  output logic [N-1:0]    pa_valid,
  output pa_t             pa_data,
  output logic            rq_valid,
  output logic [TIDW-1:0] rq_id,
  output logic [SW-1:0]   rq_pe,
  input  logic            rs_valid,
  input  logic [SW-1:0]   rs_pe,
  input  pa_t             rs_data,
  output logic            conflict
);

  logic [N-1:0] pend;
  logic [N-1:0] waiting;

  assign rq_valid = pa_req[sel] && !pend[sel];
  assign rq_id    = pa_req_id[sel];
  assign rq_pe    = sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pend <= '0;
    else begin
      if (rs_valid) pend[rs_pe] <= 1'b0;
      if (rq_valid) pend[sel]   <= 1'b1;
    end
  end

  always_comb begin
    pa_valid = '0;
    pa_valid[rs_pe] = rs_valid;
  end
  assign pa_data = rs_data;

  assign waiting  = pa_req & ~pend;
  assign conflict = (waiting & (waiting - 1'b1)) != '0;

  // the same PE can never be acknowledged twice for one request
  a_one_inflight: assert property (@(posedge clk) disable iff (!rst_n)
                                   rs_valid |-> pend[rs_pe]);

endmodule
