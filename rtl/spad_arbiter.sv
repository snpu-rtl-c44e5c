// spad_arbiter: shares one scratchpad port among N requesters.
//
// Each cycle at most one requester is granted, either by fixed priority
// (requester 0 highest, ROUND_ROBIN = 0) or round-robin (ROUND_ROBIN = 1).
// A grant is only given when the downstream port is ready, so req_ready of
// the winner is combinational from its own valid and from out_ready. The
// downstream port answers exactly one cycle after it accepts a request, so
// remembering the last winner is enough to route each response back.
// The arbitration policy is this design's choice; the design description
// only says that several units and cores share the scratchpads.
//
// The response payload is the downstream response wired to every
// requester; only the per-requester rsp_valid is selected.
module spad_arbiter
  import snpu_pkg::*;
#(
  parameter int unsigned N           = 4,
  parameter bit          ROUND_ROBIN = 1'b0
) (
  input  logic      clk,
  input  logic      rst_n,
  // requesters
  input  logic      in_valid [N],
  output logic      in_ready [N],
  input  spad_req_t in_req   [N],
  output logic      in_rsp_valid [N],
  output spad_rsp_t in_rsp   [N],
  // shared port
  output logic      out_valid,
  input  logic      out_ready,
  output spad_req_t out_req,
  input  logic      out_rsp_valid,
  input  spad_rsp_t out_rsp
);
  localparam int unsigned NW = (N > 1) ? $clog2(N) : 1;

  logic [NW-1:0] ptr_q;       // round-robin: requester with top priority
  logic [NW-1:0] win;
  logic          any;
  logic [NW-1:0] last_q;
  logic          last_v_q;

  always_comb begin
    any = 1'b0;
    win = '0;
    for (int unsigned k = 0; k < N; k++) begin
      if (!any && in_valid[ROUND_ROBIN ? ((k + 32'(ptr_q)) % N) : k]) begin
        any = 1'b1;
        win = NW'(ROUND_ROBIN ? ((k + 32'(ptr_q)) % N) : k);
      end
    end
  end

  assign out_valid = any;
  assign out_req   = in_req[win];

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      in_ready[i]     = any && (win == NW'(i)) && out_ready;
      in_rsp_valid[i] = out_rsp_valid && last_v_q && (last_q == NW'(i));
      in_rsp[i]       = out_rsp;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr_q    <= '0;
      last_q   <= '0;
      last_v_q <= 1'b0;
    end else begin
      last_v_q <= any && out_ready;
      if (any && out_ready) begin
        last_q <= win;
        if (ROUND_ROBIN) ptr_q <= (32'(win) == N - 1) ? '0 : win + 1'b1;
      end
    end
  end

endmodule
