// spad_bank: scratchpad SRAM with an ID state bit on every wordline.
//
// Each wordline holds LINE_W data bits plus one ID bit (1 = secure). Every
// request carries the ID state of the NPU core that issues it, and the bank
// applies one of two rule sets, chosen by SHARED:
//
//   Exclusive (local) scratchpad, SHARED = 0:
//     write  always allowed; the wordline's ID becomes the requester's ID.
//     read   allowed only if the wordline's ID equals the requester's ID;
//            otherwise the response is zero data with denied = 1.
//   Shared (global) scratchpad, SHARED = 1:
//     a normal requester may neither read nor write a secure wordline
//     (denied = 1, nothing changes);
//     a secure requester may read or write any wordline, and the wordline
//     becomes secure whether it was read or written.
//   Both: clr (only honoured from a secure requester) resets the wordline
//     to non-secure. Clearing also zeroes the data so that nothing secure is
//     left behind for a normal reader; the zeroing is this design's choice.
//
// These rules follow the design description. Interface: one request per
// cycle, always accepted (req_ready is 1); the response (rsp_valid, rdata,
// denied) comes one cycle later, for writes and clears too so that a
// requester learns about a refused write. Contents and ID bits are not
// reset; software clears secure lines before handing them on.
module spad_bank
  import snpu_pkg::*;
#(
  parameter int unsigned DEPTH  = 16384,  // 256 KB of 128-bit wordlines
  parameter bit          SHARED = 1'b0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      req_valid,
  output logic      req_ready,
  input  spad_req_t req,
  output logic      rsp_valid,
  output spad_rsp_t rsp
);
  localparam int unsigned IW = $clog2(DEPTH);

  logic [LINE_W-1:0] data_q [DEPTH];
  id_e               id_q   [DEPTH];

  logic [IW-1:0] idx;
  id_e           line_id;
  logic          deny, do_write, do_clr, set_secure;

  assign req_ready = 1'b1;
  assign idx       = req.addr[IW-1:0];
  assign line_id   = id_q[idx];

  always_comb begin
    deny       = 1'b0;
    do_write   = 1'b0;
    do_clr     = 1'b0;
    set_secure = 1'b0;
    if (req.clr) begin
      deny   = (req.id != ID_SECURE);
      do_clr = !deny;
    end else if (SHARED) begin
      deny       = (req.id == ID_NORMAL) && (line_id == ID_SECURE);
      do_write   = req.we && !deny;
      set_secure = !req.we && (req.id == ID_SECURE);
    end else begin
      deny     = !req.we && (line_id != req.id);
      do_write = req.we;
    end
  end

  always_ff @(posedge clk) begin
    if (req_valid) begin
      if (do_clr) begin
        data_q[idx] <= '0;
        id_q[idx]   <= ID_NORMAL;
      end else if (do_write) begin
        data_q[idx] <= req.wdata;
        id_q[idx]   <= req.id;
      end else if (set_secure) begin
        id_q[idx]   <= ID_SECURE;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (req_valid) begin
      rsp.denied <= deny;
      rsp.rdata  <= (deny || req.we || req.clr) ? '0 : data_q[idx];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rsp_valid <= 1'b0;
    else        rsp_valid <= req_valid;
  end

endmodule
