// npu_guarder: tile-level address translation and range permission check
// for DMA requests, placed in front of the DMA engine.
//
// Translation registers (NUM_XLAT, three as drawn in the design) each map a
// contiguous virtual range [va, va+size) onto [pa, pa+size). Checking
// registers (NUM_CHK, two as drawn) each hold a physical range and its
// authority (read, write). A DMA request names a virtual start address and a
// length in 64-byte packets. The whole request range must fall inside one
// enabled translation register (else DMA_XLAT_FAULT); the translated range
// must then fall inside one enabled checking register whose authority
// allows the access, read for a load and write for a store (else
// DMA_PERM_FAULT). A permitted request is passed on with its physical
// address. So the guarder checks once per DMA request, not once per memory
// packet.
//
// Registers are written only through the cfg ports, which the secure
// controller drives. Default-deny (nothing passes until a register covers
// it), the first-match priority between overlapping registers and
// whole-range containment are this design's choices.
//
// Timing: one register stage. A request accepted in cycle t appears on the
// out port, or as a fault pulse, in cycle t+1. in_ready is high whenever the
// output stage is empty or being drained.
module npu_guarder
  import snpu_pkg::*;
#(
  parameter int unsigned NUM_XLAT = 3,
  parameter int unsigned NUM_CHK  = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  // configuration from the secure controller
  input  logic        xlat_we,
  input  logic [3:0]  xlat_idx,
  input  xlat_reg_t   xlat_wval,
  input  logic        chk_we,
  input  logic [3:0]  chk_idx,
  input  chk_reg_t    chk_wval,
  // virtual DMA requests from the core
  input  logic        in_valid,
  output logic        in_ready,
  input  dma_req_t    in_req,
  // permitted physical requests to the DMA engine
  output logic        out_valid,
  input  logic        out_ready,
  output dma_req_t    out_req,
  // refused requests
  output logic        fault_valid,
  output dma_status_e fault_status,
  // number of checks made (one per request)
  output logic [31:0] checks
);
  xlat_reg_t xlat_q [NUM_XLAT];
  chk_reg_t  chk_q  [NUM_CHK];

  logic [ADDR_W-1:0] bytes, pa;
  logic              xlat_hit, chk_hit;

  assign bytes = ADDR_W'(in_req.npkt) * ADDR_W'(PKT_BYTES);

  always_comb begin
    xlat_hit = 1'b0;
    pa       = '0;
    for (int unsigned i = 0; i < NUM_XLAT; i++) begin
      if (!xlat_hit && xlat_q[i].en &&
          range_inside(in_req.addr, bytes, xlat_q[i].va, xlat_q[i].size)) begin
        xlat_hit = 1'b1;
        pa       = xlat_q[i].pa + (in_req.addr - xlat_q[i].va);
      end
    end
    chk_hit = 1'b0;
    for (int unsigned j = 0; j < NUM_CHK; j++) begin
      if (chk_q[j].en && range_inside(pa, bytes, chk_q[j].base, chk_q[j].size) &&
          (in_req.store ? chk_q[j].perm.w : chk_q[j].perm.r))
        chk_hit = 1'b1;
    end
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < NUM_XLAT; i++) xlat_q[i] <= '0;
      for (int unsigned j = 0; j < NUM_CHK; j++)  chk_q[j]  <= '0;
      out_valid    <= 1'b0;
      out_req      <= '0;
      fault_valid  <= 1'b0;
      fault_status <= DMA_OK;
      checks       <= '0;
    end else begin
      for (int unsigned i = 0; i < NUM_XLAT; i++)
        if (xlat_we && 32'(xlat_idx) == i) xlat_q[i] <= xlat_wval;
      for (int unsigned j = 0; j < NUM_CHK; j++)
        if (chk_we && 32'(chk_idx) == j) chk_q[j] <= chk_wval;
      fault_valid <= 1'b0;
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        checks <= checks + 1'b1;
        if (!xlat_hit) begin
          fault_valid  <= 1'b1;
          fault_status <= DMA_XLAT_FAULT;
        end else if (!chk_hit) begin
          fault_valid  <= 1'b1;
          fault_status <= DMA_PERM_FAULT;
        end else begin
          out_valid      <= 1'b1;
          out_req        <= in_req;
          out_req.addr   <= pa;
        end
      end
    end
  end

endmodule
