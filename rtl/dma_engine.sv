// dma_engine: moves one checked DMA request between system memory and the
// scratchpad in fixed-size memory packets.
//
// A request (already translated and permitted by the NPU Guarder) gives a
// physical address, a length in 64-byte packets, a direction and a
// scratchpad line address. The engine splits it into packets: packet k
// covers bytes [addr + 64k, addr + 64k + 64) and scratchpad lines
// spad_addr + 4k .. spad_addr + 4k + 3 (line j of a packet is bits
// [128j +: 128] of the 512-bit memory word). Loads read a packet from memory
// and write its four lines; stores read four lines and then write the
// packet. Scratchpad accesses carry the core's ID state, so the scratchpad
// ID rules apply to DMA traffic as well. A refused scratchpad access makes
// the request finish with DMA_SPAD_DENY; a refused read supplies zeros, so
// no secure data reaches memory.
//
// The packet split follows the design description; the memory port, one
// request in flight at a time and posted writes are this design's choices.
//
// Interfaces: req valid/ready (accepted only when idle). Memory: one request
// per handshake, a read answered later by mem_rsp_valid. Scratchpad:
// valid/ready, response one cycle after acceptance. done pulses for one
// cycle with the status. packets counts memory packets moved.
module dma_engine
  import snpu_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  id_e               core_id,
  input  logic              req_valid,
  output logic              req_ready,
  input  dma_req_t          req,
  output logic              done,
  output dma_status_e       done_status,
  // system memory
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output logic              mem_req_we,
  output logic [ADDR_W-1:0] mem_req_addr,
  output logic [MEM_W-1:0]  mem_req_wdata,
  input  logic              mem_rsp_valid,
  input  logic [MEM_W-1:0]  mem_rsp_rdata,
  // scratchpad
  output logic              spad_valid,
  input  logic              spad_ready,
  output spad_req_t         spad_req,
  input  logic              spad_rsp_valid,
  input  spad_rsp_t         spad_rsp,
  output logic [31:0]       packets
);
  typedef enum logic [2:0] {
    S_IDLE, S_LD_REQ, S_LD_WAIT, S_LD_WR, S_ST_RD, S_ST_WR, S_DRAIN
  } state_e;

  localparam int unsigned LW = $clog2(PKT_LINES + 1);

  state_e             state_q;
  logic               store_q;
  logic [ADDR_W-1:0]  addr_q;
  logic [LEN_W-1:0]   left_q;
  logic [SPAD_AW-1:0] saddr_q;
  logic [MEM_W-1:0]   buf_q;
  logic [LW-1:0]      issued_q, got_q;
  logic               deny_q;

  assign req_ready = (state_q == S_IDLE);

  assign mem_req_valid = (state_q == S_LD_REQ) || (state_q == S_ST_WR);
  assign mem_req_we    = (state_q == S_ST_WR);
  assign mem_req_addr  = addr_q;
  assign mem_req_wdata = buf_q;

  logic [$clog2(PKT_LINES)-1:0] issue_line;
  assign issue_line = issued_q[$clog2(PKT_LINES)-1:0];

  assign spad_valid     = ((state_q == S_LD_WR) || (state_q == S_ST_RD)) &&
                          (32'(issued_q) < PKT_LINES);
  assign spad_req.we    = (state_q == S_LD_WR);
  assign spad_req.clr   = 1'b0;
  assign spad_req.id    = core_id;
  assign spad_req.addr  = saddr_q + SPAD_AW'(issued_q);
  assign spad_req.wdata = buf_q[32'(issue_line)*LINE_W +: LINE_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      store_q     <= 1'b0;
      addr_q      <= '0;
      left_q      <= '0;
      saddr_q     <= '0;
      buf_q       <= '0;
      issued_q    <= '0;
      got_q       <= '0;
      deny_q      <= 1'b0;
      done        <= 1'b0;
      done_status <= DMA_OK;
      packets     <= '0;
    end else begin
      done <= 1'b0;
      if (spad_rsp_valid && spad_rsp.denied) deny_q <= 1'b1;
      if (spad_valid && spad_ready) issued_q <= issued_q + 1'b1;
      unique case (state_q)
        S_IDLE: if (req_valid) begin
          store_q  <= req.store;
          addr_q   <= req.addr;
          left_q   <= req.npkt;
          saddr_q  <= req.spad_addr;
          deny_q   <= 1'b0;
          issued_q <= '0;
          got_q    <= '0;
          if (req.npkt == '0) begin
            done        <= 1'b1;
            done_status <= DMA_OK;
          end else begin
            state_q <= req.store ? S_ST_RD : S_LD_REQ;
          end
        end
        S_LD_REQ: if (mem_req_ready) state_q <= S_LD_WAIT;
        S_LD_WAIT: if (mem_rsp_valid) begin
          buf_q    <= mem_rsp_rdata;
          issued_q <= '0;
          state_q  <= S_LD_WR;
        end
        S_LD_WR: if (spad_valid && spad_ready && 32'(issued_q) == PKT_LINES - 1) begin
          packets <= packets + 1'b1;
          next_packet();
        end
        S_ST_RD: begin
          if (spad_rsp_valid) begin
            buf_q[32'(got_q[$clog2(PKT_LINES)-1:0])*LINE_W +: LINE_W] <= spad_rsp.rdata;
            got_q <= got_q + 1'b1;
            if (32'(got_q) == PKT_LINES - 1) state_q <= S_ST_WR;
          end
        end
        S_ST_WR: if (mem_req_ready) begin
          packets <= packets + 1'b1;
          next_packet();
        end
        S_DRAIN: begin
          // the last scratchpad response of a load arrives this cycle
          done        <= 1'b1;
          done_status <= (deny_q || (spad_rsp_valid && spad_rsp.denied)) ? DMA_SPAD_DENY : DMA_OK;
          state_q     <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Advance to the next packet, or finish.
  task automatic next_packet();
    addr_q   <= addr_q + ADDR_W'(PKT_BYTES);
    saddr_q  <= saddr_q + SPAD_AW'(PKT_LINES);
    left_q   <= left_q - 1'b1;
    issued_q <= '0;
    got_q    <= '0;
    if (left_q == LEN_W'(1)) begin
      if (store_q) begin
        done        <= 1'b1;
        done_status <= deny_q ? DMA_SPAD_DENY : DMA_OK;
        state_q     <= S_IDLE;
      end else begin
        state_q <= S_DRAIN;
      end
    end else begin
      state_q <= store_q ? S_ST_RD : S_LD_REQ;
    end
  endtask

endmodule
