// noc_send_engine: the sending half of a core's router controller, with the
// peephole authentication step in front of every transfer.
//
// States, as in the design's router-controller protocol:
//   IDLE       waits for a send command (destination core, first
//              scratchpad line, number of lines).
//   PEEPHOLE   injects a one-flit authentication request carrying this
//              core's ID state (the peephole identity), its coordinates and
//              the transfer length, then waits for the destination's answer.
//              ACK -> WAIT_SPAD; NACK -> IDLE, reported as denied or busy.
//   WAIT_SPAD  reads the scratchpad lines (with this core's ID, so lines of
//              the other domain read as zero and are reported) and waits
//              for the first line to arrive (data ready).
//   SEND_DATA  streams the lines as one data packet, one line per flit,
//              head flit first; after the tail flit -> IDLE, done.
// Only answers whose source is the current destination are taken, so the
// engine is locked to one destination per transfer (the send lock).
//
// Interface: cmd valid/ready (ready in IDLE); done pulses one cycle with
// the status. inj_* is the injection stream into the router, rsp_* the
// authentication answers ejected for this engine (always accepted). The
// scratchpad port answers one cycle after acceptance. Up to BUF_DEPTH lines
// are in flight or buffered, which sustains one flit per cycle.
// A zero-length command completes at once without using the network.
//
// Of an incoming answer flit only the kind and the source coordinates are
// read; its other fields are unused.
module noc_send_engine
  import snpu_pkg::*;
#(
  parameter int unsigned X         = 0,
  parameter int unsigned Y         = 0,
  parameter int unsigned BUF_DEPTH = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  id_e                core_id,
  // command
  input  logic               cmd_valid,
  output logic               cmd_ready,
  input  logic [COORD_W-1:0] cmd_dst_x,
  input  logic [COORD_W-1:0] cmd_dst_y,
  input  logic [SPAD_AW-1:0] cmd_spad_addr,
  input  logic [LEN_W-1:0]   cmd_len,
  output logic               done,
  output noc_status_e        done_status,
  // network
  output logic               inj_valid,
  input  logic               inj_ready,
  output flit_t              inj_flit,
  input  logic               rsp_valid,
  input  flit_t              rsp_flit,
  // scratchpad
  output logic               spad_valid,
  input  logic               spad_ready,
  output spad_req_t          spad_req,
  input  logic               spad_rsp_valid,
  input  spad_rsp_t          spad_rsp
);
  typedef enum logic [1:0] {S_IDLE, S_PEEPHOLE, S_WAIT_SPAD, S_SEND_DATA} state_e;
  localparam int unsigned BW = $clog2(BUF_DEPTH);

  state_e             state_q;
  logic [COORD_W-1:0] dx_q, dy_q;
  logic [SPAD_AW-1:0] saddr_q;
  logic [LEN_W-1:0]   len_q, rd_cnt_q, sent_q;
  logic               auth_sent_q, deny_q;

  // line buffer
  logic [LINE_W-1:0]  buf_q [BUF_DEPTH];
  logic [BW-1:0]      bw_q, br_q;
  logic [BW:0]        bcnt_q;
  logic [BW:0]        infl_q;   // reads accepted, answer not yet back

  logic rd_fire, push, pop, rsp_mine;

  assign cmd_ready = (state_q == S_IDLE);

  assign rd_fire   = spad_valid && spad_ready;
  assign push      = spad_rsp_valid;
  assign spad_valid = ((state_q == S_WAIT_SPAD) || (state_q == S_SEND_DATA)) &&
                      (rd_cnt_q != len_q) &&
                      (32'(bcnt_q) + 32'(infl_q) < BUF_DEPTH);
  assign spad_req.we    = 1'b0;
  assign spad_req.clr   = 1'b0;
  assign spad_req.id    = core_id;
  assign spad_req.addr  = saddr_q + SPAD_AW'(rd_cnt_q);
  assign spad_req.wdata = '0;

  always_comb begin
    inj_flit       = '0;
    inj_flit.dst_x = dx_q;
    inj_flit.dst_y = dy_q;
    inj_flit.src_x = COORD_W'(X);
    inj_flit.src_y = COORD_W'(Y);
    inj_flit.id    = core_id;
    inj_flit.len   = len_q;
    if (state_q == S_PEEPHOLE) begin
      inj_valid     = !auth_sent_q;
      inj_flit.head = 1'b1;
      inj_flit.tail = 1'b1;
      inj_flit.kind = FK_AUTH_REQ;
    end else begin
      inj_valid     = (state_q == S_SEND_DATA) && (bcnt_q != '0);
      inj_flit.head = (sent_q == '0);
      inj_flit.tail = (sent_q == len_q - 1'b1);
      inj_flit.kind = FK_DATA;
      inj_flit.data = buf_q[br_q];
    end
  end

  assign pop      = (state_q == S_SEND_DATA) && inj_valid && inj_ready;
  assign rsp_mine = rsp_valid && (rsp_flit.src_x == dx_q) && (rsp_flit.src_y == dy_q);

  always_ff @(posedge clk) begin
    if (push) buf_q[bw_q] <= spad_rsp.rdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      dx_q        <= '0;
      dy_q        <= '0;
      saddr_q     <= '0;
      len_q       <= '0;
      rd_cnt_q    <= '0;
      sent_q      <= '0;
      auth_sent_q <= 1'b0;
      deny_q      <= 1'b0;
      bw_q        <= '0;
      br_q        <= '0;
      bcnt_q      <= '0;
      infl_q      <= '0;
      done        <= 1'b0;
      done_status <= NOC_DONE;
    end else begin
      done <= 1'b0;
      if (rd_fire) rd_cnt_q <= rd_cnt_q + 1'b1;
      infl_q <= infl_q + (BW+1)'(rd_fire) - (BW+1)'(push);
      bcnt_q <= bcnt_q + (BW+1)'(push) - (BW+1)'(pop);
      if (push) begin
        bw_q <= (32'(bw_q) == BUF_DEPTH - 1) ? '0 : bw_q + 1'b1;
        if (spad_rsp.denied) deny_q <= 1'b1;
      end
      if (pop) begin
        br_q   <= (32'(br_q) == BUF_DEPTH - 1) ? '0 : br_q + 1'b1;
        sent_q <= sent_q + 1'b1;
      end
      unique case (state_q)
        S_IDLE: if (cmd_valid) begin
          dx_q        <= cmd_dst_x;
          dy_q        <= cmd_dst_y;
          saddr_q     <= cmd_spad_addr;
          len_q       <= cmd_len;
          rd_cnt_q    <= '0;
          sent_q      <= '0;
          auth_sent_q <= 1'b0;
          deny_q      <= 1'b0;
          if (cmd_len == '0) begin
            done        <= 1'b1;
            done_status <= NOC_DONE;
          end else begin
            state_q <= S_PEEPHOLE;
          end
        end
        S_PEEPHOLE: begin
          if (inj_valid && inj_ready) auth_sent_q <= 1'b1;
          if (auth_sent_q && rsp_mine) begin
            unique case (rsp_flit.kind)
              FK_AUTH_ACK: state_q <= S_WAIT_SPAD;
              FK_NACK_DENY: begin
                done        <= 1'b1;
                done_status <= NOC_DENIED;
                state_q     <= S_IDLE;
              end
              FK_NACK_BUSY: begin
                done        <= 1'b1;
                done_status <= NOC_BUSY;
                state_q     <= S_IDLE;
              end
              default: ;
            endcase
          end
        end
        S_WAIT_SPAD: if (bcnt_q != '0) state_q <= S_SEND_DATA;
        S_SEND_DATA: if (pop && inj_flit.tail) begin
          done        <= 1'b1;
          done_status <= (deny_q || (push && spad_rsp.denied)) ? NOC_SPAD_DENY : NOC_DONE;
          state_q     <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
