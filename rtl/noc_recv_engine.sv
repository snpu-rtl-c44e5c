// noc_recv_engine: the receiving half of a core's router controller; it
// holds the peephole that authenticates incoming transfers.
//
// States, mirroring the send engine:
//   IDLE           waits to be armed with a first scratchpad line and the
//                  largest transfer it will take.
//   PEEPHOLE       waits for an authentication request. The request passes
//                  if its ID state equals this core's ID state and its
//                  length fits; the engine answers ACK, locks onto the
//                  requesting core (the receive lock in the router map) and
//                  goes to RECEIVE_DATA. A failing request is answered
//                  NACK_DENY and the engine keeps waiting.
//   RECEIVE_DATA   writes each data flit from the locked source to the next
//                  scratchpad line, with this core's ID state. Data flits
//                  from any other source are dropped and counted.
//   SPAD_COMPLETE  after the tail flit, waits for the last scratchpad write
//                  to complete, reports done and returns to IDLE.
// A request arriving while the engine is not in PEEPHOLE (not armed, or
// locked to another source) is answered NACK_BUSY.
//
// The state sequence and the ID comparison follow the design description.
// That a normal core's request to a secure core is refused as well (IDs
// must be equal), the length check and the BUSY answer are this design's
// choices. Answers wait in a RSP_DEPTH-entry queue; with at most one
// outstanding request per source, a depth of at least the core count means
// ejection never waits on injection, which keeps the network deadlock-free.
//
// Interface: arm valid/ready (ready in IDLE); done pulses one cycle with the
// source and line count. ej_* are flits ejected for this engine; rsp_* are
// answers to inject. The scratchpad port answers one cycle after
// acceptance.
//
// Answer flits carry no data (constant zero data field), and the data
// returned by a scratchpad write response is not needed: only its denied
// flag is read. The destination fields of ejected flits are not re-checked
// (the router only ejects flits addressed to this core).
module noc_recv_engine
  import snpu_pkg::*;
#(
  parameter int unsigned X         = 0,
  parameter int unsigned Y         = 0,
  parameter int unsigned RSP_DEPTH = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  id_e                core_id,
  // arm
  input  logic               arm_valid,
  output logic               arm_ready,
  input  logic [SPAD_AW-1:0] arm_spad_addr,
  input  logic [LEN_W-1:0]   arm_max_len,
  output logic               done,
  output logic [COORD_W-1:0] done_src_x,
  output logic [COORD_W-1:0] done_src_y,
  output logic [LEN_W-1:0]   done_len,
  output logic               done_spad_deny,
  // network
  input  logic               ej_valid,
  output logic               ej_ready,
  input  flit_t              ej_flit,
  output logic               rsp_valid,
  input  logic               rsp_ready,
  output flit_t              rsp_flit,
  // scratchpad
  output logic               spad_valid,
  input  logic               spad_ready,
  output spad_req_t          spad_req,
  input  logic               spad_rsp_valid,
  input  spad_rsp_t          spad_rsp,
  // event counters
  output logic [15:0]        n_auth_pass,
  output logic [15:0]        n_auth_deny,
  output logic [15:0]        n_busy,
  output logic [15:0]        n_dropped
);
  typedef enum logic [1:0] {S_IDLE, S_PEEPHOLE, S_RECV_DATA, S_SPAD_COMPLETE} state_e;
  localparam int unsigned QW = $clog2(RSP_DEPTH);

  state_e             state_q;
  logic [SPAD_AW-1:0] base_q;
  logic [LEN_W-1:0]   max_q, cnt_q;
  logic [COORD_W-1:0] lx_q, ly_q;
  logic               deny_q;

  // answer queue
  flit_t         q_q [RSP_DEPTH];
  logic [QW-1:0] qw_q, qr_q;
  logic [QW:0]   qcnt_q;
  logic          q_full, q_push, q_pop;
  flit_t         answer;

  logic is_auth, is_data, from_lock, data_mine, pass;

  assign arm_ready = (state_q == S_IDLE);
  assign is_auth   = ej_valid && (ej_flit.kind == FK_AUTH_REQ);
  assign is_data   = ej_valid && (ej_flit.kind == FK_DATA);
  assign from_lock = (ej_flit.src_x == lx_q) && (ej_flit.src_y == ly_q);
  assign data_mine = is_data && (state_q == S_RECV_DATA) && from_lock;
  assign pass      = (state_q == S_PEEPHOLE) && (ej_flit.id == core_id) &&
                     (ej_flit.len <= max_q) && (ej_flit.len != '0);
  assign q_full    = (32'(qcnt_q) == RSP_DEPTH);

  always_comb begin
    if (is_auth)        ej_ready = !q_full;
    else if (data_mine) ej_ready = spad_ready;
    else                ej_ready = 1'b1;   // stray flits are dropped
  end

  assign spad_valid     = data_mine;
  assign spad_req.we    = 1'b1;
  assign spad_req.clr   = 1'b0;
  assign spad_req.id    = core_id;
  assign spad_req.addr  = base_q + SPAD_AW'(cnt_q);
  assign spad_req.wdata = ej_flit.data;

  always_comb begin
    answer       = '0;
    answer.head  = 1'b1;
    answer.tail  = 1'b1;
    answer.dst_x = ej_flit.src_x;
    answer.dst_y = ej_flit.src_y;
    answer.src_x = COORD_W'(X);
    answer.src_y = COORD_W'(Y);
    answer.id    = core_id;
    answer.len   = ej_flit.len;
    if (state_q != S_PEEPHOLE) answer.kind = FK_NACK_BUSY;
    else if (pass)             answer.kind = FK_AUTH_ACK;
    else                       answer.kind = FK_NACK_DENY;
  end

  assign q_push    = is_auth && !q_full;
  assign q_pop     = rsp_valid && rsp_ready;
  assign rsp_valid = (qcnt_q != '0);
  assign rsp_flit  = q_q[qr_q];

  always_ff @(posedge clk) begin
    if (q_push) q_q[qw_q] <= answer;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q        <= S_IDLE;
      base_q         <= '0;
      max_q          <= '0;
      cnt_q          <= '0;
      lx_q           <= '0;
      ly_q           <= '0;
      deny_q         <= 1'b0;
      qw_q           <= '0;
      qr_q           <= '0;
      qcnt_q         <= '0;
      done           <= 1'b0;
      done_src_x     <= '0;
      done_src_y     <= '0;
      done_len       <= '0;
      done_spad_deny <= 1'b0;
      n_auth_pass    <= '0;
      n_auth_deny    <= '0;
      n_busy         <= '0;
      n_dropped      <= '0;
    end else begin
      done   <= 1'b0;
      qcnt_q <= qcnt_q + (QW+1)'(q_push) - (QW+1)'(q_pop);
      if (q_push) qw_q <= (32'(qw_q) == RSP_DEPTH - 1) ? '0 : qw_q + 1'b1;
      if (q_pop)  qr_q <= (32'(qr_q) == RSP_DEPTH - 1) ? '0 : qr_q + 1'b1;
      if (spad_rsp_valid && spad_rsp.denied) deny_q <= 1'b1;
      if (is_data && !data_mine) n_dropped <= n_dropped + 1'b1;
      if (q_push) begin
        unique case (answer.kind)
          FK_AUTH_ACK:  n_auth_pass <= n_auth_pass + 1'b1;
          FK_NACK_DENY: n_auth_deny <= n_auth_deny + 1'b1;
          default:      n_busy      <= n_busy + 1'b1;
        endcase
      end
      unique case (state_q)
        S_IDLE: if (arm_valid) begin
          base_q  <= arm_spad_addr;
          max_q   <= arm_max_len;
          state_q <= S_PEEPHOLE;
        end
        S_PEEPHOLE: if (q_push && pass) begin
          lx_q    <= ej_flit.src_x;
          ly_q    <= ej_flit.src_y;
          cnt_q   <= '0;
          deny_q  <= 1'b0;
          state_q <= S_RECV_DATA;
        end
        S_RECV_DATA: if (data_mine && spad_ready) begin
          cnt_q <= cnt_q + 1'b1;
          if (ej_flit.tail) state_q <= S_SPAD_COMPLETE;
        end
        S_SPAD_COMPLETE: begin
          // the response to the last write arrives in this cycle
          done           <= 1'b1;
          done_src_x     <= lx_q;
          done_src_y     <= ly_q;
          done_len       <= cnt_q;
          done_spad_deny <= deny_q || (spad_rsp_valid && spad_rsp.denied);
          state_q        <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
