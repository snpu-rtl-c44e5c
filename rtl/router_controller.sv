// router_controller: one NPU core's NoC interface: a send engine and a
// receive engine (both with the peephole protocol), the mesh router, and
// the local injection and ejection steering between them.
//
// Ejection: authentication answers (ACK, NACK) go to the send engine, which
// always takes them; authentication requests and data go to the receive
// engine. Injection: the receive engine's answers and the send engine's
// flits share the router's local input. Once a data packet has started, it
// keeps the injection port until its tail flit (packets never interleave);
// between packets the answers go first. Mesh links are given per direction
// in the order north, east, south, west.
//
// The split into send engine, receive engine and router follows the
// design description of the router controller; the steering is this
// design's own.
//
// Many output bits are engine or router outputs passed straight through to
// the core's ports.
module router_controller
  import snpu_pkg::*;
#(
  parameter int unsigned X         = 0,
  parameter int unsigned Y         = 0,
  parameter int unsigned RSP_DEPTH = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  id_e                core_id,
  // send command
  input  logic               send_valid,
  output logic               send_ready,
  input  logic [COORD_W-1:0] send_dst_x,
  input  logic [COORD_W-1:0] send_dst_y,
  input  logic [SPAD_AW-1:0] send_spad_addr,
  input  logic [LEN_W-1:0]   send_len,
  output logic               send_done,
  output noc_status_e        send_status,
  // receive command
  input  logic               recv_valid,
  output logic               recv_ready,
  input  logic [SPAD_AW-1:0] recv_spad_addr,
  input  logic [LEN_W-1:0]   recv_max_len,
  output logic               recv_done,
  output logic [COORD_W-1:0] recv_src_x,
  output logic [COORD_W-1:0] recv_src_y,
  output logic [LEN_W-1:0]   recv_len,
  output logic               recv_spad_deny,
  output logic [15:0]        n_auth_pass,
  output logic [15:0]        n_auth_deny,
  output logic [15:0]        n_busy,
  output logic [15:0]        n_dropped,
  // scratchpad ports
  output logic               ss_valid,
  input  logic               ss_ready,
  output spad_req_t          ss_req,
  input  logic               ss_rsp_valid,
  input  spad_rsp_t          ss_rsp,
  output logic               rs_valid,
  input  logic               rs_ready,
  output spad_req_t          rs_req,
  input  logic               rs_rsp_valid,
  input  spad_rsp_t          rs_rsp,
  // mesh links: index 0 north, 1 east, 2 south, 3 west
  input  logic               link_in_valid  [4],
  output logic               link_in_ready  [4],
  input  flit_t              link_in_flit   [4],
  output logic               link_out_valid [4],
  input  logic               link_out_ready [4],
  output flit_t              link_out_flit  [4]
);
  logic  r_in_valid [NPORTS], r_in_ready [NPORTS];
  flit_t r_in_flit  [NPORTS];
  logic  r_out_valid[NPORTS], r_out_ready[NPORTS];
  flit_t r_out_flit [NPORTS];

  always_comb begin
    for (int unsigned d = 0; d < 4; d++) begin
      r_in_valid[d+1]   = link_in_valid[d];
      r_in_flit[d+1]    = link_in_flit[d];
      link_in_ready[d]  = r_in_ready[d+1];
      link_out_valid[d] = r_out_valid[d+1];
      link_out_flit[d]  = r_out_flit[d+1];
      r_out_ready[d+1]  = link_out_ready[d];
    end
  end

  noc_router #(.X(X), .Y(Y)) u_router (
    .clk, .rst_n,
    .in_valid (r_in_valid), .in_ready (r_in_ready), .in_flit (r_in_flit),
    .out_valid (r_out_valid), .out_ready (r_out_ready), .out_flit (r_out_flit)
  );

  // ---------------- ejection ----------------
  logic  ej_is_answer;
  logic  re_ej_ready;
  assign ej_is_answer = (r_out_flit[P_LOCAL].kind == FK_AUTH_ACK) ||
                        (r_out_flit[P_LOCAL].kind == FK_NACK_DENY) ||
                        (r_out_flit[P_LOCAL].kind == FK_NACK_BUSY);
  assign r_out_ready[P_LOCAL] = ej_is_answer ? 1'b1 : re_ej_ready;

  // ---------------- injection ----------------
  logic  se_inj_valid, se_inj_ready;
  flit_t se_inj_flit;
  logic  re_rsp_valid, re_rsp_ready;
  flit_t re_rsp_flit;
  logic  open_q;      // a send-engine data packet is partly injected
  logic  pick_rsp;

  assign pick_rsp = !open_q && re_rsp_valid;
  assign r_in_valid[P_LOCAL] = pick_rsp ? 1'b1 : se_inj_valid;
  assign r_in_flit[P_LOCAL]  = pick_rsp ? re_rsp_flit : se_inj_flit;
  assign re_rsp_ready = pick_rsp && r_in_ready[P_LOCAL];
  assign se_inj_ready = !pick_rsp && r_in_ready[P_LOCAL];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) open_q <= 1'b0;
    else if (se_inj_valid && se_inj_ready) open_q <= !se_inj_flit.tail;
  end

  noc_send_engine #(.X(X), .Y(Y)) u_send (
    .clk, .rst_n, .core_id,
    .cmd_valid (send_valid), .cmd_ready (send_ready),
    .cmd_dst_x (send_dst_x), .cmd_dst_y (send_dst_y),
    .cmd_spad_addr (send_spad_addr), .cmd_len (send_len),
    .done (send_done), .done_status (send_status),
    .inj_valid (se_inj_valid), .inj_ready (se_inj_ready), .inj_flit (se_inj_flit),
    .rsp_valid (r_out_valid[P_LOCAL] && ej_is_answer), .rsp_flit (r_out_flit[P_LOCAL]),
    .spad_valid (ss_valid), .spad_ready (ss_ready), .spad_req (ss_req),
    .spad_rsp_valid (ss_rsp_valid), .spad_rsp (ss_rsp)
  );

  noc_recv_engine #(.X(X), .Y(Y), .RSP_DEPTH(RSP_DEPTH)) u_recv (
    .clk, .rst_n, .core_id,
    .arm_valid (recv_valid), .arm_ready (recv_ready),
    .arm_spad_addr (recv_spad_addr), .arm_max_len (recv_max_len),
    .done (recv_done), .done_src_x (recv_src_x), .done_src_y (recv_src_y),
    .done_len (recv_len), .done_spad_deny (recv_spad_deny),
    .ej_valid (r_out_valid[P_LOCAL] && !ej_is_answer), .ej_ready (re_ej_ready),
    .ej_flit (r_out_flit[P_LOCAL]),
    .rsp_valid (re_rsp_valid), .rsp_ready (re_rsp_ready), .rsp_flit (re_rsp_flit),
    .spad_valid (rs_valid), .spad_ready (rs_ready), .spad_req (rs_req),
    .spad_rsp_valid (rs_rsp_valid), .spad_rsp (rs_rsp),
    .n_auth_pass, .n_auth_deny, .n_busy, .n_dropped
  );

endmodule
