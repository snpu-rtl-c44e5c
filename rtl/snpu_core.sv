// snpu_core: the security shell of one NPU core.
//
// Blocks and connections:
//   secure_controller  takes CPU commands, holds the core's ID state and
//                      programs the NPU Guarder; runs secure scratchpad
//                      clears.
//   npu_guarder        translates and checks each DMA request once.
//   dma_engine         moves permitted requests in 64-byte packets between
//                      the memory port and the scratchpad.
//   router_controller  NoC send/receive engines with peephole
//                      authentication, and this core's mesh router.
//   spad_arbiter       shares the core's scratchpad port, fixed priority:
//                      secure clear, NoC receive, NoC send, DMA, and the
//                      compute port (ext_*), which stands in for the matrix
//                      unit. Every request carries the core's ID state.
//   spad_bank          the local (exclusive) scratchpad.
// A scratchpad address with its MSB set goes to the global (shared)
// scratchpad through the gs_* port instead of the local bank. Both answer
// one cycle after acceptance.
//
// dma_done pulses once per DMA request: with the guarder's fault, or with
// the DMA engine's result. The arbiter order and the address-MSB split
// between local and global scratchpad are this design's choices.
module snpu_core
  import snpu_pkg::*;
#(
  parameter int unsigned X           = 0,
  parameter int unsigned Y           = 0,
  parameter int unsigned LOCAL_LINES = 16384,
  parameter int unsigned NUM_XLAT    = 3,
  parameter int unsigned NUM_CHK     = 2,
  parameter int unsigned RSP_DEPTH   = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  output id_e                core_id,
  // CPU commands (secure context)
  input  logic               cmd_valid,
  output logic               cmd_ready,
  input  cmd_t               cmd,
  output logic               cmd_done,
  output logic               cmd_err,
  // DMA requests (virtual addresses)
  input  logic               dma_valid,
  output logic               dma_ready,
  input  dma_req_t           dma_req,
  output logic               dma_done,
  output dma_status_e        dma_status,
  // NoC commands
  input  logic               send_valid,
  output logic               send_ready,
  input  logic [COORD_W-1:0] send_dst_x,
  input  logic [COORD_W-1:0] send_dst_y,
  input  logic [SPAD_AW-1:0] send_spad_addr,
  input  logic [LEN_W-1:0]   send_len,
  output logic               send_done,
  output noc_status_e        send_status,
  input  logic               recv_valid,
  output logic               recv_ready,
  input  logic [SPAD_AW-1:0] recv_spad_addr,
  input  logic [LEN_W-1:0]   recv_max_len,
  output logic               recv_done,
  output logic [COORD_W-1:0] recv_src_x,
  output logic [COORD_W-1:0] recv_src_y,
  output logic [LEN_W-1:0]   recv_len,
  output logic               recv_spad_deny,
  // compute-unit scratchpad port (ID state added here)
  input  logic               ext_valid,
  output logic               ext_ready,
  input  spad_req_t          ext_req,
  output logic               ext_rsp_valid,
  output spad_rsp_t          ext_rsp,
  // system memory
  output logic               mem_req_valid,
  input  logic               mem_req_ready,
  output logic               mem_req_we,
  output logic [ADDR_W-1:0]  mem_req_addr,
  output logic [MEM_W-1:0]   mem_req_wdata,
  input  logic               mem_rsp_valid,
  input  logic [MEM_W-1:0]   mem_rsp_rdata,
  // global scratchpad port
  output logic               gs_valid,
  input  logic               gs_ready,
  output spad_req_t          gs_req,
  input  logic               gs_rsp_valid,
  input  spad_rsp_t          gs_rsp,
  // mesh links: 0 north, 1 east, 2 south, 3 west
  input  logic               link_in_valid  [4],
  output logic               link_in_ready  [4],
  input  flit_t              link_in_flit   [4],
  output logic               link_out_valid [4],
  input  logic               link_out_ready [4],
  output flit_t              link_out_flit  [4],
  // event counters
  output logic [31:0]        n_checks,
  output logic [31:0]        n_packets,
  output logic [15:0]        n_auth_pass,
  output logic [15:0]        n_auth_deny,
  output logic [15:0]        n_busy,
  output logic [15:0]        n_dropped
);
  localparam int unsigned NREQ = 5;

  // ---------------- secure controller and guarder ----------------
  logic       xlat_we, chk_we;
  logic [3:0] xlat_idx, chk_idx;
  xlat_reg_t  xlat_wval;
  chk_reg_t   chk_wval;

  logic      a_valid [NREQ], a_ready [NREQ], a_rsp_valid [NREQ];
  spad_req_t a_req   [NREQ];
  spad_rsp_t a_rsp   [NREQ];

  secure_controller u_sc (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd,
    .done (cmd_done), .done_err (cmd_err), .core_id,
    .xlat_we, .xlat_idx, .xlat_wval, .chk_we, .chk_idx, .chk_wval,
    .spad_valid (a_valid[0]), .spad_ready (a_ready[0]), .spad_req (a_req[0]),
    .spad_rsp_valid (a_rsp_valid[0])
  );

  logic        g_valid, g_ready, g_fault;
  dma_req_t    g_req;
  dma_status_e g_fault_status;
  logic        d_done;
  dma_status_e d_status;

  npu_guarder #(.NUM_XLAT(NUM_XLAT), .NUM_CHK(NUM_CHK)) u_guard (
    .clk, .rst_n,
    .xlat_we, .xlat_idx, .xlat_wval, .chk_we, .chk_idx, .chk_wval,
    .in_valid (dma_valid), .in_ready (dma_ready), .in_req (dma_req),
    .out_valid (g_valid), .out_ready (g_ready), .out_req (g_req),
    .fault_valid (g_fault), .fault_status (g_fault_status),
    .checks (n_checks)
  );

  dma_engine u_dma (
    .clk, .rst_n, .core_id,
    .req_valid (g_valid), .req_ready (g_ready), .req (g_req),
    .done (d_done), .done_status (d_status),
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata,
    .mem_rsp_valid, .mem_rsp_rdata,
    .spad_valid (a_valid[3]), .spad_ready (a_ready[3]), .spad_req (a_req[3]),
    .spad_rsp_valid (a_rsp_valid[3]), .spad_rsp (a_rsp[3]),
    .packets (n_packets)
  );

  assign dma_done   = g_fault || d_done;
  assign dma_status = g_fault ? g_fault_status : d_status;

  // ---------------- NoC ----------------
  router_controller #(.X(X), .Y(Y), .RSP_DEPTH(RSP_DEPTH)) u_rc (
    .clk, .rst_n, .core_id,
    .send_valid, .send_ready, .send_dst_x, .send_dst_y, .send_spad_addr, .send_len,
    .send_done, .send_status,
    .recv_valid, .recv_ready, .recv_spad_addr, .recv_max_len,
    .recv_done, .recv_src_x, .recv_src_y, .recv_len, .recv_spad_deny,
    .n_auth_pass, .n_auth_deny, .n_busy, .n_dropped,
    .ss_valid (a_valid[2]), .ss_ready (a_ready[2]), .ss_req (a_req[2]),
    .ss_rsp_valid (a_rsp_valid[2]), .ss_rsp (a_rsp[2]),
    .rs_valid (a_valid[1]), .rs_ready (a_ready[1]), .rs_req (a_req[1]),
    .rs_rsp_valid (a_rsp_valid[1]), .rs_rsp (a_rsp[1]),
    .link_in_valid, .link_in_ready, .link_in_flit,
    .link_out_valid, .link_out_ready, .link_out_flit
  );

  // ---------------- compute port ----------------
  always_comb begin
    a_valid[4]    = ext_valid;
    a_req[4]      = ext_req;
    a_req[4].id   = core_id;
    a_req[4].clr  = 1'b0;       // clears only through the secure controller
    ext_ready     = a_ready[4];
    ext_rsp_valid = a_rsp_valid[4];
    ext_rsp       = a_rsp[4];
  end

  // ---------------- scratchpad port ----------------
  logic      p_valid, p_ready, p_rsp_valid;
  spad_req_t p_req;
  spad_rsp_t p_rsp;

  spad_arbiter #(.N(NREQ), .ROUND_ROBIN(1'b0)) u_arb (
    .clk, .rst_n,
    .in_valid (a_valid), .in_ready (a_ready), .in_req (a_req),
    .in_rsp_valid (a_rsp_valid), .in_rsp (a_rsp),
    .out_valid (p_valid), .out_ready (p_ready), .out_req (p_req),
    .out_rsp_valid (p_rsp_valid), .out_rsp (p_rsp)
  );

  logic      is_global;
  logic      l_valid, l_ready, l_rsp_valid;
  spad_rsp_t l_rsp;

  assign is_global = p_req.addr[SPAD_AW-1];
  assign l_valid   = p_valid && !is_global;
  assign gs_valid  = p_valid && is_global;
  assign gs_req    = p_req;
  assign p_ready   = is_global ? gs_ready : l_ready;
  assign p_rsp_valid = l_rsp_valid || gs_rsp_valid;
  assign p_rsp       = l_rsp_valid ? l_rsp : gs_rsp;

  spad_bank #(.DEPTH(LOCAL_LINES), .SHARED(1'b0)) u_spad (
    .clk, .rst_n,
    .req_valid (l_valid), .req_ready (l_ready), .req (p_req),
    .rsp_valid (l_rsp_valid), .rsp (l_rsp)
  );

endmodule
