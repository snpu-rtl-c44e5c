// snpu_top: a multi-core secure NPU.
//
// MESH_X x MESH_Y NPU cores (ten by default, as in the evaluated system)
// sit on a 2-D mesh NoC. Each core has its own ID state, NPU Guarder, DMA
// engine, local ID-tagged scratchpad and router controller with peephole
// authentication, and all cores share one ID-tagged global scratchpad.
// Core c sits at x = c % MESH_X, y = c / MESH_X; north is y+1, east x+1.
// Links leaving the mesh edge are tied off: nothing enters, and anything
// sent off the edge (only possible with a destination outside the mesh) is
// dropped.
//
// All per-core ports are arrays indexed by core. Not designed here and so
// brought out as ports: the CPU-side command streams (cmd_*, with the
// issuing world in cmd.secure), the system memory behind each core's DMA
// engine (mem_*), and the matrix unit's scratchpad port (ext_*). The 5 x 2
// arrangement of the ten cores and the shared scratchpad size are this
// design's choices.
module snpu_top
  import snpu_pkg::*;
#(
  parameter int unsigned MESH_X       = 5,
  parameter int unsigned MESH_Y       = 2,
  parameter int unsigned LOCAL_LINES  = 16384,
  parameter int unsigned GLOBAL_LINES = 4096,
  parameter int unsigned NUM_XLAT     = 3,
  parameter int unsigned NUM_CHK      = 2,
  localparam int unsigned NC          = MESH_X * MESH_Y
) (
  input  logic               clk,
  input  logic               rst_n,
  output id_e                core_id        [NC],
  input  logic               cmd_valid      [NC],
  output logic               cmd_ready      [NC],
  input  cmd_t               cmd            [NC],
  output logic               cmd_done       [NC],
  output logic               cmd_err        [NC],
  input  logic               dma_valid      [NC],
  output logic               dma_ready      [NC],
  input  dma_req_t           dma_req        [NC],
  output logic               dma_done       [NC],
  output dma_status_e        dma_status     [NC],
  input  logic               send_valid     [NC],
  output logic               send_ready     [NC],
  input  logic [COORD_W-1:0] send_dst_x     [NC],
  input  logic [COORD_W-1:0] send_dst_y     [NC],
  input  logic [SPAD_AW-1:0] send_spad_addr [NC],
  input  logic [LEN_W-1:0]   send_len       [NC],
  output logic               send_done      [NC],
  output noc_status_e        send_status    [NC],
  input  logic               recv_valid     [NC],
  output logic               recv_ready     [NC],
  input  logic [SPAD_AW-1:0] recv_spad_addr [NC],
  input  logic [LEN_W-1:0]   recv_max_len   [NC],
  output logic               recv_done      [NC],
  output logic [COORD_W-1:0] recv_src_x     [NC],
  output logic [COORD_W-1:0] recv_src_y     [NC],
  output logic [LEN_W-1:0]   recv_len       [NC],
  output logic               recv_spad_deny [NC],
  input  logic               ext_valid      [NC],
  output logic               ext_ready      [NC],
  input  spad_req_t          ext_req        [NC],
  output logic               ext_rsp_valid  [NC],
  output spad_rsp_t          ext_rsp        [NC],
  output logic               mem_req_valid  [NC],
  input  logic               mem_req_ready  [NC],
  output logic               mem_req_we     [NC],
  output logic [ADDR_W-1:0]  mem_req_addr   [NC],
  output logic [MEM_W-1:0]   mem_req_wdata  [NC],
  input  logic               mem_rsp_valid  [NC],
  input  logic [MEM_W-1:0]   mem_rsp_rdata  [NC],
  output logic [31:0]        n_checks       [NC],
  output logic [31:0]        n_packets      [NC],
  output logic [15:0]        n_auth_pass    [NC],
  output logic [15:0]        n_auth_deny    [NC],
  output logic [15:0]        n_busy         [NC],
  output logic [15:0]        n_dropped      [NC]
);
  localparam int unsigned D_N = 0, D_E = 1, D_S = 2, D_W = 3;

  logic  li_valid [NC][4], li_ready [NC][4];
  flit_t li_flit  [NC][4];
  logic  lo_valid [NC][4], lo_ready [NC][4];
  flit_t lo_flit  [NC][4];

  logic      gs_valid [NC], gs_ready [NC], gs_rsp_valid [NC];
  spad_req_t gs_req   [NC];
  spad_rsp_t gs_rsp   [NC];

  // mesh wiring: each input takes the facing output of the neighbour
  always_comb begin
    for (int unsigned y = 0; y < MESH_Y; y++) begin
      for (int unsigned x = 0; x < MESH_X; x++) begin
        int unsigned c;
        c = y * MESH_X + x;
        for (int unsigned d = 0; d < 4; d++) begin
          li_valid[c][d] = 1'b0;
          li_flit[c][d]  = '0;
          lo_ready[c][d] = 1'b1;
        end
        if (y + 1 < MESH_Y) begin
          li_valid[c][D_N] = lo_valid[c + MESH_X][D_S];
          li_flit[c][D_N]  = lo_flit[c + MESH_X][D_S];
          lo_ready[c][D_N] = li_ready[c + MESH_X][D_S];
        end
        if (y > 0) begin
          li_valid[c][D_S] = lo_valid[c - MESH_X][D_N];
          li_flit[c][D_S]  = lo_flit[c - MESH_X][D_N];
          lo_ready[c][D_S] = li_ready[c - MESH_X][D_N];
        end
        if (x + 1 < MESH_X) begin
          li_valid[c][D_E] = lo_valid[c + 1][D_W];
          li_flit[c][D_E]  = lo_flit[c + 1][D_W];
          lo_ready[c][D_E] = li_ready[c + 1][D_W];
        end
        if (x > 0) begin
          li_valid[c][D_W] = lo_valid[c - 1][D_E];
          li_flit[c][D_W]  = lo_flit[c - 1][D_E];
          lo_ready[c][D_W] = li_ready[c - 1][D_E];
        end
      end
    end
  end

  for (genvar c = 0; c < NC; c++) begin : g_core
    snpu_core #(
      .X (c % MESH_X), .Y (c / MESH_X),
      .LOCAL_LINES (LOCAL_LINES), .NUM_XLAT (NUM_XLAT), .NUM_CHK (NUM_CHK),
      .RSP_DEPTH (NC < 2 ? 2 : NC)
    ) u_core (
      .clk, .rst_n,
      .core_id (core_id[c]),
      .cmd_valid (cmd_valid[c]), .cmd_ready (cmd_ready[c]), .cmd (cmd[c]),
      .cmd_done (cmd_done[c]), .cmd_err (cmd_err[c]),
      .dma_valid (dma_valid[c]), .dma_ready (dma_ready[c]), .dma_req (dma_req[c]),
      .dma_done (dma_done[c]), .dma_status (dma_status[c]),
      .send_valid (send_valid[c]), .send_ready (send_ready[c]),
      .send_dst_x (send_dst_x[c]), .send_dst_y (send_dst_y[c]),
      .send_spad_addr (send_spad_addr[c]), .send_len (send_len[c]),
      .send_done (send_done[c]), .send_status (send_status[c]),
      .recv_valid (recv_valid[c]), .recv_ready (recv_ready[c]),
      .recv_spad_addr (recv_spad_addr[c]), .recv_max_len (recv_max_len[c]),
      .recv_done (recv_done[c]), .recv_src_x (recv_src_x[c]), .recv_src_y (recv_src_y[c]),
      .recv_len (recv_len[c]), .recv_spad_deny (recv_spad_deny[c]),
      .ext_valid (ext_valid[c]), .ext_ready (ext_ready[c]), .ext_req (ext_req[c]),
      .ext_rsp_valid (ext_rsp_valid[c]), .ext_rsp (ext_rsp[c]),
      .mem_req_valid (mem_req_valid[c]), .mem_req_ready (mem_req_ready[c]),
      .mem_req_we (mem_req_we[c]), .mem_req_addr (mem_req_addr[c]),
      .mem_req_wdata (mem_req_wdata[c]),
      .mem_rsp_valid (mem_rsp_valid[c]), .mem_rsp_rdata (mem_rsp_rdata[c]),
      .gs_valid (gs_valid[c]), .gs_ready (gs_ready[c]), .gs_req (gs_req[c]),
      .gs_rsp_valid (gs_rsp_valid[c]), .gs_rsp (gs_rsp[c]),
      .link_in_valid (li_valid[c]), .link_in_ready (li_ready[c]), .link_in_flit (li_flit[c]),
      .link_out_valid (lo_valid[c]), .link_out_ready (lo_ready[c]), .link_out_flit (lo_flit[c]),
      .n_checks (n_checks[c]), .n_packets (n_packets[c]),
      .n_auth_pass (n_auth_pass[c]), .n_auth_deny (n_auth_deny[c]),
      .n_busy (n_busy[c]), .n_dropped (n_dropped[c])
    );
  end

  global_spad #(.NUM_PORTS(NC), .DEPTH(GLOBAL_LINES)) u_gspad (
    .clk, .rst_n,
    .req_valid (gs_valid), .req_ready (gs_ready), .req (gs_req),
    .rsp_valid (gs_rsp_valid), .rsp (gs_rsp)
  );

endmodule
