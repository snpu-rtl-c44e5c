// tb_snpu_core: one NPU core with a system memory model, a one-cycle
// global scratchpad model and its NoC links tied off. Walks through the
// core's secure life cycle:
//  - a normal-world attempt to make the core secure is refused;
//  - the secure world makes it secure and programs translation and checking
//    registers; a normal-world attempt to rewrite them is refused;
//  - a DMA load inside the permitted range lands in the scratchpad, one
//    outside any translation register faults, one onto a read-only region
//    used as a store faults with a permission fault;
//  - a DMA store writes the scratchpad back to memory;
//  - after the secure world returns the core to normal, the secure lines
//    are refused to the compute port until they are cleared;
//  - a NoC transfer from the core to itself passes the peephole;
//  - an address with the top bit set is steered to the global port.
//
// Timing: clock period 10 time units; stimulus changes on the falling edge.
// The rules checked are the design's; the stimulus, the reference values
// and the pass/fail line (TB_RESULT checks=N failures=M, with a watchdog
// that counts as a failure) are this testbench's own.
module tb_snpu_core;
  import snpu_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  id_e                core_id;
  logic               cmd_valid = 1'b0, cmd_ready, cmd_done, cmd_err;
  cmd_t               cmd = '0;
  logic               dma_valid = 1'b0, dma_ready, dma_done;
  dma_req_t           dma_req = '0;
  dma_status_e        dma_status;
  logic               send_valid = 1'b0, send_ready, send_done;
  logic [COORD_W-1:0] send_dst_x = '0, send_dst_y = '0;
  logic [SPAD_AW-1:0] send_spad_addr = '0, recv_spad_addr = '0;
  logic [LEN_W-1:0]   send_len = '0, recv_max_len = '0, recv_len;
  noc_status_e        send_status;
  logic               recv_valid = 1'b0, recv_ready, recv_done, recv_spad_deny;
  logic [COORD_W-1:0] recv_src_x, recv_src_y;
  logic               ext_valid = 1'b0, ext_ready, ext_rsp_valid;
  spad_req_t          ext_req = '0;
  spad_rsp_t          ext_rsp;
  logic               mem_req_valid [1], mem_req_ready [1], mem_req_we [1], mem_rsp_valid [1];
  logic [ADDR_W-1:0]  mem_req_addr [1];
  logic [MEM_W-1:0]   mem_req_wdata [1], mem_rsp_rdata [1];
  logic               gs_valid, gs_ready = 1'b1, gs_rsp_valid = 1'b0;
  spad_req_t          gs_req;
  spad_rsp_t          gs_rsp = '0;
  logic               liv [4], lir [4], lov [4], lor [4];
  flit_t              lif [4], lof [4];
  logic [31:0]        n_checks, n_packets;
  logic [15:0]        n_pass, n_deny, n_busy, n_drop;
  int                 n_reads, n_writes;

  always_comb
    for (int d = 0; d < 4; d++) begin
      liv[d] = 1'b0; lif[d] = '0; lor[d] = 1'b1;
    end

  snpu_core #(.X(0), .Y(0), .LOCAL_LINES(256), .RSP_DEPTH(4)) dut (
    .clk, .rst_n, .core_id,
    .cmd_valid, .cmd_ready, .cmd, .cmd_done, .cmd_err,
    .dma_valid, .dma_ready, .dma_req, .dma_done, .dma_status,
    .send_valid, .send_ready, .send_dst_x, .send_dst_y, .send_spad_addr, .send_len,
    .send_done, .send_status,
    .recv_valid, .recv_ready, .recv_spad_addr, .recv_max_len,
    .recv_done, .recv_src_x, .recv_src_y, .recv_len, .recv_spad_deny,
    .ext_valid, .ext_ready, .ext_req, .ext_rsp_valid, .ext_rsp,
    .mem_req_valid (mem_req_valid[0]), .mem_req_ready (mem_req_ready[0]),
    .mem_req_we (mem_req_we[0]), .mem_req_addr (mem_req_addr[0]),
    .mem_req_wdata (mem_req_wdata[0]), .mem_rsp_valid (mem_rsp_valid[0]),
    .mem_rsp_rdata (mem_rsp_rdata[0]),
    .gs_valid, .gs_ready, .gs_req, .gs_rsp_valid, .gs_rsp,
    .link_in_valid (liv), .link_in_ready (lir), .link_in_flit (lif),
    .link_out_valid (lov), .link_out_ready (lor), .link_out_flit (lof),
    .n_checks, .n_packets, .n_auth_pass (n_pass), .n_auth_deny (n_deny),
    .n_busy, .n_dropped (n_drop));

  sys_mem_model #(.NP(1)) u_mem (
    .clk, .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata,
    .mem_rsp_valid, .mem_rsp_rdata, .n_reads, .n_writes);

  // global scratchpad stand-in: echoes the address as data
  int n_gs = 0;
  always @(posedge clk) begin
    gs_rsp_valid <= rst_n && gs_valid && gs_ready;
    gs_rsp       <= '{denied: 1'b0, rdata: LINE_W'(gs_req.addr)};
    if (rst_n && gs_valid && gs_ready) n_gs++;
  end

  task automatic do_cmd(cmd_op_e op, logic sec, int idx, logic en, perm_t perm,
                        logic [31:0] a0, logic [31:0] a1, logic [31:0] a2, output logic err);
    @(negedge clk);
    cmd_valid = 1'b1;
    cmd = '{op: op, secure: sec, idx: 4'(idx), en: en, perm: perm, a0: a0, a1: a1, a2: a2};
    while (!cmd_ready) @(negedge clk);
    @(negedge clk);
    cmd_valid = 1'b0;
    while (!cmd_done) @(negedge clk);
    err = cmd_err;
  endtask

  task automatic do_dma(logic store, logic [31:0] addr, int npkt, int sa, output dma_status_e s);
    @(negedge clk);
    dma_valid = 1'b1;
    dma_req = '{store: store, addr: addr, npkt: LEN_W'(npkt), spad_addr: SPAD_AW'(sa)};
    #1;
    while (!dma_ready) @(negedge clk);
    @(negedge clk);
    dma_valid = 1'b0;
    while (!dma_done) @(negedge clk);
    s = dma_status;
  endtask

  task automatic ext(logic we, int a, logic [LINE_W-1:0] d, output spad_rsp_t r);
    @(negedge clk);
    ext_valid = 1'b1;
    ext_req = '{we: we, clr: 1'b0, id: ID_NORMAL, addr: SPAD_AW'(a), wdata: d};
    #1;
    while (!ext_ready) @(negedge clk);
    @(negedge clk);
    ext_valid = 1'b0;
    while (!ext_rsp_valid) @(negedge clk);
    r = ext_rsp;
  endtask

  initial begin
    logic err;
    dma_status_e s;
    spad_rsp_t r;
    logic [MEM_W-1:0] w;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check("starts normal", core_id == ID_NORMAL);
    do_cmd(CMD_SET_ID, 1'b0, 0, 1'b0, '0, 1, 0, 0, err);
    check("normal world cannot make core secure", err && core_id == ID_NORMAL);
    do_cmd(CMD_SET_ID, 1'b1, 0, 1'b0, '0, 1, 0, 0, err);
    check("secure world makes core secure", !err && core_id == ID_SECURE);
    do_cmd(CMD_SET_XLAT, 1'b1, 0, 1'b1, '0, 32'h1000_0000, 32'h8000_0000, 32'h1000, err);
    check("secure xlat write", !err);
    do_cmd(CMD_SET_CHK, 1'b1, 0, 1'b1, '{r: 1'b1, w: 1'b1}, 32'h8000_0000, 32'h800, 0, err);
    do_cmd(CMD_SET_CHK, 1'b1, 1, 1'b1, '{r: 1'b1, w: 1'b0}, 32'h8000_0800, 32'h800, 0, err);
    check("secure chk write", !err);
    do_cmd(CMD_SET_XLAT, 1'b0, 0, 1'b1, '0, 32'h1000_0000, 32'h9000_0000, 32'h1000, err);
    check("normal world cannot retarget a secure core", err);
    do_cmd(CMD_SET_CHK, 1'b0, 0, 1'b1, '{r: 1'b1, w: 1'b1}, 0, 32'hFFFF_FFFF, 0, err);
    check("normal world cannot widen checks", err);
    // DMA load 4 packets (16 lines) to line 8
    do_dma(1'b0, 32'h1000_0000, 4, 8, s);
    check("load ok", s == DMA_OK && n_checks == 1 && n_packets == 4);
    for (int l = 0; l < 16; l++) begin
      w = u_mem.pattern(32'h8000_0000 + 32'(64 * (l / 4)));
      ext(1'b0, 8 + l, '0, r);
      check("loaded line", !r.denied && r.rdata == w[128 * (l % 4) +: 128]);
    end
    do_dma(1'b0, 32'h2000_0000, 1, 0, s);
    check("untranslated address faults", s == DMA_XLAT_FAULT && n_packets == 4);
    do_dma(1'b1, 32'h1000_0800, 1, 8, s);
    check("store to read-only region faults", s == DMA_PERM_FAULT && n_packets == 4);
    do_dma(1'b0, 32'h1000_0800, 1, 40, s);
    check("load from read-only region ok", s == DMA_OK);
    do_dma(1'b1, 32'h1000_0100, 2, 8, s);
    check("store ok", s == DMA_OK && n_checks == 5);
    w = u_mem.peek(32'h8000_0100);
    check("stored packet", w == u_mem.pattern(32'h8000_0000));
    // NoC loopback while secure
    @(negedge clk);
    recv_valid = 1'b1; recv_spad_addr = 16'd100; recv_max_len = 16'd16;
    @(negedge clk);
    recv_valid = 1'b0;
    send_valid = 1'b1; send_dst_x = '0; send_dst_y = '0; send_spad_addr = 16'd8; send_len = 16'd16;
    while (!send_ready) @(negedge clk);
    @(negedge clk);
    send_valid = 1'b0;
    while (!send_done) @(negedge clk);
    check("loopback transfer", send_status == NOC_DONE && n_pass == 1);
    repeat (5) @(negedge clk);
    for (int l = 0; l < 16; l++) begin
      w = u_mem.pattern(32'h8000_0000 + 32'(64 * (l / 4)));
      ext(1'b0, 100 + l, '0, r);
      check("moved line", !r.denied && r.rdata == w[128 * (l % 4) +: 128]);
    end
    // back to normal: secure lines are refused until cleared
    do_cmd(CMD_SET_ID, 1'b1, 0, 1'b0, '0, 0, 0, 0, err);
    check("back to normal", !err && core_id == ID_NORMAL);
    ext(1'b0, 9, '0, r);
    check("secure line refused to normal core", r.denied && r.rdata == '0);
    do_cmd(CMD_SPAD_CLR, 1'b0, 0, 1'b0, '0, 8, 16, 0, err);
    check("normal world cannot clear", err);
    do_cmd(CMD_SPAD_CLR, 1'b1, 0, 1'b0, '0, 8, 16, 0, err);
    check("secure clear", !err);
    ext(1'b0, 9, '0, r);
    check("cleared line readable, zero", !r.denied && r.rdata == '0);
    ext(1'b0, 41, '0, r);
    check("uncleared secure line still refused", r.denied && r.rdata == '0);
    // global steering
    ext(1'b0, 16'h8005, '0, r);
    check("global port used", n_gs == 1 && r.rdata == LINE_W'(16'h8005));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
