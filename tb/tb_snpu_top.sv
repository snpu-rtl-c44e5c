// tb_snpu_top: end-to-end test of the full-size NPU (ten cores on a 5x2
// mesh, 16384-line scratchpad per core, shared global scratchpad), with no
// parameter overrides. One behavioural system memory serves all cores.
//
// Scenario: cores 0 and 9 (opposite corners) are made secure by the secure
// world and given guarder windows; core 4 stays normal. Every protection
// mechanism is exercised and counted:
//   cmd_refused   normal-world attempt to change a secure setting
//   guard_ok      DMA load/store passing translation and checking
//   xlat_fault    DMA outside every translation register
//   perm_fault    DMA store to a read-only region
//   local_deny    normal compute access to a secure scratchpad line
//   shared_lock   global line turned secure by a secure read, then refused
//                 to a normal core
//   clear         secure clear of scratchpad lines
//   auth_pass     peephole transfer between two secure cores (multi-hop)
//   auth_deny     normal core trying to send to a secure core
//   auth_busy     transfer to a core that is not ready to receive
//   parallel      several transfers crossing the mesh at once
// The test fails if any of these never happened. Transfer sizes of 16 to
// 512 lines are timed and the cycles per line printed; a transfer must not
// take more than one line per cycle plus a fixed set-up cost.
//
// Timing: clock period 10 time units; stimulus changes on the falling edge.
// The rules checked are the design's; the stimulus, the reference values
// and the pass/fail line (TB_RESULT checks=N failures=M, with a watchdog
// that counts as a failure) are this testbench's own.
module tb_snpu_top;
  import snpu_pkg::*;

  localparam int NC = 10;

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

  id_e                core_id [NC];
  logic               cmd_valid [NC], cmd_ready [NC], cmd_done [NC], cmd_err [NC];
  cmd_t               cmd [NC];
  logic               dma_valid [NC], dma_ready [NC], dma_done [NC];
  dma_req_t           dma_req [NC];
  dma_status_e        dma_status [NC];
  logic               send_valid [NC], send_ready [NC], send_done [NC];
  logic [COORD_W-1:0] send_dst_x [NC], send_dst_y [NC];
  logic [SPAD_AW-1:0] send_spad_addr [NC], recv_spad_addr [NC];
  logic [LEN_W-1:0]   send_len [NC], recv_max_len [NC], recv_len [NC];
  noc_status_e        send_status [NC];
  logic               recv_valid [NC], recv_ready [NC], recv_done [NC], recv_spad_deny [NC];
  logic [COORD_W-1:0] recv_src_x [NC], recv_src_y [NC];
  logic               ext_valid [NC], ext_ready [NC], ext_rsp_valid [NC];
  spad_req_t          ext_req [NC];
  spad_rsp_t          ext_rsp [NC];
  logic               mem_req_valid [NC], mem_req_ready [NC], mem_req_we [NC], mem_rsp_valid [NC];
  logic [ADDR_W-1:0]  mem_req_addr [NC];
  logic [MEM_W-1:0]   mem_req_wdata [NC], mem_rsp_rdata [NC];
  logic [31:0]        n_checks [NC], n_packets [NC];
  logic [15:0]        n_auth_pass [NC], n_auth_deny [NC], n_busy [NC], n_dropped [NC];
  int                 n_reads, n_writes;

  snpu_top dut (.*);

  sys_mem_model #(.NP(NC)) u_mem (
    .clk, .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata,
    .mem_rsp_valid, .mem_rsp_rdata, .n_reads, .n_writes);

  // mechanism counters
  int m_cmd_refused = 0, m_guard_ok = 0, m_xlat_fault = 0, m_perm_fault = 0;
  int m_local_deny = 0, m_shared_lock = 0, m_clear = 0, m_auth_pass = 0;
  int m_auth_deny = 0, m_auth_busy = 0, m_parallel = 0;

  // ---------------- per-core driver tasks ----------------
  task automatic do_cmd(int c, cmd_op_e op, logic sec, int idx, logic en, perm_t perm,
                        logic [31:0] a0, logic [31:0] a1, logic [31:0] a2, output logic err);
    @(negedge clk);
    cmd_valid[c] = 1'b1;
    cmd[c] = '{op: op, secure: sec, idx: 4'(idx), en: en, perm: perm, a0: a0, a1: a1, a2: a2};
    #1;
    while (!cmd_ready[c]) @(negedge clk);
    @(negedge clk);
    cmd_valid[c] = 1'b0;
    while (!cmd_done[c]) @(negedge clk);
    err = cmd_err[c];
  endtask

  task automatic do_dma(int c, logic store, logic [31:0] addr, int npkt, int sa,
                        output dma_status_e s);
    @(negedge clk);
    dma_valid[c] = 1'b1;
    dma_req[c] = '{store: store, addr: addr, npkt: LEN_W'(npkt), spad_addr: SPAD_AW'(sa)};
    #1;
    while (!dma_ready[c]) @(negedge clk);
    @(negedge clk);
    dma_valid[c] = 1'b0;
    while (!dma_done[c]) @(negedge clk);
    s = dma_status[c];
  endtask

  task automatic ext(int c, logic we, int a, logic [LINE_W-1:0] d, output spad_rsp_t r);
    @(negedge clk);
    ext_valid[c] = 1'b1;
    ext_req[c] = '{we: we, clr: 1'b0, id: ID_NORMAL, addr: SPAD_AW'(a), wdata: d};
    #1;
    while (!ext_ready[c]) @(negedge clk);
    @(negedge clk);
    ext_valid[c] = 1'b0;
    while (!ext_rsp_valid[c]) @(negedge clk);
    r = ext_rsp[c];
  endtask

  task automatic arm(int c, int a, int n);
    @(negedge clk);
    recv_valid[c] = 1'b1; recv_spad_addr[c] = SPAD_AW'(a); recv_max_len[c] = LEN_W'(n);
    #1;
    while (!recv_ready[c]) @(negedge clk);
    @(negedge clk);
    recv_valid[c] = 1'b0;
  endtask

  // returns the status and the cycles from command to done
  task automatic xfer(int c, int dst, int a, int n, output noc_status_e s, output int cyc);
    @(negedge clk);
    send_valid[c] = 1'b1;
    send_dst_x[c] = COORD_W'(dst % 5); send_dst_y[c] = COORD_W'(dst / 5);
    send_spad_addr[c] = SPAD_AW'(a); send_len[c] = LEN_W'(n);
    #1;
    while (!send_ready[c]) @(negedge clk);
    cyc = 0;
    @(negedge clk);
    send_valid[c] = 1'b0;
    while (!send_done[c]) begin
      @(negedge clk);
      cyc++;
    end
    s = send_status[c];
  endtask

  // expected scratchpad contents after a DMA load of memory at pa
  function automatic logic [LINE_W-1:0] mem_line(logic [31:0] pa, int l);
    logic [MEM_W-1:0] w;
    w = u_mem.peek(pa + 32'(64 * (l / 4)));
    return w[128 * (l % 4) +: 128];
  endfunction

  task automatic make_secure(int c, logic [31:0] va, logic [31:0] pa);
    logic err;
    do_cmd(c, CMD_SET_ID, 1'b1, 0, 1'b0, '0, 1, 0, 0, err);
    check("set secure", !err && core_id[c] == ID_SECURE);
    do_cmd(c, CMD_SET_XLAT, 1'b1, 0, 1'b1, '0, va, pa, 32'h10000, err);
    do_cmd(c, CMD_SET_CHK, 1'b1, 0, 1'b1, '{r: 1'b1, w: 1'b1}, pa, 32'h8000, 0, err);
    do_cmd(c, CMD_SET_CHK, 1'b1, 1, 1'b1, '{r: 1'b1, w: 1'b0}, pa + 32'h8000, 32'h8000, 0, err);
    check("secure config", !err);
  endtask

  initial begin
    logic err;
    dma_status_e s;
    spad_rsp_t r;
    noc_status_e ns;
    int cyc;
    logic [LINE_W-1:0] d;
    for (int c = 0; c < NC; c++) begin
      cmd_valid[c] = 1'b0; cmd[c] = '0; dma_valid[c] = 1'b0; dma_req[c] = '0;
      send_valid[c] = 1'b0; send_dst_x[c] = '0; send_dst_y[c] = '0; send_spad_addr[c] = '0;
      send_len[c] = '0; recv_valid[c] = 1'b0; recv_spad_addr[c] = '0; recv_max_len[c] = '0;
      ext_valid[c] = 1'b0; ext_req[c] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---- secure configuration ----
    make_secure(0, 32'h1000_0000, 32'h8000_0000);
    make_secure(9, 32'h1000_0000, 32'h8100_0000);
    make_secure(5, 32'h1000_0000, 32'h8200_0000);
    do_dma(5, 1'b0, 32'h1000_0000, 16, 0, s);
    check("core 5 loaded", s == DMA_OK);
    do_cmd(0, CMD_SET_CHK, 1'b0, 0, 1'b1, '{r: 1'b1, w: 1'b1}, 0, 32'hFFFF_FFFF, 0, err);
    if (err) m_cmd_refused++;
    do_cmd(9, CMD_SET_ID, 1'b0, 0, 1'b0, '0, 0, 0, 0, err);
    if (err && core_id[9] == ID_SECURE) m_cmd_refused++;
    // the normal core programs its own window from the normal world
    do_cmd(4, CMD_SET_XLAT, 1'b0, 0, 1'b1, '0, 32'h1000_0000, 32'h9000_0000, 32'h10000, err);
    check("normal world configures a normal core", !err);

    // ---- guarder and DMA ----
    do_dma(0, 1'b0, 32'h1000_0000, 128, 0, s);                    // 512 lines
    if (s == DMA_OK) m_guard_ok++;
    check("load 512 lines", s == DMA_OK && n_packets[0] == 128);
    check("one guarder check for 128 memory packets", n_checks[0] == 1);
    for (int l = 0; l < 512; l += 37) begin
      ext(0, 1'b0, l, '0, r);
      check("loaded line", !r.denied && r.rdata == mem_line(32'h8000_0000, l));
    end
    do_dma(0, 1'b0, 32'h2000_0000, 1, 0, s);
    if (s == DMA_XLAT_FAULT) m_xlat_fault++;
    do_dma(0, 1'b1, 32'h1000_8000, 1, 0, s);
    if (s == DMA_PERM_FAULT) m_perm_fault++;
    do_dma(4, 1'b0, 32'h1000_0000, 1, 0, s);
    check("normal core without checking register is refused", s == DMA_PERM_FAULT);
    do_dma(0, 1'b1, 32'h1000_4000, 4, 16, s);
    if (s == DMA_OK) m_guard_ok++;
    check("store landed", u_mem.peek(32'h8000_4000) == u_mem.peek(32'h8000_0100));

    // ---- local scratchpad isolation ----
    d = {$urandom, $urandom, $urandom, $urandom};
    ext(0, 1'b1, 1000, d, r);                 // secure core writes a secure line
    do_cmd(0, CMD_SET_ID, 1'b1, 0, 1'b0, '0, 0, 0, 0, err);
    ext(0, 1'b0, 1000, '0, r);
    if (r.denied && r.rdata == '0) m_local_deny++;
    do_cmd(0, CMD_SPAD_CLR, 1'b1, 0, 1'b0, '0, 1000, 1, 0, err);
    ext(0, 1'b0, 1000, '0, r);
    if (!err && !r.denied && r.rdata == '0) m_clear++;
    do_cmd(0, CMD_SET_ID, 1'b1, 0, 1'b0, '0, 1, 0, 0, err);

    // ---- global scratchpad sharing ----
    d = {$urandom, $urandom, $urandom, $urandom};
    do_cmd(0, CMD_SPAD_CLR, 1'b1, 0, 1'b0, '0, 32'h8010, 1, 0, err);
    ext(4, 1'b1, 16'h8010, d, r);             // normal core shares a line
    check("normal write to global", !r.denied);
    ext(9, 1'b0, 16'h8010, '0, r);            // secure core takes it
    check("secure read of global", !r.denied && r.rdata == d);
    ext(4, 1'b0, 16'h8010, '0, r);
    if (r.denied) m_shared_lock++;

    // ---- NoC peephole ----
    arm(9, 0, 512);
    xfer(0, 9, 0, 256, ns, cyc);              // 5 hops: (0,0) -> (4,1)
    if (ns == NOC_DONE) m_auth_pass++;
    repeat (10) @(negedge clk);
    for (int l = 0; l < 256; l += 17) begin
      ext(9, 1'b0, l, '0, r);
      check("moved line", !r.denied && r.rdata == mem_line(32'h8000_0000, l));
    end
    arm(9, 0, 64);
    xfer(4, 9, 0, 16, ns, cyc);
    if (ns == NOC_DENIED) m_auth_deny++;
    xfer(5, 9, 0, 16, ns, cyc);                // 9 still armed, now by core 5
    check("secure neighbour accepted", ns == NOC_DONE);
    xfer(5, 9, 0, 16, ns, cyc);                // 9 no longer armed
    if (ns == NOC_BUSY) m_auth_busy++;

    // ---- parallel transfers between secure pairs ----
    make_secure(1, 32'h1000_0000, 32'h8300_0000);
    make_secure(8, 32'h1000_0000, 32'h8400_0000);
    arm(9, 2048, 64);
    arm(1, 2048, 64);
    arm(8, 2048, 64);
    fork
      begin noc_status_e s0; int c0; xfer(0, 9, 0, 64, s0, c0); if (s0 == NOC_DONE) m_parallel++; end
      begin noc_status_e s1; int c1; xfer(5, 1, 0, 64, s1, c1); if (s1 == NOC_DONE) m_parallel++; end
      begin noc_status_e s2; int c2; xfer(9, 8, 0, 64, s2, c2); if (s2 == NOC_DONE) m_parallel++; end
    join
    repeat (10) @(negedge clk);
    for (int l = 0; l < 64; l += 7) begin
      ext(9, 1'b0, 2048 + l, '0, r);
      check("parallel data 0->9", r.rdata == mem_line(32'h8000_0000, l));
    end

    // ---- transfer-size sweep (one hop, 0 -> 1) ----
    for (int n = 16; n <= 512; n *= 2) begin
      arm(1, 4096, n);
      xfer(0, 1, 0, n, ns, cyc);
      check("sweep transfer done", ns == NOC_DONE);
      check("about one line per cycle", cyc <= n + 32);
      $display("transfer %0d lines: %0d cycles (%0d.%02d cycles/line)", n, cyc,
               cyc / n, (100 * cyc / n) % 100);
    end
    repeat (10) @(negedge clk);
    for (int l = 0; l < 512; l += 31) begin
      ext(1, 1'b0, 4096 + l, '0, r);
      check("sweep data", r.rdata == mem_line(32'h8000_0000, l));
    end

    // ---- every mechanism must have happened ----
    $display("mechanisms: cmd_refused=%0d guard_ok=%0d xlat_fault=%0d perm_fault=%0d local_deny=%0d",
             m_cmd_refused, m_guard_ok, m_xlat_fault, m_perm_fault, m_local_deny);
    $display("            shared_lock=%0d clear=%0d auth_pass=%0d auth_deny=%0d auth_busy=%0d parallel=%0d",
             m_shared_lock, m_clear, m_auth_pass, m_auth_deny, m_auth_busy, m_parallel);
    check("cmd_refused happened", m_cmd_refused == 2);
    check("guard_ok happened", m_guard_ok == 2);
    check("xlat_fault happened", m_xlat_fault == 1);
    check("perm_fault happened", m_perm_fault == 1);
    check("local_deny happened", m_local_deny == 1);
    check("shared_lock happened", m_shared_lock == 1);
    check("clear happened", m_clear == 1);
    check("auth_pass happened", m_auth_pass == 1);
    check("auth_deny happened", m_auth_deny == 1 && n_auth_deny[9] == 1);
    check("auth_busy happened", m_auth_busy == 1 && n_busy[9] >= 1);
    check("parallel happened", m_parallel == 3);
    check("no flits dropped", n_dropped[9] == 0 && n_dropped[1] == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
