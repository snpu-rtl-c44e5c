// tb_noc_microtest: inter-core transfer cost on the full-size NPU (no
// parameter overrides), for transfer sizes of 16 to 512 scratchpad lines.
//
// Two ways of moving n lines from core 0 to core 1, both secure:
//   software NoC  core 0 stores the lines to a shared memory region by DMA
//                 (checked by its guarder), then core 1 loads them by DMA;
//   peephole NoC  core 0 sends them over the mesh after one authentication
//                 round trip.
// The memory model answers every read after three cycles and accepts a
// request in three cycles out of four on average, an optimistic memory in
// which the NPU is the only user. For each size the testbench prints both
// cycle counts and their ratio, checks that the data arrived intact both
// ways, that the peephole transfer needs at most one cycle per line plus a
// fixed set-up of 32 cycles, and that it is faster than the memory path for
// every size.
//
// Timing: clock period 10 time units; stimulus changes on the falling edge.
// The comparison is the design's; memory timing, sizes within the range and
// the pass/fail bounds are this testbench's own. It ends with TB_RESULT
// checks=N failures=M, and a watchdog counts as a failure.
module tb_noc_microtest;
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
    int cyc, t0, sw;
    for (int c = 0; c < NC; c++) begin
      cmd_valid[c] = 1'b0; cmd[c] = '0; dma_valid[c] = 1'b0; dma_req[c] = '0;
      send_valid[c] = 1'b0; send_dst_x[c] = '0; send_dst_y[c] = '0; send_spad_addr[c] = '0;
      send_len[c] = '0; recv_valid[c] = 1'b0; recv_spad_addr[c] = '0; recv_max_len[c] = '0;
      ext_valid[c] = 1'b0; ext_req[c] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // both cores map va 0x1000_0000 onto the same region, read-write
    make_secure(0, 32'h1000_0000, 32'h8000_0000);
    make_secure(1, 32'h1000_0000, 32'h8000_0000);
    do_cmd(0, CMD_SET_CHK, 1'b1, 0, 1'b1, '{r: 1'b1, w: 1'b1}, 32'h8000_0000, 32'h10000, 0, err);
    do_cmd(1, CMD_SET_CHK, 1'b1, 0, 1'b1, '{r: 1'b1, w: 1'b1}, 32'h8000_0000, 32'h10000, 0, err);
    check("shared region granted", !err);
    // source data: 512 lines loaded into core 0 from 0x8000_8000
    do_dma(0, 1'b0, 32'h1000_8000, 128, 0, s);
    check("source loaded", s == DMA_OK);
    for (int n = 16; n <= 512; n *= 2) begin
      // software NoC through memory at 0x8000_0000
      t0 = $time / 10;
      do_dma(0, 1'b1, 32'h1000_0000, n / 4, 0, s);
      check("software NoC store", s == DMA_OK);
      do_dma(1, 1'b0, 32'h1000_0000, n / 4, 1024, s);
      check("software NoC load", s == DMA_OK);
      sw = $time / 10 - t0;
      // peephole NoC
      arm(1, 2048, n);
      xfer(0, 1, 0, n, ns, cyc);
      check("peephole transfer done", ns == NOC_DONE);
      check("peephole: one line per cycle plus set-up", cyc <= n + 32);
      check("peephole faster than memory", cyc < sw);
      $display("%0d lines: software NoC %0d cycles, peephole %0d cycles, ratio %0d.%02d",
               n, sw, cyc, sw / cyc, (100 * sw / cyc) % 100);
      repeat (10) @(negedge clk);
      for (int l = 0; l < n; l += 13) begin
        ext(1, 1'b0, 1024 + l, '0, r);
        check("memory path data", !r.denied && r.rdata == mem_line(32'h8000_8000, l));
        ext(1, 1'b0, 2048 + l, '0, r);
        check("peephole data", !r.denied && r.rdata == mem_line(32'h8000_8000, l));
      end
    end
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
