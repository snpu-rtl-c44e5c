// tb_dma_engine: loads and stores through the DMA engine against a
// behavioural memory and a simple scratchpad model with random stalls.
// Checks the packet split (addresses and line order), the data moved in
// both directions, the packet count, that a refused scratchpad read gives
// DMA_SPAD_DENY with zeros in memory, and that a zero-length request ends at
// once.
//
// Timing: clock period 10 time units; stimulus changes on the falling edge.
// The rules checked are the design's; the stimulus, the reference values
// and the pass/fail line (TB_RESULT checks=N failures=M, with a watchdog
// that counts as a failure) are this testbench's own.
module tb_dma_engine;
  import snpu_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic              req_valid = 1'b0, req_ready, done;
  dma_req_t          req = '0;
  dma_status_e       done_status;
  logic              mem_req_valid [1], mem_req_ready [1], mem_req_we [1];
  logic [ADDR_W-1:0] mem_req_addr [1];
  logic [MEM_W-1:0]  mem_req_wdata [1];
  logic              mem_rsp_valid [1];
  logic [MEM_W-1:0]  mem_rsp_rdata [1];
  logic              spad_valid, spad_ready = 1'b1, spad_rsp_valid = 1'b0;
  spad_req_t         spad_req;
  spad_rsp_t         spad_rsp = '0;
  logic [31:0]       packets;
  int                n_reads, n_writes;

  dma_engine dut (
    .clk, .rst_n, .core_id (ID_SECURE), .req_valid, .req_ready, .req, .done, .done_status,
    .mem_req_valid (mem_req_valid[0]), .mem_req_ready (mem_req_ready[0]),
    .mem_req_we (mem_req_we[0]), .mem_req_addr (mem_req_addr[0]),
    .mem_req_wdata (mem_req_wdata[0]),
    .mem_rsp_valid (mem_rsp_valid[0]), .mem_rsp_rdata (mem_rsp_rdata[0]),
    .spad_valid, .spad_ready, .spad_req, .spad_rsp_valid, .spad_rsp, .packets);

  sys_mem_model #(.NP(1)) u_mem (
    .clk, .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata,
    .mem_rsp_valid, .mem_rsp_rdata, .n_reads, .n_writes);

  // scratchpad model; reads of line deny_line are refused
  logic [LINE_W-1:0] sp [256];
  int                deny_line = -1;
  always @(posedge clk) begin
    spad_rsp_valid <= 1'b0;
    if (spad_valid && spad_ready) begin
      spad_rsp_valid <= 1'b1;
      if (spad_req.id != ID_SECURE) begin failures++; $display("FAIL id not passed"); end
      if (spad_req.we) begin
        sp[spad_req.addr[7:0]] = spad_req.wdata;
        spad_rsp <= '0;
      end else if (32'(spad_req.addr) == deny_line) begin
        spad_rsp <= '{denied: 1'b1, rdata: '0};
      end else begin
        spad_rsp <= '{denied: 1'b0, rdata: sp[spad_req.addr[7:0]]};
      end
    end
    spad_ready <= ($urandom_range(0, 4) != 0);
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic run(logic store, logic [31:0] addr, int npkt, int saddr,
                     output dma_status_e st, output int cyc);
    @(negedge clk);
    req_valid = 1'b1;
    req = '{store: store, addr: addr, npkt: LEN_W'(npkt), spad_addr: SPAD_AW'(saddr)};
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req_valid = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    st = done_status;
  endtask

  initial begin
    dma_status_e st;
    int cyc, p0;
    logic [MEM_W-1:0] w;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // load 5 packets into lines 8..27
    run(1'b0, 32'h8000_0000, 5, 8, st, cyc);
    check("load ok", st == DMA_OK);
    check("load packet count", packets == 5 && n_reads == 5);
    for (int k = 0; k < 5; k++) begin
      w = u_mem.pattern(32'h8000_0000 + 32'(64 * k));
      for (int j = 0; j < PKT_LINES; j++)
        check("load line data", sp[8 + 4*k + j] == w[j*LINE_W +: LINE_W]);
    end
    check("load takes at least latency per packet", cyc >= 5 * 4);
    // store 3 packets from lines 12..23 to 0x9000_0000
    run(1'b1, 32'h9000_0000, 3, 12, st, cyc);
    check("store ok", st == DMA_OK);
    check("store count", packets == 8 && n_writes == 3);
    for (int k = 0; k < 3; k++) begin
      w = u_mem.peek(32'h9000_0000 + 32'(64 * k));
      for (int j = 0; j < PKT_LINES; j++)
        check("store data", w[j*LINE_W +: LINE_W] == sp[12 + 4*k + j]);
    end
    // refused read during a store
    deny_line = 9;
    run(1'b1, 32'hA000_0000, 1, 8, st, cyc);
    check("store spad deny status", st == DMA_SPAD_DENY);
    w = u_mem.peek(32'hA000_0000);
    check("denied line stored as zero", w[1*LINE_W +: LINE_W] == '0);
    check("other line stored", w[0 +: LINE_W] == sp[8]);
    deny_line = -1;
    // zero length
    p0 = int'(packets);
    run(1'b0, 32'h8000_0000, 0, 0, st, cyc);
    check("zero length", st == DMA_OK && cyc == 1 && int'(packets) == p0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
