// tb_noc_recv_engine: drives flits into one receive engine (a secure core at
// (2,1)) and checks its answers and scratchpad writes: BUSY before it is
// armed, DENY for a request from a normal core or one that is too long,
// ACK and a receive lock for a proper request, BUSY for a second source
// while locked, dropping of data from a source that did not authenticate,
// and the authenticated data written in order with the core's ID state.
//
// Timing: clock period 10 time units; stimulus changes on the falling edge.
// The rules checked are the design's; the stimulus, the reference values
// and the pass/fail line (TB_RESULT checks=N failures=M, with a watchdog
// that counts as a failure) are this testbench's own.
module tb_noc_recv_engine;
  import snpu_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic               arm_valid = 1'b0, arm_ready, done, done_deny;
  logic [SPAD_AW-1:0] arm_addr = '0;
  logic [LEN_W-1:0]   arm_len = '0;
  logic [COORD_W-1:0] dsx, dsy;
  logic [LEN_W-1:0]   dlen;
  logic               ej_valid = 1'b0, ej_ready, rsp_valid, rsp_ready = 1'b1;
  flit_t              ej_flit = '0, rsp_flit;
  logic               spad_valid, spad_ready = 1'b1, spad_rsp_valid = 1'b0;
  spad_req_t          spad_req;
  spad_rsp_t          spad_rsp = '0;
  logic [15:0]        n_pass, n_deny, n_busy, n_drop;

  noc_recv_engine #(.X(2), .Y(1), .RSP_DEPTH(4)) dut (
    .clk, .rst_n, .core_id (ID_SECURE),
    .arm_valid, .arm_ready, .arm_spad_addr (arm_addr), .arm_max_len (arm_len),
    .done, .done_src_x (dsx), .done_src_y (dsy), .done_len (dlen), .done_spad_deny (done_deny),
    .ej_valid, .ej_ready, .ej_flit, .rsp_valid, .rsp_ready, .rsp_flit,
    .spad_valid, .spad_ready, .spad_req, .spad_rsp_valid, .spad_rsp,
    .n_auth_pass (n_pass), .n_auth_deny (n_deny), .n_busy (n_busy), .n_dropped (n_drop));

  logic [LINE_W-1:0] sp [64];
  id_e               spid [64];
  int                n_writes = 0;
  always @(posedge clk) begin
    spad_rsp_valid <= rst_n && spad_valid && spad_ready;
    spad_rsp <= '0;
    if (rst_n && spad_valid && spad_ready) begin
      sp[spad_req.addr[5:0]] = spad_req.wdata;
      spid[spad_req.addr[5:0]] = spad_req.id;
      n_writes++;
    end
    spad_ready <= ($urandom_range(0, 3) != 0);
    rsp_ready  <= ($urandom_range(0, 3) != 0);
  end

  flit_t answers [$];
  always @(posedge clk) if (rst_n && rsp_valid && rsp_ready) answers.push_back(rsp_flit);

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic send(flit_kind_e k, int sx, int sy, id_e id, int n, logic head, logic tail,
                      logic [LINE_W-1:0] d);
    @(negedge clk);
    ej_valid = 1'b1;
    ej_flit = '0;
    ej_flit.kind = k; ej_flit.head = head; ej_flit.tail = tail;
    ej_flit.dst_x = 3'd2; ej_flit.dst_y = 3'd1;
    ej_flit.src_x = COORD_W'(sx); ej_flit.src_y = COORD_W'(sy);
    ej_flit.id = id; ej_flit.len = LEN_W'(n); ej_flit.data = d;
    do @(posedge clk); while (!ej_ready);
    @(negedge clk);
    ej_valid = 1'b0;
  endtask

  task automatic expect_answer(flit_kind_e k, int sx, int sy, string what);
    repeat (20) begin
      if (answers.size() > 0) break;
      @(negedge clk);
    end
    check({what, ": answer arrived"}, answers.size() > 0);
    if (answers.size() > 0) begin
      flit_t a;
      a = answers.pop_front();
      check({what, ": kind"}, a.kind == k);
      check({what, ": routed back"}, a.dst_x == COORD_W'(sx) && a.dst_y == COORD_W'(sy) &&
                                    a.src_x == 3'd2 && a.src_y == 3'd1 && a.head && a.tail);
    end
  endtask

  initial begin
    logic [LINE_W-1:0] lines [12];
    int w0;
    for (int i = 0; i < 12; i++) lines[i] = {$urandom, $urandom, $urandom, $urandom};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    send(FK_AUTH_REQ, 0, 0, ID_SECURE, 12, 1, 1, '0);
    expect_answer(FK_NACK_BUSY, 0, 0, "not armed");
    @(negedge clk);
    arm_valid = 1'b1; arm_addr = 16'd10; arm_len = 16'd16;
    @(negedge clk);
    arm_valid = 1'b0;
    send(FK_AUTH_REQ, 1, 1, ID_NORMAL, 12, 1, 1, '0);
    expect_answer(FK_NACK_DENY, 1, 1, "normal source");
    send(FK_AUTH_REQ, 0, 0, ID_SECURE, 20, 1, 1, '0);
    expect_answer(FK_NACK_DENY, 0, 0, "too long");
    send(FK_AUTH_REQ, 0, 0, ID_SECURE, 12, 1, 1, '0);
    expect_answer(FK_AUTH_ACK, 0, 0, "proper request");
    send(FK_AUTH_REQ, 1, 0, ID_SECURE, 4, 1, 1, '0);
    expect_answer(FK_NACK_BUSY, 1, 0, "locked");
    w0 = n_writes;
    for (int i = 0; i < 3; i++) send(FK_DATA, 1, 0, ID_SECURE, 3, i == 0, i == 2, '1);
    check("stray data dropped", n_writes == w0 && n_drop == 3);
    for (int i = 0; i < 12; i++) send(FK_DATA, 0, 0, ID_SECURE, 12, i == 0, i == 11, lines[i]);
    repeat (5) begin
      if (done) break;
      @(negedge clk);
    end
    check("done", done && dsx == 3'd0 && dsy == 3'd0 && dlen == 12 && !done_deny);
    for (int i = 0; i < 12; i++)
      check("line written", sp[10 + i] == lines[i] && spid[10 + i] == ID_SECURE);
    check("write count", n_writes == w0 + 12);
    check("counters", n_pass == 1 && n_deny == 2 && n_busy == 2);
    @(negedge clk);
    check("back to idle", arm_ready);
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
