// tb_noc_send_engine: plays the network and the scratchpad around one send
// engine. Checks the peephole sequence (one authentication request with the
// core's ID state, coordinates and length before any data), that answers
// from other cores are ignored, that ACK leads to a data packet carrying
// the scratchpad lines in order with correct head/tail marks, that NACKs end
// the transfer with DENIED or BUSY and no data, that a refused scratchpad
// read is reported, and that a transfer streams one flit per cycle when
// nothing stalls.
//
// Timing: clock period 10 time units; stimulus changes on the falling edge.
// The rules checked are the design's; the stimulus, the reference values
// and the pass/fail line (TB_RESULT checks=N failures=M, with a watchdog
// that counts as a failure) are this testbench's own.
module tb_noc_send_engine;
  import snpu_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic               cmd_valid = 1'b0, cmd_ready, done;
  logic [COORD_W-1:0] dx = 3'd2, dy = 3'd1;
  logic [SPAD_AW-1:0] saddr = '0;
  logic [LEN_W-1:0]   len = '0;
  noc_status_e        st;
  logic               inj_valid, inj_ready = 1'b1, rsp_valid = 1'b0;
  flit_t              inj_flit, rsp_flit = '0;
  logic               spad_valid, spad_ready = 1'b1, spad_rsp_valid = 1'b0;
  spad_req_t          spad_req;
  spad_rsp_t          spad_rsp = '0;
  id_e                cid = ID_SECURE;

  noc_send_engine #(.X(1), .Y(0)) dut (
    .clk, .rst_n, .core_id (cid),
    .cmd_valid, .cmd_ready, .cmd_dst_x (dx), .cmd_dst_y (dy), .cmd_spad_addr (saddr), .cmd_len (len),
    .done, .done_status (st),
    .inj_valid, .inj_ready, .inj_flit, .rsp_valid, .rsp_flit,
    .spad_valid, .spad_ready, .spad_req, .spad_rsp_valid, .spad_rsp);

  logic [LINE_W-1:0] sp [64];
  int   deny_line = -1;
  logic stall = 1'b0;
  always @(posedge clk) begin
    spad_rsp_valid <= rst_n && spad_valid && spad_ready;
    if (spad_valid && spad_ready)
      spad_rsp <= (32'(spad_req.addr) == deny_line) ? '{denied: 1'b1, rdata: '0}
                                                     : '{denied: 1'b0, rdata: sp[spad_req.addr[5:0]]};
    spad_ready <= stall ? ($urandom_range(0, 2) != 0) : 1'b1;
    inj_ready  <= stall ? ($urandom_range(0, 2) != 0) : 1'b1;
  end

  // network side
  flit_kind_e answer = FK_AUTH_ACK;
  flit_t      got [$];
  int         n_auth = 0, t_first = 0, t_last = 0, cyc = 0;
  always @(posedge clk) cyc++;
  always @(posedge clk) begin
    if (rst_n && inj_valid && inj_ready) begin
      if (inj_flit.kind == FK_AUTH_REQ) begin
        n_auth++;
        checks++;
        if (!(inj_flit.head && inj_flit.tail && inj_flit.id == cid && inj_flit.len == len &&
              inj_flit.dst_x == dx && inj_flit.dst_y == dy && inj_flit.src_x == 3'd1 &&
              inj_flit.src_y == 3'd0 && got.size() == 0)) begin
          failures++;
          $display("FAIL auth request fields");
        end
        fork
          begin
            // a stray answer from another core first, then the real one
            repeat (2) @(negedge clk);
            rsp_valid = 1'b1;
            rsp_flit = '0;
            rsp_flit.kind = FK_AUTH_ACK;
            rsp_flit.src_x = dx + 1'b1; rsp_flit.src_y = dy;
            @(negedge clk);
            rsp_flit.kind = answer;
            rsp_flit.src_x = dx;
            @(negedge clk);
            rsp_valid = 1'b0;
          end
        join_none
      end else begin
        if (got.size() == 0) t_first = cyc;
        t_last = cyc;
        got.push_back(inj_flit);
      end
    end
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic xfer(int a, int n, flit_kind_e ans, output noc_status_e s);
    got.delete();
    answer = ans;
    @(negedge clk);
    cmd_valid = 1'b1; saddr = SPAD_AW'(a); len = LEN_W'(n);
    while (!cmd_ready) @(negedge clk);
    @(negedge clk);
    cmd_valid = 1'b0;
    while (!done) @(negedge clk);
    s = st;
    @(negedge clk);
  endtask

  initial begin
    noc_status_e s;
    int a0;
    for (int i = 0; i < 64; i++) sp[i] = {$urandom, $urandom, $urandom, $urandom};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // clean transfer, no stalls: one flit per cycle
    xfer(4, 20, FK_AUTH_ACK, s);
    check("done", s == NOC_DONE && n_auth == 1);
    check("flit count", got.size() == 20);
    for (int i = 0; i < got.size(); i++) begin
      check("data", got[i].data == sp[4 + i] && got[i].kind == FK_DATA);
      check("marks", got[i].head == (i == 0) && got[i].tail == (i == 19));
      check("route", got[i].dst_x == dx && got[i].dst_y == dy && got[i].id == cid);
    end
    check("one flit per cycle", t_last - t_first == 19);
    // refused by the peephole
    xfer(0, 8, FK_NACK_DENY, s);
    check("denied", s == NOC_DENIED && got.size() == 0 && n_auth == 2);
    xfer(0, 8, FK_NACK_BUSY, s);
    check("busy", s == NOC_BUSY && got.size() == 0 && n_auth == 3);
    // stalls everywhere and a refused line
    stall = 1'b1;
    cid = ID_NORMAL;
    deny_line = 33;
    a0 = 30;
    xfer(a0, 30, FK_AUTH_ACK, s);
    check("spad deny reported", s == NOC_SPAD_DENY);
    check("flit count stalled", got.size() == 30);
    for (int i = 0; i < got.size(); i++)
      check("data stalled", got[i].data == ((a0 + i == 33) ? '0 : sp[(a0 + i) % 64]) && got[i].id == ID_NORMAL);
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
