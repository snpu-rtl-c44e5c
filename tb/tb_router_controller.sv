// tb_router_controller: two router controllers, core A at (0,0) and core B
// at (1,0), joined by one east-west link, each with its own scratchpad
// model. Checks a full peephole transfer in both directions at once (same
// ID states), a transfer refused because the ID states differ, one refused
// because the receiver is not armed, and that the data lands in the
// receiver's scratchpad intact and in order.
//
// Timing: clock period 10 time units; stimulus changes on the falling edge.
// The rules checked are the design's; the stimulus, the reference values
// and the pass/fail line (TB_RESULT checks=N failures=M, with a watchdog
// that counts as a failure) are this testbench's own.
module tb_router_controller;
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

  id_e                cid [2];
  logic               sv [2], sr [2], sd [2];
  logic [COORD_W-1:0] sdx [2], sdy [2];
  logic [SPAD_AW-1:0] sa [2], ra [2];
  logic [LEN_W-1:0]   sl [2], rl [2], rlen [2];
  noc_status_e        sst [2];
  logic               rvv [2], rrd [2], rd [2], rdeny [2];
  logic [COORD_W-1:0] rsx [2], rsy [2];
  logic [15:0]        np [2], nd [2], nb [2], ndr [2];
  logic               ssv [2], ssr [2], ssrv [2], rsv [2], rsr [2], rsrv [2];
  spad_req_t          ssq [2], rsq [2];
  spad_rsp_t          ssp [2], rsp [2];
  logic               liv [2][4], lir [2][4], lov [2][4], lor [2][4];
  flit_t              lif [2][4], lof [2][4];

  // link wiring: A east <-> B west; all other links tied off
  always_comb begin
    for (int c = 0; c < 2; c++)
      for (int d = 0; d < 4; d++) begin
        liv[c][d] = 1'b0; lif[c][d] = '0; lor[c][d] = 1'b1;
      end
    liv[1][3] = lov[0][1]; lif[1][3] = lof[0][1]; lor[0][1] = lir[1][3];
    liv[0][1] = lov[1][3]; lif[0][1] = lof[1][3]; lor[1][3] = lir[0][1];
  end

  logic [LINE_W-1:0] sp [2][64];

  for (genvar c = 0; c < 2; c++) begin : g_c
    router_controller #(.X(c), .Y(0), .RSP_DEPTH(2)) u_rc (
      .clk, .rst_n, .core_id (cid[c]),
      .send_valid (sv[c]), .send_ready (sr[c]), .send_dst_x (sdx[c]), .send_dst_y (sdy[c]),
      .send_spad_addr (sa[c]), .send_len (sl[c]), .send_done (sd[c]), .send_status (sst[c]),
      .recv_valid (rvv[c]), .recv_ready (rrd[c]), .recv_spad_addr (ra[c]), .recv_max_len (rl[c]),
      .recv_done (rd[c]), .recv_src_x (rsx[c]), .recv_src_y (rsy[c]), .recv_len (rlen[c]),
      .recv_spad_deny (rdeny[c]),
      .n_auth_pass (np[c]), .n_auth_deny (nd[c]), .n_busy (nb[c]), .n_dropped (ndr[c]),
      .ss_valid (ssv[c]), .ss_ready (ssr[c]), .ss_req (ssq[c]), .ss_rsp_valid (ssrv[c]), .ss_rsp (ssp[c]),
      .rs_valid (rsv[c]), .rs_ready (rsr[c]), .rs_req (rsq[c]), .rs_rsp_valid (rsrv[c]), .rs_rsp (rsp[c]),
      .link_in_valid (liv[c]), .link_in_ready (lir[c]), .link_in_flit (lif[c]),
      .link_out_valid (lov[c]), .link_out_ready (lor[c]), .link_out_flit (lof[c]));

    // scratchpad model with separate read and write ports
    assign ssr[c] = 1'b1;
    assign rsr[c] = 1'b1;
    always @(posedge clk) begin
      ssrv[c] <= rst_n && ssv[c];
      ssp[c]  <= '{denied: 1'b0, rdata: sp[c][ssq[c].addr[5:0]]};
      rsrv[c] <= rst_n && rsv[c];
      rsp[c]  <= '0;
      if (rst_n && rsv[c]) sp[c][rsq[c].addr[5:0]] = rsq[c].wdata;
    end

    // done catchers
    int          n_sdone, n_rdone;
    noc_status_e last_st;
    initial begin n_sdone = 0; n_rdone = 0; end
    always @(posedge clk) begin
      if (sd[c]) begin n_sdone++; last_st = sst[c]; end
      if (rd[c]) n_rdone++;
    end
  end

  task automatic arm(int c, int a, int n);
    @(negedge clk);
    rvv[c] = 1'b1; ra[c] = SPAD_AW'(a); rl[c] = LEN_W'(n);
    @(negedge clk);
    rvv[c] = 1'b0;
  endtask

  task automatic go(int c, int dx, int a, int n);
    @(negedge clk);
    sv[c] = 1'b1; sdx[c] = COORD_W'(dx); sdy[c] = '0; sa[c] = SPAD_AW'(a); sl[c] = LEN_W'(n);
    while (!sr[c]) @(negedge clk);
    @(negedge clk);
    sv[c] = 1'b0;
  endtask

  task automatic wait_sends(int a_target, int b_target);
    repeat (500) begin
      if (g_c[0].n_sdone >= a_target && g_c[1].n_sdone >= b_target) break;
      @(negedge clk);
    end
  endtask

  initial begin
    for (int c = 0; c < 2; c++) begin
      sv[c] = 1'b0; rvv[c] = 1'b0; sdx[c] = '0; sdy[c] = '0; sa[c] = '0; sl[c] = '0;
      ra[c] = '0; rl[c] = '0; cid[c] = ID_SECURE;
      for (int i = 0; i < 64; i++) sp[c][i] = {$urandom, $urandom, $urandom, 32'(c)};
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // both directions at once, both secure
    arm(1, 32, 16);
    arm(0, 40, 16);
    fork
      go(0, 1, 0, 16);
      go(1, 0, 8, 12);
    join
    wait_sends(1, 1);
    check("A->B done", g_c[0].n_sdone == 1 && g_c[0].last_st == NOC_DONE);
    check("B->A done", g_c[1].n_sdone == 1 && g_c[1].last_st == NOC_DONE);
    repeat (3) @(negedge clk);
    check("both received", g_c[0].n_rdone == 1 && g_c[1].n_rdone == 1);
    for (int i = 0; i < 16; i++) check("A->B data", sp[1][32 + i] == sp[0][i]);
    for (int i = 0; i < 12; i++) check("B->A data", sp[0][40 + i] == sp[1][8 + i]);
    // ID states differ: refused
    cid[0] = ID_NORMAL;
    arm(1, 0, 8);
    go(0, 1, 0, 8);
    wait_sends(2, 0);
    check("normal -> secure refused", g_c[0].last_st == NOC_DENIED && nd[1] == 1);
    // B still armed: a matching normal B? make B normal and retry
    cid[1] = ID_NORMAL;
    go(0, 1, 16, 8);
    wait_sends(3, 0);
    check("normal -> normal accepted", g_c[0].last_st == NOC_DONE);
    repeat (3) @(negedge clk);
    for (int i = 0; i < 8; i++) check("normal data", sp[1][i] == sp[0][16 + i]);
    // B not armed: busy
    go(0, 1, 0, 4);
    wait_sends(4, 0);
    check("not armed -> busy", g_c[0].last_st == NOC_BUSY && nb[1] == 1);
    check("pass count", np[1] == 2 && np[0] == 1);
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
