// tb_noc_router: one router at (1,1) of a 3x3 mesh. Every input port sends
// random multi-flit packets to random destinations it could legally send
// to under XY routing; outputs apply random back-pressure. Checks that each
// packet leaves by the port XY routing picks, that its flits stay
// contiguous on that output (wormhole), in order and intact, and that
// every packet arrives. Also checks the one-cycle, one-flit-per-cycle path
// through an idle router.
//
// Timing: clock period 10 time units; stimulus changes on the falling edge.
// The rules checked are the design's; the stimulus, the reference values
// and the pass/fail line (TB_RESULT checks=N failures=M, with a watchdog
// that counts as a failure) are this testbench's own.
module tb_noc_router;
  import snpu_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic  in_valid [NPORTS], in_ready [NPORTS], out_valid [NPORTS], out_ready [NPORTS];
  flit_t in_flit  [NPORTS], out_flit [NPORTS];

  noc_router #(.X(1), .Y(1)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_flit,
                                  .out_valid, .out_ready, .out_flit);

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int unsigned xy_port(int unsigned dx, int unsigned dy);
    if (dx > 1) return P_EAST;
    if (dx < 1) return P_WEST;
    if (dy > 1) return P_NORTH;
    if (dy < 1) return P_SOUTH;
    return P_LOCAL;
  endfunction

  // data field: {input port, packet number, flit number, flit count}
  localparam int NPKT = 150;
  int sent_pkts = 0, got_pkts = 0;
  logic stress = 1'b0;

  for (genvar p = 0; p < NPORTS; p++) begin : g_src
    initial begin
      in_valid[p] = 1'b0;
      in_flit[p]  = '0;
      @(posedge stress);
      for (int n = 0; n < NPKT; n++) begin
        int unsigned dx, dy, len;
        // a legal destination for a flit arriving on port p under XY routing
        do begin
          dx = $urandom_range(0, 2);
          dy = $urandom_range(0, 2);
        end while ((p == P_EAST && dx <= 1) || (p == P_WEST && dx >= 1) ||
                   (p == P_NORTH && (dx != 1 || dy < 1)) || (p == P_SOUTH && (dx != 1 || dy > 1)));
        len = $urandom_range(1, 6);
        for (int f = 0; f < len; f++) begin
          @(negedge clk);
          while ($urandom_range(0, 3) == 0) begin
            in_valid[p] = 1'b0;
            @(negedge clk);
          end
          in_valid[p] = 1'b1;
          in_flit[p] = '0;
          in_flit[p].head  = (f == 0);
          in_flit[p].tail  = (f == len - 1);
          in_flit[p].kind  = FK_DATA;
          in_flit[p].dst_x = COORD_W'(dx);
          in_flit[p].dst_y = COORD_W'(dy);
          in_flit[p].data  = {32'(p), 32'(n), 32'(f), 32'(len)};
          do @(posedge clk); while (!in_ready[p]);
        end
        @(negedge clk);
        in_valid[p] = 1'b0;
        sent_pkts++;
      end
    end
  end

  // output monitors
  int        cur_src [NPORTS];
  int        cur_f   [NPORTS];
  int        last_n  [NPORTS][NPORTS];
  for (genvar o = 0; o < NPORTS; o++) begin : g_sink
    initial begin
      cur_src[o] = -1;
      for (int i = 0; i < NPORTS; i++) last_n[o][i] = -1;
    end
    always @(posedge clk) begin
      out_ready[o] <= stress ? ($urandom_range(0, 2) != 0) : 1'b1;
      if (rst_n && stress && out_valid[o] && out_ready[o]) begin
        int unsigned s, n, f, len;
        {s, n, f, len} = out_flit[o].data;
        check("route", xy_port(32'(out_flit[o].dst_x), 32'(out_flit[o].dst_y)) == o);
        if (cur_src[o] < 0) begin
          check("head first", out_flit[o].head && f == 0);
          check("packet order per input", int'(n) > last_n[o][s]);
          last_n[o][s] = int'(n);
          cur_src[o] = int'(s);
          cur_f[o] = 0;
        end else begin
          check("wormhole: same packet", int'(s) == cur_src[o] && int'(n) == last_n[o][s]);
          check("flit order", int'(f) == cur_f[o] + 1);
          cur_f[o] = int'(f);
        end
        check("tail mark", out_flit[o].tail == (f == len - 1));
        if (out_flit[o].tail) begin
          cur_src[o] = -1;
          got_pkts++;
        end
      end
    end
  end

  initial begin
    int t0;
    for (int i = 0; i < NPORTS; i++) begin
      in_valid[i] = 1'b0;
      out_ready[i] = 1'b1;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // latency through an idle router: west input to east output
    @(negedge clk);
    in_valid[P_WEST] = 1'b1;
    in_flit[P_WEST] = '0;
    in_flit[P_WEST].head = 1'b1; in_flit[P_WEST].tail = 1'b1;
    in_flit[P_WEST].dst_x = 3'd2; in_flit[P_WEST].dst_y = 3'd1;
    @(negedge clk);
    in_valid[P_WEST] = 1'b0;
    check("one-cycle hop", out_valid[P_EAST] && out_flit[P_EAST].dst_x == 3'd2);
    @(negedge clk);
    check("flit leaves once", !out_valid[P_EAST]);
    // random traffic
    stress = 1'b1;
    t0 = 0;
    while (got_pkts < NPORTS * NPKT && t0 < 50000) begin
      @(posedge clk);
      t0++;
    end
    check("all packets delivered", got_pkts == NPORTS * NPKT && sent_pkts == NPORTS * NPKT);
    $display("delivered %0d packets", got_pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
