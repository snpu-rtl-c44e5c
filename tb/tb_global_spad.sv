// tb_global_spad: three cores share the global scratchpad; port 0 is a
// secure core, ports 1 and 2 are normal. Checks the shared-mode rules end
// to end through the arbiter: a line written by a normal core turns secure
// when a secure core reads it, after which normal reads and writes are
// refused; a secure clear returns it to normal with zero data. Also checks
// that three simultaneous requests are all served within three cycles.
//
// Timing: clock period 10 time units; stimulus changes on the falling edge.
// The rules checked are the design's; the stimulus, the reference values
// and the pass/fail line (TB_RESULT checks=N failures=M, with a watchdog
// that counts as a failure) are this testbench's own.
module tb_global_spad;
  import snpu_pkg::*;

  localparam int NP = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic      rv [NP], rr [NP], pv [NP];
  spad_req_t rq [NP];
  spad_rsp_t ps [NP];

  global_spad #(.NUM_PORTS(NP), .DEPTH(64)) dut (
    .clk, .rst_n, .req_valid (rv), .req_ready (rr), .req (rq), .rsp_valid (pv), .rsp (ps));

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // one access from port p; returns the response
  task automatic acc(int p, logic we, logic clr, int a, logic [LINE_W-1:0] d, output spad_rsp_t r);
    @(negedge clk);
    rv[p] = 1'b1;
    rq[p] = '{we: we, clr: clr, id: (p == 0) ? ID_SECURE : ID_NORMAL,
              addr: SPAD_AW'(a), wdata: d};
    while (!rr[p]) @(negedge clk);
    @(negedge clk);
    rv[p] = 1'b0;
    check("response one cycle after grant", pv[p]);
    r = ps[p];
  endtask

  initial begin
    spad_rsp_t r;
    logic [LINE_W-1:0] d;
    int served;
    for (int i = 0; i < NP; i++) begin rv[i] = 1'b0; rq[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    d = {$urandom, $urandom, $urandom, $urandom};
    acc(0, 1'b0, 1'b1, 5, '0, r);             // start from a known normal line
    acc(1, 1'b1, 1'b0, 5, d, r);
    check("normal write", !r.denied);
    acc(2, 1'b0, 1'b0, 5, '0, r);
    check("normal read of normal line", !r.denied && r.rdata == d);
    acc(0, 1'b0, 1'b0, 5, '0, r);
    check("secure read", !r.denied && r.rdata == d);
    acc(1, 1'b0, 1'b0, 5, '0, r);
    check("line became secure: normal read refused", r.denied && r.rdata == '0);
    acc(2, 1'b1, 1'b0, 5, '1, r);
    check("normal write to secure line refused", r.denied);
    acc(0, 1'b0, 1'b0, 5, '0, r);
    check("secure data unchanged", !r.denied && r.rdata == d);
    acc(1, 1'b0, 1'b1, 5, '0, r);
    check("normal clear refused", r.denied);
    acc(0, 1'b0, 1'b1, 5, '0, r);
    check("secure clear", !r.denied);
    acc(1, 1'b0, 1'b0, 5, '0, r);
    check("after clear: normal, zeroed", !r.denied && r.rdata == '0);
    // three simultaneous requests
    @(negedge clk);
    for (int p = 0; p < NP; p++) begin
      rv[p] = 1'b1;
      rq[p] = '{we: 1'b1, clr: 1'b0, id: (p == 0) ? ID_SECURE : ID_NORMAL,
                addr: SPAD_AW'(10 + p), wdata: LINE_W'(p + 1)};
    end
    served = 0;
    for (int c = 0; c < 3; c++) begin
      int g;
      #1;
      g = -1;
      for (int p = 0; p < NP; p++) if (rv[p] && rr[p]) g = p;
      if (g >= 0) served++;
      @(posedge clk);
      #1;
      if (g >= 0) rv[g] = 1'b0;
    end
    for (int p = 0; p < NP; p++) rv[p] = 1'b0;
    check("three ports served in three cycles", served == 3);
    for (int p = 0; p < NP; p++) begin
      acc(p, 1'b0, 1'b0, 10 + p, '0, r);
      check("simultaneous writes landed", !r.denied && r.rdata == LINE_W'(p + 1));
    end
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
