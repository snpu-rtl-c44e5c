// tb_spad_arbiter: three random requesters share one port through a
// fixed-priority and a round-robin arbiter. The downstream model echoes
// each request (address and data) as its response one cycle after
// acceptance. Checks that every requester gets exactly its own responses in
// order, that fixed priority always grants the lowest-numbered requester,
// and that round-robin grants each of three always-busy requesters in turn.
//
// Timing: clock period 10 time units; stimulus changes on the falling edge.
// The rules checked are the design's; the stimulus, the reference values
// and the pass/fail line (TB_RESULT checks=N failures=M, with a watchdog
// that counts as a failure) are this testbench's own.
module tb_spad_arbiter;
  import snpu_pkg::*;

  localparam int N = 3;

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

  logic      iv [2][N], ir [2][N], rv [2][N];
  spad_req_t iq [2][N];
  spad_rsp_t rs [2][N];
  logic      ov [2], ordy [2], orv [2];
  spad_req_t oq [2];
  spad_rsp_t ors [2];

  spad_arbiter #(.N(N), .ROUND_ROBIN(1'b0)) u_fix (
    .clk, .rst_n, .in_valid (iv[0]), .in_ready (ir[0]), .in_req (iq[0]),
    .in_rsp_valid (rv[0]), .in_rsp (rs[0]),
    .out_valid (ov[0]), .out_ready (ordy[0]), .out_req (oq[0]),
    .out_rsp_valid (orv[0]), .out_rsp (ors[0]));
  spad_arbiter #(.N(N), .ROUND_ROBIN(1'b1)) u_rr (
    .clk, .rst_n, .in_valid (iv[1]), .in_ready (ir[1]), .in_req (iq[1]),
    .in_rsp_valid (rv[1]), .in_rsp (rs[1]),
    .out_valid (ov[1]), .out_ready (ordy[1]), .out_req (oq[1]),
    .out_rsp_valid (orv[1]), .out_rsp (ors[1]));

  logic busy_all = 1'b0;
  int   seq [2][N];
  int   exp_q [2][N][$];
  int   n_rsp = 0;
  int   last_grant = -1, rr_ok = 0, rr_bad = 0;

  for (genvar a = 0; a < 2; a++) begin : g_arb
    // downstream: echo
    always @(posedge clk) begin
      orv[a] <= rst_n && ov[a] && ordy[a];
      ors[a] <= '{denied: oq[a].we, rdata: oq[a].wdata};
      ordy[a] <= busy_all ? 1'b1 : ($urandom_range(0, 3) != 0);
    end
    for (genvar i = 0; i < N; i++) begin : g_req
      initial begin
        seq[a][i] = 0;
        iv[a][i] = 1'b0;
        iq[a][i] = '0;
      end
      always @(posedge clk) begin
        if (rst_n) begin
          if (iv[a][i] && ir[a][i]) begin
            exp_q[a][i].push_back(seq[a][i]);
            seq[a][i]++;
          end
          if (rv[a][i]) begin
            checks++;
            n_rsp++;
            if (exp_q[a][i].size() == 0 ||
                rs[a][i].rdata != {32'(i), 32'(a), 32'(exp_q[a][i].pop_front()), 32'hA5}) begin
              failures++;
              $display("FAIL response routing arb %0d req %0d", a, i);
            end
          end
          if (!(iv[a][i] && !ir[a][i])) iv[a][i] <= busy_all || ($urandom_range(0, 1) == 1);
          iq[a][i].wdata <= {32'(i), 32'(a), 32'(seq[a][i]), 32'hA5};
        end
      end
    end
  end

  // priority checks on accepted grants
  always @(negedge clk) begin
    if (rst_n && ov[0] && ordy[0]) begin
      for (int i = 0; i < N; i++)
        if (ir[0][i]) begin
          for (int j = 0; j < i; j++) if (iv[0][j]) begin failures++; $display("FAIL fixed priority"); end
          checks++;
        end
    end
    if (rst_n && busy_all && ov[1] && ordy[1]) begin
      for (int i = 0; i < N; i++)
        if (ir[1][i]) begin
          if (last_grant >= 0) begin
            if (i == (last_grant + 1) % N) rr_ok++; else rr_bad++;
          end
          last_grant = i;
        end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2000) @(posedge clk);
    busy_all = 1'b1;
    repeat (300) @(posedge clk);
    check("round robin rotates", rr_ok > 200 && rr_bad == 0);
    check("responses seen", n_rsp > 1000);
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
