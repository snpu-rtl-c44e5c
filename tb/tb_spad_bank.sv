// tb_spad_bank: random test of the ID-tagged scratchpad in both modes.
//
// Two 64-line banks, one exclusive and one shared, receive the same random
// stream of reads, writes and clears from random ID states. A reference
// model in the testbench applies the isolation rules and predicts every
// response (data and denied flag). All lines are written once first so the
// model knows every line. Also checks the one-cycle response latency.
//
// Timing: clock period 10 time units; stimulus changes on the falling edge.
// The rules checked are the design's; the stimulus, the reference values
// and the pass/fail line (TB_RESULT checks=N failures=M, with a watchdog
// that counts as a failure) are this testbench's own.
module tb_spad_bank;
  import snpu_pkg::*;

  localparam int unsigned DEPTH = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic      v;
  spad_req_t rq;
  logic      rv_e, rv_s, rdy_e, rdy_s;
  spad_rsp_t rsp_e, rsp_s;

  spad_bank #(.DEPTH(DEPTH), .SHARED(1'b0)) u_excl (
    .clk, .rst_n, .req_valid (v), .req_ready (rdy_e), .req (rq), .rsp_valid (rv_e), .rsp (rsp_e));
  spad_bank #(.DEPTH(DEPTH), .SHARED(1'b1)) u_shar (
    .clk, .rst_n, .req_valid (v), .req_ready (rdy_s), .req (rq), .rsp_valid (rv_s), .rsp (rsp_s));

  logic [LINE_W-1:0] md_e [DEPTH], md_s [DEPTH];
  id_e               mi_e [DEPTH], mi_s [DEPTH];

  int n_deny_e = 0, n_deny_s = 0, n_force = 0, n_clr = 0;

  function automatic logic [LINE_W-1:0] rnd_line();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Issue one request, predict, compare the response a cycle later.
  task automatic op(logic we, logic clr, id_e id, int unsigned a, logic [LINE_W-1:0] d);
    logic              de, ds;
    logic [LINE_W-1:0] ee, es;
    // exclusive model
    de = 1'b0; ee = '0;
    if (clr) begin
      de = (id != ID_SECURE);
      if (!de) begin md_e[a] = '0; mi_e[a] = ID_NORMAL; end
    end else if (we) begin
      md_e[a] = d; mi_e[a] = id;
    end else begin
      de = (mi_e[a] != id);
      ee = de ? '0 : md_e[a];
    end
    // shared model
    ds = 1'b0; es = '0;
    if (clr) begin
      ds = (id != ID_SECURE);
      if (!ds) begin md_s[a] = '0; mi_s[a] = ID_NORMAL; end
    end else begin
      ds = (id == ID_NORMAL) && (mi_s[a] == ID_SECURE);
      if (!ds) begin
        if (we) begin md_s[a] = d; mi_s[a] = id; end
        else begin
          es = md_s[a];
          if (id == ID_SECURE && mi_s[a] == ID_NORMAL) n_force++;
          if (id == ID_SECURE) mi_s[a] = ID_SECURE;
        end
      end
    end
    v        <= 1'b1;
    rq.we    <= we;
    rq.clr   <= clr;
    rq.id    <= id;
    rq.addr  <= SPAD_AW'(a);
    rq.wdata <= d;
    @(posedge clk);
    v <= 1'b0;
    @(negedge clk);
    check("rsp valid excl", rv_e && rdy_e);
    check("rsp valid shared", rv_s && rdy_s);
    check("excl denied", rsp_e.denied == de);
    check("excl data", rsp_e.rdata == ee);
    check("shared denied", rsp_s.denied == ds);
    check("shared data", rsp_s.rdata == es);
    if (de) n_deny_e++;
    if (ds) n_deny_s++;
    if (clr && !de) n_clr++;
  endtask

  initial begin
    v  = 1'b0;
    rq = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int unsigned a = 0; a < DEPTH; a++)
      op(1'b1, 1'b0, ID_SECURE, a, rnd_line());  // secure writes are never refused
    for (int i = 0; i < 3000; i++) begin
      int unsigned r;
      r = $urandom_range(0, 99);
      op(r < 35, r >= 95, id_e'($urandom_range(0, 1)), $urandom_range(0, DEPTH - 1), rnd_line());
    end
    check("exclusive denials seen", n_deny_e > 0);
    check("shared denials seen", n_deny_s > 0);
    check("shared forced-secure reads seen", n_force > 0);
    check("clears seen", n_clr > 0);
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
