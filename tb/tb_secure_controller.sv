// tb_secure_controller: sends configuration commands from the secure and
// the normal world and checks which are obeyed: ID state, checking and
// translation register writes reach the guarder ports only when allowed,
// refused commands report an error, and a secure scratchpad clear walks the
// requested lines, with back-pressure, and finishes after the last answer.
//
// Timing: clock period 10 time units; stimulus changes on the falling edge.
// The rules checked are the design's; the stimulus, the reference values
// and the pass/fail line (TB_RESULT checks=N failures=M, with a watchdog
// that counts as a failure) are this testbench's own.
module tb_secure_controller;
  import snpu_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       cmd_valid = 1'b0, cmd_ready, done, done_err;
  cmd_t       cmd = '0;
  id_e        core_id;
  logic       xlat_we, chk_we, spad_valid, spad_ready = 1'b1, spad_rsp_valid = 1'b0;
  logic [3:0] xlat_idx, chk_idx;
  xlat_reg_t  xlat_wval;
  chk_reg_t   chk_wval;
  spad_req_t  spad_req;

  secure_controller dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .done, .done_err, .core_id,
    .xlat_we, .xlat_idx, .xlat_wval, .chk_we, .chk_idx, .chk_wval,
    .spad_valid, .spad_ready, .spad_req, .spad_rsp_valid);

  // scratchpad side: random stalls, answer one cycle after acceptance
  int unsigned clr_seen[$];
  always @(posedge clk) begin
    spad_rsp_valid <= rst_n && spad_valid && spad_ready;
    if (rst_n && spad_valid && spad_ready) begin
      clr_seen.push_back(32'(spad_req.addr));
      if (!(spad_req.clr && spad_req.id == ID_SECURE && !spad_req.we)) begin
        failures++;
        $display("FAIL clear request fields");
      end
    end
    spad_ready <= 1'($urandom_range(0, 2) != 0);
  end

  int n_xw = 0, n_cw = 0;
  always @(posedge clk) begin
    if (xlat_we) n_xw++;
    if (chk_we)  n_cw++;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // issue a command, return done_err and cycles from acceptance to done
  task automatic issue(cmd_op_e op, logic sec, logic [31:0] a0, logic [31:0] a1,
                       output logic err, output int cyc);
    @(negedge clk);
    cmd_valid = 1'b1;
    cmd       = '0;
    cmd.op = op; cmd.secure = sec; cmd.idx = 4'd1; cmd.en = 1'b1;
    cmd.perm = '{r: 1'b1, w: 1'b0};
    cmd.a0 = a0; cmd.a1 = a1; cmd.a2 = 32'h40;
    while (!cmd_ready) @(negedge clk);
    if (op == CMD_SET_XLAT) check("xlat write value", !xlat_we || (xlat_wval.va == a0 && xlat_wval.pa == a1 && xlat_idx == 4'd1));
    if (op == CMD_SET_CHK)  check("chk write value", !chk_we || (chk_wval.base == a0 && chk_wval.size == a1 && chk_wval.perm.r && !chk_wval.perm.w));
    @(negedge clk);
    cmd_valid = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    err = done_err;
  endtask

  initial begin
    logic err;
    int   cyc, xw0, cw0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check("reset ID normal", core_id == ID_NORMAL);
    // normal world cannot set the ID state
    issue(CMD_SET_ID, 1'b0, 32'd1, 0, err, cyc);
    check("normal SET_ID refused", err && core_id == ID_NORMAL);
    // normal world may set translation of a normal core
    xw0 = n_xw;
    issue(CMD_SET_XLAT, 1'b0, 32'h1000, 32'h8000, err, cyc);
    check("normal SET_XLAT on normal core", !err && n_xw == xw0 + 1 && cyc == 1);
    // normal world cannot set checking registers
    cw0 = n_cw;
    issue(CMD_SET_CHK, 1'b0, 32'h0, 32'h100, err, cyc);
    check("normal SET_CHK refused", err && n_cw == cw0);
    // secure world sets checking register and the ID state
    issue(CMD_SET_CHK, 1'b1, 32'h8000_0000, 32'h1000, err, cyc);
    check("secure SET_CHK", !err && n_cw == cw0 + 1);
    issue(CMD_SET_ID, 1'b1, 32'd1, 0, err, cyc);
    check("secure SET_ID", !err && core_id == ID_SECURE);
    // normal world can no longer touch a secure core's translation
    xw0 = n_xw;
    issue(CMD_SET_XLAT, 1'b0, 32'h2000, 32'h9000, err, cyc);
    check("normal SET_XLAT on secure core refused", err && n_xw == xw0);
    issue(CMD_SET_XLAT, 1'b1, 32'h2000, 32'h9000, err, cyc);
    check("secure SET_XLAT", !err && n_xw == xw0 + 1);
    // clears
    issue(CMD_SPAD_CLR, 1'b0, 32'd5, 32'd4, err, cyc);
    check("normal clear refused", err && clr_seen.size() == 0);
    issue(CMD_SPAD_CLR, 1'b1, 32'd100, 32'd37, err, cyc);
    check("secure clear ok", !err);
    check("clear line count", clr_seen.size() == 37);
    for (int i = 0; i < clr_seen.size(); i++)
      check("clear line order", clr_seen[i] == 100 + i);
    check("clear takes at least one cycle per line", cyc >= 38);
    issue(CMD_SET_ID, 1'b1, 32'd0, 0, err, cyc);
    check("secure back to normal", !err && core_id == ID_NORMAL);
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
