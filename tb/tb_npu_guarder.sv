// tb_npu_guarder: programs translation and checking registers and sends
// random DMA requests; a reference model predicts for each request either
// the translated physical request or the fault kind. Also checks the
// one-cycle latency, back-pressure from the DMA side and that exactly one
// check is counted per request.
//
// Timing: clock period 10 time units; stimulus changes on the falling edge.
// The rules checked are the design's; the stimulus, the reference values
// and the pass/fail line (TB_RESULT checks=N failures=M, with a watchdog
// that counts as a failure) are this testbench's own.
module tb_npu_guarder;
  import snpu_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        xlat_we = 1'b0, chk_we = 1'b0;
  logic [3:0]  xlat_idx = '0, chk_idx = '0;
  xlat_reg_t   xlat_wval = '0;
  chk_reg_t    chk_wval = '0;
  logic        in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b1, fault_valid;
  dma_req_t    in_req = '0, out_req;
  dma_status_e fault_status;
  logic [31:0] n_checks;

  npu_guarder dut (
    .clk, .rst_n, .xlat_we, .xlat_idx, .xlat_wval, .chk_we, .chk_idx, .chk_wval,
    .in_valid, .in_ready, .in_req, .out_valid, .out_ready, .out_req,
    .fault_valid, .fault_status, .checks (n_checks));

  xlat_reg_t xr [3];
  chk_reg_t  cr [2];
  int n_ok = 0, n_xf = 0, n_pf = 0;

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic set_xlat(int i, xlat_reg_t r);
    xr[i] = r;
    @(negedge clk);
    xlat_we = 1'b1; xlat_idx = 4'(i); xlat_wval = r;
    @(negedge clk);
    xlat_we = 1'b0;
  endtask

  task automatic set_chk(int i, chk_reg_t r);
    cr[i] = r;
    @(negedge clk);
    chk_we = 1'b1; chk_idx = 4'(i); chk_wval = r;
    @(negedge clk);
    chk_we = 1'b0;
  endtask

  // reference translation and check, written independently with 64-bit sums
  task automatic predict(dma_req_t r, output dma_status_e st, output logic [ADDR_W-1:0] pa);
    longint unsigned s, e, bytes;
    logic hit;
    bytes = longint'(r.npkt) * 64;
    s = r.addr; e = s + bytes;
    hit = 1'b0; pa = '0;
    for (int i = 0; i < 3; i++)
      if (!hit && xr[i].en && s >= xr[i].va && e <= longint'(xr[i].va) + xr[i].size) begin
        hit = 1'b1;
        pa  = ADDR_W'(longint'(xr[i].pa) + (s - xr[i].va));
      end
    if (!hit) begin st = DMA_XLAT_FAULT; return; end
    s = pa; e = s + bytes;
    for (int j = 0; j < 2; j++)
      if (cr[j].en && s >= cr[j].base && e <= longint'(cr[j].base) + cr[j].size &&
          (r.store ? cr[j].perm.w : cr[j].perm.r)) begin
        st = DMA_OK; return;
      end
    st = DMA_PERM_FAULT;
  endtask

  initial begin
    dma_status_e st;
    logic [ADDR_W-1:0] pa;
    dma_req_t r;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // three tiles: input, weight, output
    set_xlat(0, '{en: 1'b1, va: 32'h1000_0000, pa: 32'h8000_0000, size: 32'h0001_0000});
    set_xlat(1, '{en: 1'b1, va: 32'h2000_0000, pa: 32'h8010_0000, size: 32'h0000_4000});
    set_xlat(2, '{en: 1'b1, va: 32'h3000_0000, pa: 32'h9000_0000, size: 32'h0000_8000});
    // region 0: normal memory, read/write; region 1: read-only part
    set_chk(0, '{en: 1'b1, base: 32'h8000_0000, size: 32'h0008_0000, perm: '{r: 1'b1, w: 1'b1}});
    set_chk(1, '{en: 1'b1, base: 32'h8010_0000, size: 32'h0001_0000, perm: '{r: 1'b1, w: 1'b0}});
    for (int i = 0; i < 600; i++) begin
      int unsigned t;
      t = $urandom_range(0, 3);
      r.store     = 1'($urandom_range(0, 1));
      r.npkt      = LEN_W'($urandom_range(0, 300));
      r.spad_addr = SPAD_AW'($urandom);
      case (t)
        0: r.addr = 32'h1000_0000 + ($urandom_range(0, 32'h1_0000) & ~32'h3f);
        1: r.addr = 32'h2000_0000 + ($urandom_range(0, 32'h4000) & ~32'h3f);
        2: r.addr = 32'h3000_0000 + ($urandom_range(0, 32'h8000) & ~32'h3f);
        default: r.addr = $urandom;
      endcase
      predict(r, st, pa);
      @(negedge clk);
      in_valid = 1'b1; in_req = r;
      out_ready = 1'($urandom_range(0, 3) != 0);
      while (!in_ready) begin
        @(negedge clk);
        out_ready = 1'b1;
      end
      @(negedge clk);
      in_valid = 1'b0;
      if (st == DMA_OK) begin
        n_ok++;
        check("out valid", out_valid && !fault_valid);
        check("out pa", out_req.addr == pa);
        check("out fields", out_req.npkt == r.npkt && out_req.store == r.store &&
                            out_req.spad_addr == r.spad_addr);
        out_ready = 1'b1;
      end else begin
        if (st == DMA_XLAT_FAULT) n_xf++; else n_pf++;
        check("fault", fault_valid && fault_status == st);
      end
    end
    @(negedge clk);
    check("one check per request", n_checks == 600);
    check("all outcomes seen", n_ok > 0 && n_xf > 0 && n_pf > 0);
    $display("ok=%0d xlat_fault=%0d perm_fault=%0d", n_ok, n_xf, n_pf);
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
