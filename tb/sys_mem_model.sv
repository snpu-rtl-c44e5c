// sys_mem_model: behavioural model of the system memory seen by the DMA
// engines (not synthesizable, testbench only).
//
// One port per core. Each port accepts a request when ready (ready is
// randomly withheld to exercise back-pressure); a read returns its 512-bit
// packet LAT cycles later. Contents are held sparsely by packet address;
// a packet never written reads as a pattern made from its address, so a
// testbench can predict it: word k of packet p is {p, k} repeated.
module sys_mem_model
  import snpu_pkg::*;
#(
  parameter int unsigned NP  = 1,
  parameter int unsigned LAT = 3
) (
  input  logic              clk,
  input  logic              mem_req_valid [NP],
  output logic              mem_req_ready [NP],
  input  logic              mem_req_we    [NP],
  input  logic [ADDR_W-1:0] mem_req_addr  [NP],
  input  logic [MEM_W-1:0]  mem_req_wdata [NP],
  output logic              mem_rsp_valid [NP],
  output logic [MEM_W-1:0]  mem_rsp_rdata [NP],
  output int                n_reads,
  output int                n_writes
);
  logic [MEM_W-1:0] store [logic [ADDR_W-1:0]];
  int               cnt [NP];
  logic [MEM_W-1:0] pend [NP];

  function automatic logic [MEM_W-1:0] pattern(logic [ADDR_W-1:0] a);
    logic [MEM_W-1:0] v;
    for (int k = 0; k < MEM_W / 64; k++) v[k*64 +: 64] = {a, 32'(k)};
    return v;
  endfunction

  function automatic logic [MEM_W-1:0] peek(logic [ADDR_W-1:0] a);
    return store.exists(a) ? store[a] : pattern(a);
  endfunction

  initial begin
    n_reads = 0;
    n_writes = 0;
    for (int p = 0; p < NP; p++) begin
      cnt[p] = 0;
      mem_req_ready[p] = 1'b0;
      mem_rsp_valid[p] = 1'b0;
      mem_rsp_rdata[p] = '0;
    end
  end

  always @(posedge clk) begin
    for (int p = 0; p < NP; p++) begin
      mem_rsp_valid[p] <= 1'b0;
      if (cnt[p] > 0) begin
        cnt[p] = cnt[p] - 1;
        if (cnt[p] == 0) begin
          mem_rsp_valid[p] <= 1'b1;
          mem_rsp_rdata[p] <= pend[p];
        end
      end
      if (mem_req_valid[p] && mem_req_ready[p]) begin
        if (mem_req_we[p]) begin
          store[mem_req_addr[p]] = mem_req_wdata[p];
          n_writes++;
        end else begin
          pend[p] = peek(mem_req_addr[p]);
          cnt[p]  = LAT;
          n_reads++;
        end
      end
      mem_req_ready[p] <= ($urandom_range(0, 3) != 0);
    end
  end
endmodule
