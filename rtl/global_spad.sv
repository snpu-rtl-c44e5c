// global_spad: the scratchpad shared by all NPU cores.
//
// A round-robin spad_arbiter in front of a spad_bank with the shared-mode ID
// rules: a normal core can neither read nor write a secure wordline, and a
// secure core's read or write turns the wordline secure. Each core has one
// port (valid/ready request, response one cycle after acceptance). Only the
// low bits of the scratchpad address index the bank; the core uses the
// address MSB to steer a request here. The bank size is this design's
// choice: the design description does not give one for the shared
// scratchpad.
module global_spad
  import snpu_pkg::*;
#(
  parameter int unsigned NUM_PORTS = 10,
  parameter int unsigned DEPTH     = 4096
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      req_valid [NUM_PORTS],
  output logic      req_ready [NUM_PORTS],
  input  spad_req_t req       [NUM_PORTS],
  output logic      rsp_valid [NUM_PORTS],
  output spad_rsp_t rsp       [NUM_PORTS]
);
  logic      b_valid, b_ready, b_rsp_valid;
  spad_req_t b_req;
  spad_rsp_t b_rsp;

  spad_arbiter #(.N(NUM_PORTS), .ROUND_ROBIN(1'b1)) u_arb (
    .clk, .rst_n,
    .in_valid (req_valid), .in_ready (req_ready), .in_req (req),
    .in_rsp_valid (rsp_valid), .in_rsp (rsp),
    .out_valid (b_valid), .out_ready (b_ready), .out_req (b_req),
    .out_rsp_valid (b_rsp_valid), .out_rsp (b_rsp)
  );

  spad_bank #(.DEPTH(DEPTH), .SHARED(1'b1)) u_bank (
    .clk, .rst_n,
    .req_valid (b_valid), .req_ready (b_ready), .req (b_req),
    .rsp_valid (b_rsp_valid), .rsp (b_rsp)
  );

endmodule
