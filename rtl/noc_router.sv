// noc_router: five-port mesh router (local, north, east, south, west).
//
// Packets are sequences of flits, head first and tail last; a one-flit
// packet has both marks. Every flit carries its destination coordinates.
// The route is taken from the head flit with dimension-order (X then Y)
// routing, which is deadlock-free on a mesh. Switching is wormhole: once an
// output grants a head flit, the output stays locked to that input until
// the tail flit has passed, so packets never interleave on a link. The
// output arbiter ("router arbiter") picks among competing head flits
// round-robin.
//
// Each input has a FIFO_DEPTH-entry flit buffer; in_ready is "buffer not
// full", a registered signal, so ready never depends on valid
// combinationally across routers. out_valid/out_flit come straight from the
// buffer heads. Latency is one cycle per hop and throughput one flit per
// cycle per port.
//
// The packet-based NoC with head/body/tail flits follows the design
// description. Absolute destination coordinates, XY routing, buffer depth
// and round-robin arbitration are this design's choices.
module noc_router
  import snpu_pkg::*;
#(
  parameter int unsigned X          = 0,
  parameter int unsigned Y          = 0,
  parameter int unsigned FIFO_DEPTH = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid  [NPORTS],
  output logic  in_ready  [NPORTS],
  input  flit_t in_flit   [NPORTS],
  output logic  out_valid [NPORTS],
  input  logic  out_ready [NPORTS],
  output flit_t out_flit  [NPORTS]
);
  localparam int unsigned PW = $clog2(NPORTS);
  localparam int unsigned DW = $clog2(FIFO_DEPTH);

  // ---------------- input buffers ----------------
  flit_t         fifo_q  [NPORTS][FIFO_DEPTH];
  logic [DW-1:0] rd_q    [NPORTS];
  logic [DW-1:0] wr_q    [NPORTS];
  logic [DW:0]   cnt_q   [NPORTS];
  logic          hv      [NPORTS];   // buffer head valid
  flit_t         hf      [NPORTS];   // buffer head flit
  logic          pop     [NPORTS];
  logic          push    [NPORTS];
  logic [PW-1:0] route   [NPORTS];

  always_comb begin
    for (int unsigned i = 0; i < NPORTS; i++) begin
      in_ready[i] = (32'(cnt_q[i]) < FIFO_DEPTH);
      push[i]     = in_valid[i] && in_ready[i];
      hv[i]       = (cnt_q[i] != '0);
      hf[i]       = fifo_q[i][rd_q[i]];
      if (32'(hf[i].dst_x) > X)          route[i] = PW'(P_EAST);
      else if (32'(hf[i].dst_x) + 1 <= X) route[i] = PW'(P_WEST);
      else if (32'(hf[i].dst_y) > Y)      route[i] = PW'(P_NORTH);
      else if (32'(hf[i].dst_y) + 1 <= Y) route[i] = PW'(P_SOUTH);
      else                            route[i] = PW'(P_LOCAL);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < NPORTS; i++) begin
        rd_q[i]  <= '0;
        wr_q[i]  <= '0;
        cnt_q[i] <= '0;
      end
    end else begin
      for (int unsigned i = 0; i < NPORTS; i++) begin
        if (push[i]) begin
          wr_q[i] <= (32'(wr_q[i]) == FIFO_DEPTH - 1) ? '0 : wr_q[i] + 1'b1;
        end
        if (pop[i]) begin
          rd_q[i] <= (32'(rd_q[i]) == FIFO_DEPTH - 1) ? '0 : rd_q[i] + 1'b1;
        end
        cnt_q[i] <= cnt_q[i] + (DW+1)'(push[i]) - (DW+1)'(pop[i]);
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int unsigned i = 0; i < NPORTS; i++)
      if (push[i]) fifo_q[i][wr_q[i]] <= in_flit[i];
  end

  // ---------------- output arbitration and wormhole locks ----------------
  logic          lock_v_q [NPORTS];
  logic [PW-1:0] lock_in_q[NPORTS];
  logic [PW-1:0] rr_q     [NPORTS];
  logic          sel_v    [NPORTS];
  logic [PW-1:0] sel      [NPORTS];

  always_comb begin
    for (int unsigned o = 0; o < NPORTS; o++) begin
      logic          found;
      logic [PW-1:0] pick;
      found = 1'b0;
      pick  = '0;
      for (int unsigned k = 0; k < NPORTS; k++) begin
        if (!found && hv[(k + 32'(rr_q[o])) % NPORTS] && hf[(k + 32'(rr_q[o])) % NPORTS].head &&
            (32'(route[(k + 32'(rr_q[o])) % NPORTS]) == o)) begin
          found = 1'b1;
          pick  = PW'((k + 32'(rr_q[o])) % NPORTS);
        end
      end
      if (lock_v_q[o]) begin
        sel[o]   = lock_in_q[o];
        sel_v[o] = hv[lock_in_q[o]];
      end else begin
        sel[o]   = pick;
        sel_v[o] = found;
      end
    end
  end

  always_comb begin
    for (int unsigned o = 0; o < NPORTS; o++) begin
      out_valid[o] = sel_v[o];
      out_flit[o]  = hf[sel[o]];
    end
  end

  always_comb begin
    for (int unsigned i = 0; i < NPORTS; i++) begin
      pop[i] = 1'b0;
      for (int unsigned o = 0; o < NPORTS; o++)
        if (sel_v[o] && (32'(sel[o]) == i) && out_ready[o]) pop[i] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned o = 0; o < NPORTS; o++) begin
        lock_v_q[o]  <= 1'b0;
        lock_in_q[o] <= '0;
        rr_q[o]      <= '0;
      end
    end else begin
      for (int unsigned o = 0; o < NPORTS; o++) begin
        if (sel_v[o] && out_ready[o]) begin
          if (!lock_v_q[o]) rr_q[o] <= (32'(sel[o]) == NPORTS - 1) ? '0 : sel[o] + 1'b1;
          lock_v_q[o]  <= !hf[sel[o]].tail;
          lock_in_q[o] <= sel[o];
        end
      end
    end
  end

endmodule
