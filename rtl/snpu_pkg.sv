// snpu_pkg: types and constants shared by the secure NPU blocks.
//
// The security model has two hardware domains: an NPU core, a scratchpad
// wordline and a NoC packet each carry a one-bit ID state, 1 for secure and
// 0 for normal (non-secure). Scratchpad wordlines are 128 bits wide and a
// DMA memory packet is 64 bytes, as in the design description. Address
// widths, command encodings and the flit layout are this design's own
// choices.
package snpu_pkg;

  // ---------------------------------------------------------------------
  // Sizes
  // ---------------------------------------------------------------------
  localparam int unsigned ADDR_W     = 32;   // virtual and physical address width
  localparam int unsigned LINE_W     = 128;  // scratchpad wordline width (bits)
  localparam int unsigned LINE_BYTES = LINE_W / 8;
  localparam int unsigned PKT_BYTES  = 64;   // DMA memory packet size
  localparam int unsigned PKT_LINES  = PKT_BYTES / LINE_BYTES;
  localparam int unsigned MEM_W      = PKT_BYTES * 8;
  localparam int unsigned SPAD_AW    = 16;   // scratchpad address; MSB selects the global scratchpad
  localparam int unsigned LEN_W      = 16;   // transfer lengths (packets or lines)
  localparam int unsigned COORD_W    = 3;    // mesh coordinate width

  // ---------------------------------------------------------------------
  // ID state (one bit: two hardware domains)
  // ---------------------------------------------------------------------
  typedef enum logic {
    ID_NORMAL = 1'b0,
    ID_SECURE = 1'b1
  } id_e;

  // ---------------------------------------------------------------------
  // Scratchpad port: one request per cycle, response one cycle after the
  // request is accepted. clr is the secure "reset to non-secure" operation.
  // ---------------------------------------------------------------------
  typedef struct packed {
    logic               we;
    logic               clr;
    id_e                id;
    logic [SPAD_AW-1:0] addr;
    logic [LINE_W-1:0]  wdata;
  } spad_req_t;

  typedef struct packed {
    logic              denied;
    logic [LINE_W-1:0] rdata;
  } spad_rsp_t;

  // ---------------------------------------------------------------------
  // NPU Guarder registers
  // ---------------------------------------------------------------------
  typedef struct packed {
    logic r;
    logic w;
  } perm_t;

  typedef struct packed {
    logic              en;
    logic [ADDR_W-1:0] base;   // first byte of the region
    logic [ADDR_W-1:0] size;   // bytes
    perm_t             perm;
  } chk_reg_t;

  typedef struct packed {
    logic              en;
    logic [ADDR_W-1:0] va;     // first virtual byte of the tile
    logic [ADDR_W-1:0] pa;     // physical address va maps to
    logic [ADDR_W-1:0] size;   // bytes
  } xlat_reg_t;

  // DMA request as issued by the core (virtual) and as passed to the DMA
  // engine (physical). Length counts 64-byte packets.
  typedef struct packed {
    logic               store;     // 1: scratchpad -> memory, 0: memory -> scratchpad
    logic [ADDR_W-1:0]  addr;
    logic [LEN_W-1:0]   npkt;
    logic [SPAD_AW-1:0] spad_addr;
  } dma_req_t;

  typedef enum logic [1:0] {
    DMA_OK         = 2'd0,
    DMA_XLAT_FAULT = 2'd1,   // no translation register covers the range
    DMA_PERM_FAULT = 2'd2,   // no checking register permits the access
    DMA_SPAD_DENY  = 2'd3    // a scratchpad read was refused by the ID rule
  } dma_status_e;

  // ---------------------------------------------------------------------
  // Secure controller commands
  // ---------------------------------------------------------------------
  typedef enum logic [2:0] {
    CMD_SET_ID   = 3'd0,  // a0[0] = new ID state (secure world only)
    CMD_SET_CHK  = 3'd1,  // idx, a0 = base, a1 = size, perm, en (secure world only)
    CMD_SET_XLAT = 3'd2,  // idx, a0 = va, a1 = pa, a2 = size, en
    CMD_SPAD_CLR = 3'd3   // a0 = first scratchpad line, a1 = line count (secure world only)
  } cmd_op_e;

  typedef struct packed {
    cmd_op_e           op;
    logic              secure;  // issued by a secure-world CPU
    logic [3:0]        idx;
    logic              en;
    perm_t             perm;
    logic [ADDR_W-1:0] a0;
    logic [ADDR_W-1:0] a1;
    logic [ADDR_W-1:0] a2;
  } cmd_t;

  // ---------------------------------------------------------------------
  // NoC flits
  // ---------------------------------------------------------------------
  typedef enum logic [2:0] {
    FK_AUTH_REQ  = 3'd0,  // peephole authentication request (single flit)
    FK_AUTH_ACK  = 3'd1,  // authentication passed
    FK_NACK_DENY = 3'd2,  // authentication failed: ID states differ or too long
    FK_NACK_BUSY = 3'd3,  // receiver not armed or locked to another source
    FK_DATA      = 3'd4   // one scratchpad line
  } flit_kind_e;

  typedef struct packed {
    logic               head;
    logic               tail;
    flit_kind_e         kind;
    logic [COORD_W-1:0] dst_x;
    logic [COORD_W-1:0] dst_y;
    logic [COORD_W-1:0] src_x;
    logic [COORD_W-1:0] src_y;
    id_e                id;    // source core's ID state: the peephole identity
    logic [LEN_W-1:0]   len;   // lines in the data transfer (AUTH_REQ)
    logic [LINE_W-1:0]  data;
  } flit_t;

  // Router port numbering
  localparam int unsigned P_LOCAL = 0;
  localparam int unsigned P_NORTH = 1;  // y + 1
  localparam int unsigned P_EAST  = 2;  // x + 1
  localparam int unsigned P_SOUTH = 3;  // y - 1
  localparam int unsigned P_WEST  = 4;  // x - 1
  localparam int unsigned NPORTS  = 5;

  typedef enum logic [1:0] {
    NOC_DONE      = 2'd0,
    NOC_DENIED    = 2'd1,
    NOC_BUSY      = 2'd2,
    NOC_SPAD_DENY = 2'd3
  } noc_status_e;

  // Range containment: [a, a+n) inside [b, b+m), without wrap-around.
  function automatic logic range_inside(logic [ADDR_W-1:0] a, logic [ADDR_W-1:0] n,
                                        logic [ADDR_W-1:0] b, logic [ADDR_W-1:0] m);
    logic [ADDR_W:0] a_end, b_end;
    a_end = {1'b0, a} + {1'b0, n};
    b_end = {1'b0, b} + {1'b0, m};
    return (a >= b) && (a_end <= b_end);
  endfunction

endpackage
