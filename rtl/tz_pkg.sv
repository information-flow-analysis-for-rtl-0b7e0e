// tz_pkg: types and constants shared by the TrustZone-style two-core system.
//
// Every memory request in the system carries an NS-bit. In this design the
// NS-bit is 1 for the secure world and 0 for the normal world (a higher value
// is a higher security level), as in the reference prototype, where core 0
// (NS=0) is the normal world and core 1 (NS=1) the secure world.
//
// All requests between caches, the network, the DMA controller and memory use
// one line-wide message format (mreq_t / mresp_t): a 128-bit cache line with a
// 16-bit byte strobe. Word and sub-word accesses place their data in the right
// byte lanes and set only their strobes. The network carries the same fields
// plus a destination node (net_msg_t).
//
// Address map (byte addresses, a design choice): 0x000-0x0FF is the control
// register space, never cached. 0x00 is the memory partition register, 0x04
// the L2 cacheable-control register, 0x08-0x1F the DMA controller registers.
// Everything from 0x100 up is main memory; addresses at or above the partition
// register's value are secure memory.
package tz_pkg;

  localparam int unsigned LINE_W  = 128;
  localparam int unsigned STRB_W  = LINE_W / 8;
  localparam int unsigned OPQ_W   = 4;   // {source node, sub-port}
  localparam int unsigned NODE_W  = 2;
  localparam int unsigned NUM_NODES = 4;

  // Network node numbers.
  localparam logic [NODE_W-1:0] NODE_CORE0 = 2'd0;
  localparam logic [NODE_W-1:0] NODE_CORE1 = 2'd1;
  localparam logic [NODE_W-1:0] NODE_L2    = 2'd2;
  localparam logic [NODE_W-1:0] NODE_DMA   = 2'd3;

  // Control register space.
  localparam logic [31:0] CTRL_LIMIT      = 32'h0000_0100;
  localparam logic [31:0] ADDR_PARTITION  = 32'h0000_0000;
  localparam logic [31:0] ADDR_L2CTRL     = 32'h0000_0004;
  localparam logic [31:0] ADDR_DMA_DOMAIN = 32'h0000_0008;
  localparam logic [31:0] ADDR_DMA_STATUS = 32'h0000_000C;
  localparam logic [31:0] ADDR_DMA_SRC    = 32'h0000_0010;
  localparam logic [31:0] ADDR_DMA_DST    = 32'h0000_0014;
  localparam logic [31:0] DMA_BASE        = 32'h0000_0008;
  localparam logic [31:0] DMA_LIMIT       = 32'h0000_0020;

  typedef enum logic [0:0] {
    MT_RD = 1'b0,
    MT_WR = 1'b1
  } mtype_e;

  typedef struct packed {
    mtype_e             typ;
    logic [OPQ_W-1:0]   opaque;
    logic               ns;
    logic [31:0]        addr;
    logic [STRB_W-1:0]  strb;
    logic [LINE_W-1:0]  data;
  } mreq_t;

  typedef struct packed {
    mtype_e             typ;
    logic [OPQ_W-1:0]   opaque;
    logic               ns;     // security domain of the returned data
    logic [LINE_W-1:0]  data;
  } mresp_t;

  typedef struct packed {
    logic [NODE_W-1:0]  dest;
    logic               is_resp;
    mtype_e             typ;
    logic [OPQ_W-1:0]   opaque;
    logic               ns;
    logic [31:0]        addr;
    logic [STRB_W-1:0]  strb;
    logic [LINE_W-1:0]  data;
  } net_msg_t;

  // DMA operation request: copy one line from src to dst, or (debug only)
  // read the word at src.
  typedef struct packed {
    logic        is_read;
    logic [31:0] src;
    logic [31:0] dst;
    logic        ns;
  } dma_cmd_t;

  function automatic logic is_ctrl_addr(input logic [31:0] a);
    return a < CTRL_LIMIT;
  endfunction

  function automatic logic is_dma_addr(input logic [31:0] a);
    return (a >= DMA_BASE) && (a < DMA_LIMIT);
  endfunction

  // Select the 32-bit word of a line addressed by a byte address.
  function automatic logic [31:0] line_word(input logic [LINE_W-1:0] l, input logic [31:0] a);
    return l[a[3:2]*32 +: 32];
  endfunction

  function automatic logic [LINE_W-1:0] merge_line(input logic [LINE_W-1:0] old_l,
                                                   input logic [LINE_W-1:0] new_l,
                                                   input logic [STRB_W-1:0] strb);
    logic [LINE_W-1:0] r;
    for (int i = 0; i < STRB_W; i++)
      r[i*8 +: 8] = strb[i] ? new_l[i*8 +: 8] : old_l[i*8 +: 8];
    return r;
  endfunction

endpackage
