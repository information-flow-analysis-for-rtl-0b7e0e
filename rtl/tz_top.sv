// tz_top: two-core system with TrustZone-style isolation between a secure
// world and a normal world.
//
// Structure (node numbers are network nodes):
//   node 0: core 0 (starts in the normal world) + L1 I/D caches + checker
//   node 1: core 1 (starts in the secure world) + L1 I/D caches + checker
//   node 2: shared L2 cache (with cacheable-control register)
//   node 3: DMA controller (with domain register), fed also by the debug
//           interface through its own security checker
//   ring network joining the four nodes, separate normal/secure channels
//   memory request arbiter (L2 cache and DMA controller)
//   memory access control module (partition register) -> main memory
//
// Every request carries an NS-bit from its source (a core's current world,
// the DMA domain register, the debug enables). The NS-bit travels with the
// request through caches and network unchanged and is checked where it
// matters: the caches' per-line security tags, the processor checkers on the
// way back to each core, the DMA checkers and the memory access control
// module. Secure memory lies at and above the partition register; control
// registers lie in 0x000-0x0FF (see tz_pkg).
//
// Both cores can switch worlds at run time through ns_switch_req/ack (hold
// the request until the acknowledgement). With the requests tied low the
// system is the fixed-world variant.
//
// Ports beyond the system's own: the manager interfaces of both cores (a
// value in, values out through mtc0), the debug port, and a word-wide load
// port into main memory for the program image.
//
// Each block's one-cycle event pulses (cache hits and misses, stalls,
// refusals, DMA completions and so on) are wired to named internal signals
// here and nowhere else: they exist for statistics and are read by the
// system testbench through the hierarchy, so lint reports them as unused.
module tz_top
  import tz_pkg::*;
#(
  parameter logic [31:0] RESET_PC0       = 32'h0000_0200,
  parameter logic [31:0] RESET_PC1       = 32'h0000_8200,
  parameter int unsigned L1_SETS         = 16,
  parameter int unsigned L2_SETS         = 64,
  parameter int unsigned MEM_BYTES       = 65536,
  parameter int unsigned MEM_LATENCY     = 4,
  parameter logic [31:0] PARTITION_RESET = 32'h0000_8000,
  parameter int unsigned QDEPTH          = 4
) (
  input  logic         clk,
  input  logic         rst,
  // cores
  input  logic [1:0]   ns_switch_req,
  output logic [1:0]   ns_switch_ack,
  output logic [1:0]   core_ns,
  input  logic [31:0]  from_mngr_data [2],
  output logic [1:0]   to_mngr_val,
  output logic [31:0]  to_mngr_data [2],
  // debug port
  input  logic         dbg_sec_en,
  input  logic         dbg_ns_en,
  input  logic         dbg_req_val,
  output logic         dbg_req_rdy,
  input  logic         dbg_req_read,
  input  logic [31:0]  dbg_req_src,
  input  logic [31:0]  dbg_req_dst,
  output logic         dbg_resp_val,
  output logic [31:0]  dbg_resp_data,
  output logic         dbg_resp_err,
  // program load port
  input  logic         init_we,
  input  logic [31:0]  init_addr,
  input  logic [31:0]  init_data
);
  // network terminals
  logic     n_in_val  [NUM_NODES];
  logic     n_in_rdy  [NUM_NODES];
  net_msg_t n_in_msg  [NUM_NODES];
  logic     n_out_val [NUM_NODES];
  logic     n_out_rdy [NUM_NODES];
  net_msg_t n_out_msg [NUM_NODES];
  logic [NUM_NODES-1:0] noc_prio_evt;

  logic [31:0] partition;

  // ------------------------------------------------------------ cores
  for (genvar c = 0; c < 2; c++) begin : g_core
    // core <-> L1
    logic   ireq_val, ireq_rdy, iresp_val, iresp_rdy;
    logic   dreq_val, dreq_rdy, dresp_val, dresp_rdy;
    mreq_t  ireq, dreq;
    mresp_t iresp, dresp;
    // L1 <-> checker (0: I, 1: D)
    logic   l1m_req_val [2];
    logic   l1m_req_rdy [2];
    mreq_t  l1m_req     [2];
    logic   l1m_resp_val [2];
    logic   l1m_resp_rdy [2];
    mresp_t l1m_resp     [2];
    logic   stall_evt, bypass_evt, squash_evt, filter_evt;
    logic   ic_hit, ic_miss, ic_wb, ic_byp, ic_deny;
    logic   dc_hit, dc_miss, dc_wb, dc_byp, dc_deny;

    tz_core #(
      .RESET_PC(c == 0 ? RESET_PC0 : RESET_PC1),
      .NS_RESET(c == 0 ? 1'b0 : 1'b1)
    ) u_core (
      .clk, .rst,
      .imemreq_val(ireq_val), .imemreq_rdy(ireq_rdy), .imemreq(ireq),
      .imemresp_val(iresp_val), .imemresp_rdy(iresp_rdy), .imemresp(iresp),
      .dmemreq_val(dreq_val), .dmemreq_rdy(dreq_rdy), .dmemreq(dreq),
      .dmemresp_val(dresp_val), .dmemresp_rdy(dresp_rdy), .dmemresp(dresp),
      .from_mngr_data(from_mngr_data[c]),
      .to_mngr_val(to_mngr_val[c]), .to_mngr_data(to_mngr_data[c]),
      .ns_switch_req(ns_switch_req[c]), .ns_switch_ack(ns_switch_ack[c]),
      .ns(core_ns[c]),
      .stall_evt, .bypass_evt, .squash_evt
    );

    sec_cache #(.SETS(L1_SETS), .IS_L2(1'b0)) u_icache (
      .clk, .rst,
      .creq_val(ireq_val), .creq_rdy(ireq_rdy), .creq(ireq),
      .cresp_val(iresp_val), .cresp_rdy(iresp_rdy), .cresp(iresp),
      .mreq_val(l1m_req_val[0]), .mreq_rdy(l1m_req_rdy[0]), .mreq(l1m_req[0]),
      .mresp_val(l1m_resp_val[0]), .mresp_rdy(l1m_resp_rdy[0]), .mresp(l1m_resp[0]),
      .partition('0),
      .hit_evt(ic_hit), .miss_evt(ic_miss), .wb_evt(ic_wb), .bypass_evt(ic_byp), .deny_evt(ic_deny)
    );

    sec_cache #(.SETS(L1_SETS), .IS_L2(1'b0)) u_dcache (
      .clk, .rst,
      .creq_val(dreq_val), .creq_rdy(dreq_rdy), .creq(dreq),
      .cresp_val(dresp_val), .cresp_rdy(dresp_rdy), .cresp(dresp),
      .mreq_val(l1m_req_val[1]), .mreq_rdy(l1m_req_rdy[1]), .mreq(l1m_req[1]),
      .mresp_val(l1m_resp_val[1]), .mresp_rdy(l1m_resp_rdy[1]), .mresp(l1m_resp[1]),
      .partition('0),
      .hit_evt(dc_hit), .miss_evt(dc_miss), .wb_evt(dc_wb), .bypass_evt(dc_byp), .deny_evt(dc_deny)
    );

    proc_checker #(.NODE(NODE_W'(c))) u_pchk (
      .clk, .rst,
      .core_ns(core_ns[c]),
      .l1_req_val(l1m_req_val), .l1_req_rdy(l1m_req_rdy), .l1_req(l1m_req),
      .l1_resp_val(l1m_resp_val), .l1_resp_rdy(l1m_resp_rdy), .l1_resp(l1m_resp),
      .net_out_val(n_in_val[c]), .net_out_rdy(n_in_rdy[c]), .net_out_msg(n_in_msg[c]),
      .net_in_val(n_out_val[c]), .net_in_rdy(n_out_rdy[c]), .net_in_msg(n_out_msg[c]),
      .filter_evt
    );
  end

  // ------------------------------------------------------------ network
  ring_noc #(.QDEPTH(QDEPTH)) u_noc (
    .clk, .rst,
    .in_val(n_in_val), .in_rdy(n_in_rdy), .in_msg(n_in_msg),
    .out_val(n_out_val), .out_rdy(n_out_rdy), .out_msg(n_out_msg),
    .priority_evt(noc_prio_evt)
  );

  // ------------------------------------------------------------ L2 node
  logic   l2_creq_val, l2_creq_rdy, l2_cresp_val, l2_cresp_rdy;
  mreq_t  l2_creq;
  mresp_t l2_cresp;
  logic   l2_mreq_val, l2_mreq_rdy, l2_mresp_val, l2_mresp_rdy;
  mreq_t  l2_mreq;
  mresp_t l2_mresp;
  logic   l2_hit, l2_miss, l2_wb, l2_byp, l2_deny;

  assign l2_creq_val          = n_out_val[NODE_L2];
  assign n_out_rdy[NODE_L2]   = l2_creq_rdy;
  assign l2_creq.typ          = n_out_msg[NODE_L2].typ;
  assign l2_creq.opaque       = n_out_msg[NODE_L2].opaque;
  assign l2_creq.ns           = n_out_msg[NODE_L2].ns;
  assign l2_creq.addr         = n_out_msg[NODE_L2].addr;
  assign l2_creq.strb         = n_out_msg[NODE_L2].strb;
  assign l2_creq.data         = n_out_msg[NODE_L2].data;

  assign n_in_val[NODE_L2]         = l2_cresp_val;
  assign l2_cresp_rdy              = n_in_rdy[NODE_L2];
  assign n_in_msg[NODE_L2].dest    = l2_cresp.opaque[OPQ_W-1 -: NODE_W];
  assign n_in_msg[NODE_L2].is_resp = 1'b1;
  assign n_in_msg[NODE_L2].typ     = l2_cresp.typ;
  assign n_in_msg[NODE_L2].opaque  = l2_cresp.opaque;
  assign n_in_msg[NODE_L2].ns      = l2_cresp.ns;
  assign n_in_msg[NODE_L2].addr    = '0;
  assign n_in_msg[NODE_L2].strb    = '0;
  assign n_in_msg[NODE_L2].data    = l2_cresp.data;

  sec_cache #(.SETS(L2_SETS), .IS_L2(1'b1)) u_l2 (
    .clk, .rst,
    .creq_val(l2_creq_val), .creq_rdy(l2_creq_rdy), .creq(l2_creq),
    .cresp_val(l2_cresp_val), .cresp_rdy(l2_cresp_rdy), .cresp(l2_cresp),
    .mreq_val(l2_mreq_val), .mreq_rdy(l2_mreq_rdy), .mreq(l2_mreq),
    .mresp_val(l2_mresp_val), .mresp_rdy(l2_mresp_rdy), .mresp(l2_mresp),
    .partition,
    .hit_evt(l2_hit), .miss_evt(l2_miss), .wb_evt(l2_wb), .bypass_evt(l2_byp), .deny_evt(l2_deny)
  );

  // ------------------------------------------------------------ DMA node
  logic      dma_cmd_val, dma_cmd_rdy, dma_dresp_val, dma_dresp_rdy, dma_dresp_err;
  dma_cmd_t  dma_cmd;
  logic [31:0] dma_dresp_data;
  logic      dma_mreq_val, dma_mreq_rdy, dma_mresp_val, dma_mresp_rdy;
  mreq_t     dma_mreq;
  mresp_t    dma_mresp;
  logic      dma_domain, dma_reject_evt, dma_done_evt;

  debug_if u_dbg (
    .clk, .rst,
    .sec_dbg_en(dbg_sec_en), .ns_dbg_en(dbg_ns_en),
    .req_val(dbg_req_val), .req_rdy(dbg_req_rdy), .req_read(dbg_req_read),
    .req_src(dbg_req_src), .req_dst(dbg_req_dst),
    .resp_val(dbg_resp_val), .resp_data(dbg_resp_data), .resp_err(dbg_resp_err),
    .cmd_val(dma_cmd_val), .cmd_rdy(dma_cmd_rdy), .cmd(dma_cmd),
    .dma_resp_val(dma_dresp_val), .dma_resp_rdy(dma_dresp_rdy),
    .dma_resp_data(dma_dresp_data), .dma_resp_err(dma_dresp_err)
  );

  dma_ctrl u_dma (
    .clk, .rst,
    .net_in_val(n_out_val[NODE_DMA]), .net_in_rdy(n_out_rdy[NODE_DMA]), .net_in_msg(n_out_msg[NODE_DMA]),
    .net_out_val(n_in_val[NODE_DMA]), .net_out_rdy(n_in_rdy[NODE_DMA]), .net_out_msg(n_in_msg[NODE_DMA]),
    .dbg_cmd_val(dma_cmd_val), .dbg_cmd_rdy(dma_cmd_rdy), .dbg_cmd(dma_cmd),
    .dbg_resp_val(dma_dresp_val), .dbg_resp_rdy(dma_dresp_rdy),
    .dbg_resp_data(dma_dresp_data), .dbg_resp_err(dma_dresp_err),
    .mreq_val(dma_mreq_val), .mreq_rdy(dma_mreq_rdy), .mreq(dma_mreq),
    .mresp_val(dma_mresp_val), .mresp_rdy(dma_mresp_rdy), .mresp(dma_mresp),
    .domain(dma_domain), .reject_evt(dma_reject_evt), .done_evt(dma_done_evt)
  );

  // ------------------------------------------------------------ memory side
  logic [1:0] arb_in_val, arb_in_rdy, arb_resp_val, arb_resp_rdy;
  mreq_t  arb_in_req [2];
  mresp_t arb_resp;
  logic   mac_req_val, mac_req_rdy, mac_resp_val, mac_resp_rdy;
  mreq_t  mac_req;
  mresp_t mac_resp;
  logic   mem_req_val, mem_req_rdy, mem_resp_val, mem_resp_rdy;
  mreq_t  mem_req;
  mresp_t mem_resp;
  logic   arb_conflict_evt, mac_reject_evt;

  assign arb_in_val    = {dma_mreq_val, l2_mreq_val};
  assign arb_in_req[0] = l2_mreq;
  assign arb_in_req[1] = dma_mreq;
  assign l2_mreq_rdy   = arb_in_rdy[0];
  assign dma_mreq_rdy  = arb_in_rdy[1];
  assign l2_mresp_val  = arb_resp_val[0];
  assign dma_mresp_val = arb_resp_val[1];
  assign l2_mresp      = arb_resp;
  assign dma_mresp     = arb_resp;
  assign arb_resp_rdy  = {dma_mresp_rdy, l2_mresp_rdy};

  mem_arbiter u_marb (
    .clk, .rst,
    .in_req_val(arb_in_val), .in_req_rdy(arb_in_rdy), .in_req(arb_in_req),
    .in_resp_val(arb_resp_val), .in_resp_rdy(arb_resp_rdy), .in_resp(arb_resp),
    .out_req_val(mac_req_val), .out_req_rdy(mac_req_rdy), .out_req(mac_req),
    .out_resp_val(mac_resp_val), .out_resp_rdy(mac_resp_rdy), .out_resp(mac_resp),
    .conflict_evt(arb_conflict_evt)
  );

  mem_access_ctrl #(.PARTITION_RESET(PARTITION_RESET)) u_mac (
    .clk, .rst,
    .req_val(mac_req_val), .req_rdy(mac_req_rdy), .req(mac_req),
    .resp_val(mac_resp_val), .resp_rdy(mac_resp_rdy), .resp(mac_resp),
    .mem_req_val, .mem_req_rdy, .mem_req,
    .mem_resp_val, .mem_resp_rdy, .mem_resp,
    .partition, .reject_evt(mac_reject_evt)
  );

  main_memory #(.MEM_BYTES(MEM_BYTES), .LATENCY(MEM_LATENCY)) u_mem (
    .clk, .rst,
    .req_val(mem_req_val), .req_rdy(mem_req_rdy), .req(mem_req),
    .resp_val(mem_resp_val), .resp_rdy(mem_resp_rdy), .resp(mem_resp),
    .init_we, .init_addr, .init_data
  );

endmodule
