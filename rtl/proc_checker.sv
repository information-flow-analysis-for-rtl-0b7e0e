// proc_checker: a core's connection to the network, with the processor
// security checker on its response path.
//
// Requests: the core's L1 instruction cache (port 0) and L1 data cache
// (port 1) share one network terminal. When both have a request the port that
// was not served last goes first. Each request is sent to the DMA controller
// node if its address is a DMA register and to the L2 cache node otherwise,
// with {NODE, port} in its opaque field so the response finds its way back.
//
// Responses: the checker filters what comes back from the network. A response
// whose NS-bit is above the core's current NS-bit (secure data arriving at a
// core running in the normal world, e.g. after a misrouted response) has its
// data replaced by zeros. Its NS-bit is kept, so the L1 cache sees a response
// above the requester's level and does not install the line. The response
// then goes to the L1 cache named in its opaque field.
//
// All of this is combinational except the fairness bit: a request or response
// passes in the cycle it arrives.
//
// The checker's position and its filtering of secure data away from a
// normal-world core follow the reference design; the sharing of one terminal by
// both L1 caches, the round-robin choice and the address routing are this
// design's choices.
module proc_checker
  import tz_pkg::*;
#(
  parameter logic [NODE_W-1:0] NODE = '0
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      core_ns,
  // L1 caches' memory side (index 0 instruction, 1 data)
  input  logic      l1_req_val  [2],
  output logic      l1_req_rdy  [2],
  input  mreq_t     l1_req      [2],
  output logic      l1_resp_val [2],
  input  logic      l1_resp_rdy [2],
  output mresp_t    l1_resp     [2],
  // network terminal
  output logic      net_out_val,
  input  logic      net_out_rdy,
  output net_msg_t  net_out_msg,
  input  logic      net_in_val,
  output logic      net_in_rdy,
  input  net_msg_t  net_in_msg,
  output logic      filter_evt
);
  logic last;   // port served last
  logic sel;

  always_comb begin
    if (l1_req_val[0] && l1_req_val[1]) sel = ~last;
    else                                sel = l1_req_val[1];
  end

  always_ff @(posedge clk) begin
    if (rst)                             last <= 1'b1;
    else if (net_out_val && net_out_rdy) last <= sel;
  end

  mreq_t rq;
  assign rq = l1_req[sel];

  always_comb begin
    net_out_val        = l1_req_val[sel];
    net_out_msg.dest   = is_dma_addr(rq.addr) ? NODE_DMA : NODE_L2;
    net_out_msg.is_resp = 1'b0;
    net_out_msg.typ    = rq.typ;
    net_out_msg.opaque = {NODE, 1'b0, sel};
    net_out_msg.ns     = rq.ns;
    net_out_msg.addr   = rq.addr;
    net_out_msg.strb   = rq.strb;
    net_out_msg.data   = rq.data;
    l1_req_rdy[0] = (sel == 1'b0) && net_out_rdy;
    l1_req_rdy[1] = (sel == 1'b1) && net_out_rdy;
  end

  logic   blocked;
  mresp_t rs;
  assign blocked = net_in_val && (net_in_msg.ns > core_ns);
  always_comb begin
    rs.typ    = net_in_msg.typ;
    rs.opaque = net_in_msg.opaque;
    rs.ns     = net_in_msg.ns;
    rs.data   = blocked ? '0 : net_in_msg.data;
  end

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      l1_resp_val[p] = net_in_val && (net_in_msg.opaque[0] == p[0]);
      l1_resp[p]     = rs;
    end
    net_in_rdy = l1_resp_rdy[net_in_msg.opaque[0]];
  end
  assign filter_evt = blocked && net_in_rdy;

endmodule
