// noc_router: one router of the bidirectional ring network.
//
// Ports: a terminal port (to the node's own module), a west port (towards
// node ID-1) and an east port (towards node ID+1). Each ring direction has two
// separate channels, one per security domain (d0: normal world, d1: secure
// world), so normal and secure messages never share a queue. Each input
// channel and the terminal input has its own queue of QDEPTH entries. The
// queue heads feed a crossbar with five outputs: west d0/d1, east d0/d1 and
// the terminal output, which carries both domains.
//
// Routing: a message whose destination is this node leaves by the terminal
// output; any other takes the shorter way round the ring (east on a tie) on
// the channel of its own NS-bit.
//
// Arbitration has two levels and is privilege based. Level one picks, for each
// ring input direction, which domain's queue may compete this cycle: the
// secure queue if it holds a message, else the normal one. Level two picks,
// for each output, one of the competing directions: a secure message before a
// normal one, then terminal, west, east in that order. A secure message thus
// always beats a normal one; a normal one may starve while secure traffic
// lasts, which keeps normal-world traffic from blocking the secure world.
//
// Timing: a message entering a queue can leave the router in the next cycle.
// Outputs are combinational from the queue heads; an output's ready is the
// next queue's "not full".
//
// The queues per domain, their size of 4, the three-way port set, the two
// arbitration levels and the secure-first policy follow the reference design;
// shortest-path routing and the fixed order among directions are this
// design's choices.
module noc_router
  import tz_pkg::*;
#(
  parameter logic [NODE_W-1:0] ID     = '0,
  parameter int unsigned       QDEPTH = 4
) (
  input  logic      clk,
  input  logic      rst,
  // terminal
  input  logic      term_in_val,
  output logic      term_in_rdy,
  input  net_msg_t  term_in_msg,
  output logic      term_out_val,
  input  logic      term_out_rdy,
  output net_msg_t  term_out_msg,
  // ring inputs, index = domain
  input  logic      west_in_val [2],
  output logic      west_in_rdy [2],
  input  net_msg_t  west_in_msg [2],
  input  logic      east_in_val [2],
  output logic      east_in_rdy [2],
  input  net_msg_t  east_in_msg [2],
  // ring outputs, index = domain
  output logic      west_out_val [2],
  input  logic      west_out_rdy [2],
  output net_msg_t  west_out_msg [2],
  output logic      east_out_val [2],
  input  logic      east_out_rdy [2],
  output net_msg_t  east_out_msg [2],
  // a secure message was preferred over a waiting normal one this cycle
  output logic      priority_evt
);
  // Input queues: 0 west d0, 1 west d1, 2 east d0, 3 east d1, 4 terminal
  localparam int unsigned NQ = 5;
  logic      q_enq_val [NQ];
  logic      q_enq_rdy [NQ];
  net_msg_t  q_enq_msg [NQ];
  logic      q_val     [NQ];
  logic      q_deq     [NQ];
  net_msg_t  q_msg     [NQ];

  always_comb begin
    q_enq_val[0] = west_in_val[0]; q_enq_msg[0] = west_in_msg[0];
    q_enq_val[1] = west_in_val[1]; q_enq_msg[1] = west_in_msg[1];
    q_enq_val[2] = east_in_val[0]; q_enq_msg[2] = east_in_msg[0];
    q_enq_val[3] = east_in_val[1]; q_enq_msg[3] = east_in_msg[1];
    q_enq_val[4] = term_in_val;    q_enq_msg[4] = term_in_msg;
    west_in_rdy[0] = q_enq_rdy[0];
    west_in_rdy[1] = q_enq_rdy[1];
    east_in_rdy[0] = q_enq_rdy[2];
    east_in_rdy[1] = q_enq_rdy[3];
    term_in_rdy    = q_enq_rdy[4];
  end

  for (genvar i = 0; i < NQ; i++) begin : g_q
    net_fifo #(.DEPTH(QDEPTH)) u_q (
      .clk, .rst,
      .enq_val(q_enq_val[i]), .enq_rdy(q_enq_rdy[i]), .enq_msg(q_enq_msg[i]),
      .deq_val(q_val[i]), .deq_rdy(q_deq[i]), .deq_msg(q_msg[i])
    );
  end

  // Outputs: 0 west d0, 1 west d1, 2 east d0, 3 east d1, 4 terminal
  typedef logic [2:0] oport_t;
  localparam oport_t O_TERM = 3'd4;

  function automatic oport_t route(input net_msg_t m);
    logic [NODE_W-1:0] hops_east;
    hops_east = m.dest - ID;
    if (m.dest == ID)                                  return O_TERM;
    else if (int'(hops_east) <= int'(NUM_NODES / 2))   return oport_t'({2'b01, m.ns});
    else                                               return oport_t'({2'b00, m.ns});
  endfunction

  // Level one: candidates by direction (0 terminal, 1 west, 2 east)
  localparam int unsigned NC = 3;
  logic      c_val [NC];
  net_msg_t  c_msg [NC];
  logic [2:0] c_q [NC];    // which queue the candidate comes from
  oport_t    c_out [NC];

  always_comb begin
    c_val[0] = q_val[4]; c_msg[0] = q_msg[4]; c_q[0] = 3'd4;
    c_val[1] = q_val[0] || q_val[1];
    c_q[1]   = q_val[1] ? 3'd1 : 3'd0;
    c_msg[1] = q_msg[c_q[1]];
    c_val[2] = q_val[2] || q_val[3];
    c_q[2]   = q_val[3] ? 3'd3 : 3'd2;
    c_msg[2] = q_msg[c_q[2]];
    for (int c = 0; c < NC; c++) c_out[c] = route(c_msg[c]);
  end

  // Level two: per output
  logic      o_rdy [NQ];
  logic      o_val [NQ];
  net_msg_t  o_msg [NQ];
  always_comb begin
    o_rdy[0] = west_out_rdy[0];
    o_rdy[1] = west_out_rdy[1];
    o_rdy[2] = east_out_rdy[0];
    o_rdy[3] = east_out_rdy[1];
    o_rdy[4] = term_out_rdy;
  end

  // Winner per output (o_win, valid when o_val). Kept apart from the dequeue
  // logic so that an output's valid never depends on its ready.
  logic [1:0] o_win [NQ];
  always_comb begin
    logic any_sec, any_norm;
    // level one: a secure queue head kept a normal one back
    priority_evt = (q_val[0] && q_val[1]) || (q_val[2] && q_val[3]);
    for (int o = 0; o < NQ; o++) begin
      o_win[o] = '0;
      o_val[o] = 1'b0;
      o_msg[o] = '0;
      any_sec  = 1'b0;
      any_norm = 1'b0;
      for (int c = 0; c < NC; c++)
        if (c_val[c] && c_out[c] == oport_t'(o)) begin
          if (c_msg[c].ns) begin
            if (!any_sec) o_win[o] = 2'(c);
            any_sec = 1'b1;
          end else begin
            if (!any_sec && !any_norm) o_win[o] = 2'(c);
            any_norm = 1'b1;
          end
        end
      if (any_sec || any_norm) begin
        o_val[o] = 1'b1;
        o_msg[o] = c_msg[o_win[o]];
        if (any_sec && any_norm) priority_evt = 1'b1;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NQ; i++) q_deq[i] = 1'b0;
    for (int o = 0; o < NQ; o++)
      if (o_val[o] && o_rdy[o]) q_deq[c_q[o_win[o]]] = 1'b1;
  end

  always_comb begin
    west_out_val[0] = o_val[0]; west_out_msg[0] = o_msg[0];
    west_out_val[1] = o_val[1]; west_out_msg[1] = o_msg[1];
    east_out_val[0] = o_val[2]; east_out_msg[0] = o_msg[2];
    east_out_val[1] = o_val[3]; east_out_msg[1] = o_msg[3];
    term_out_val    = o_val[4]; term_out_msg    = o_msg[4];
  end

endmodule
