// ring_noc: the on-chip network, a bidirectional ring of NUM_NODES routers.
//
// Router i's east output feeds router i+1's west input and router i+1's west
// output feeds router i's east input, each as two channels (normal and
// secure). Each node's module connects to its router's terminal port. A
// message carries its destination node and its NS-bit; it keeps its NS-bit
// unchanged from source to destination.
//
// Timing: one cycle per router when nothing blocks, so a message crosses h
// hops in h+1 cycles from terminal input to terminal output.
//
// The ring with bidirectional links follows the reference design; the number
// of nodes (two cores, the L2 cache and the DMA controller) follows its system
// diagram.
module ring_noc
  import tz_pkg::*;
#(
  parameter int unsigned QDEPTH = 4
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      in_val  [NUM_NODES],
  output logic      in_rdy  [NUM_NODES],
  input  net_msg_t  in_msg  [NUM_NODES],
  output logic      out_val [NUM_NODES],
  input  logic      out_rdy [NUM_NODES],
  output net_msg_t  out_msg [NUM_NODES],
  output logic [NUM_NODES-1:0] priority_evt
);
  // eastward links: e_*[i][d] leaves router i to the east
  logic     e_val [NUM_NODES][2];
  logic     e_rdy [NUM_NODES][2];
  net_msg_t e_msg [NUM_NODES][2];
  // westward links: w_*[i][d] leaves router i to the west
  logic     w_val [NUM_NODES][2];
  logic     w_rdy [NUM_NODES][2];
  net_msg_t w_msg [NUM_NODES][2];

  for (genvar i = 0; i < NUM_NODES; i++) begin : g_r
    localparam int unsigned PREV = (i + NUM_NODES - 1) % NUM_NODES;
    localparam int unsigned NEXT = (i + 1) % NUM_NODES;
    noc_router #(.ID(NODE_W'(i)), .QDEPTH(QDEPTH)) u_router (
      .clk, .rst,
      .term_in_val (in_val[i]),  .term_in_rdy (in_rdy[i]),  .term_in_msg (in_msg[i]),
      .term_out_val(out_val[i]), .term_out_rdy(out_rdy[i]), .term_out_msg(out_msg[i]),
      .west_in_val (e_val[PREV]), .west_in_rdy (e_rdy[PREV]), .west_in_msg (e_msg[PREV]),
      .east_in_val (w_val[NEXT]), .east_in_rdy (w_rdy[NEXT]), .east_in_msg (w_msg[NEXT]),
      .west_out_val(w_val[i]),    .west_out_rdy(w_rdy[i]),    .west_out_msg(w_msg[i]),
      .east_out_val(e_val[i]),    .east_out_rdy(e_rdy[i]),    .east_out_msg(e_msg[i]),
      .priority_evt(priority_evt[i])
    );
  end

endmodule
