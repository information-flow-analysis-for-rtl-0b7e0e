// net_fifo: small valid/ready queue of network messages, used as a router
// input queue.
//
// DEPTH entries in a circular buffer. enq_rdy depends only on the fill level
// and deq_val only on emptiness, so chaining queues through a crossbar makes
// no combinational loop. An entry written in one cycle can leave in the next.
module net_fifo
  import tz_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      enq_val,
  output logic      enq_rdy,
  input  net_msg_t  enq_msg,
  output logic      deq_val,
  input  logic      deq_rdy,
  output net_msg_t  deq_msg
);
  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  net_msg_t          q [DEPTH];
  logic [PTR_W-1:0]  head, tail;
  logic [PTR_W:0]    count;

  assign enq_rdy = (count < (PTR_W+1)'(DEPTH));
  assign deq_val = (count != '0);
  assign deq_msg = q[head];

  logic do_enq, do_deq;
  assign do_enq = enq_val && enq_rdy;
  assign do_deq = deq_val && deq_rdy;

  always_ff @(posedge clk) begin
    if (rst) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else begin
      if (do_enq) begin
        q[tail] <= enq_msg;
        tail    <= (tail == PTR_W'(DEPTH-1)) ? '0 : tail + 1'b1;
      end
      if (do_deq)
        head <= (head == PTR_W'(DEPTH-1)) ? '0 : head + 1'b1;
      count <= count + (PTR_W+1)'(do_enq) - (PTR_W+1)'(do_deq);
    end
  end

endmodule
