// tb_noc_router: checks one ring router (ID 1 of a four-node ring).
//
// Random messages enter at the terminal and at both domain channels of the
// west and east inputs, and leave through sinks with random ready. Each
// message carries its input and a sequence number in its data, so the
// testbench checks that it leaves by the right output (terminal if addressed
// here, otherwise the shorter way round on the channel of its NS-bit), that
// nothing is lost or duplicated, and that messages from one input queue keep
// their order. Directed cases check the queue size and that a secure message
// is preferred over a normal one at the shared terminal output.
module tb_noc_router;
  import tz_pkg::*;

  localparam logic [NODE_W-1:0] ID = 2'd1;
  localparam int unsigned QDEPTH = 4;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  // inputs: 0 west d0, 1 west d1, 2 east d0, 3 east d1, 4 terminal
  logic     i_val [5], i_rdy [5];
  net_msg_t i_msg [5];
  // outputs in the same order
  logic     o_val [5], o_rdy [5];
  net_msg_t o_msg [5];
  logic     priority_evt;

  noc_router #(.ID(ID), .QDEPTH(QDEPTH)) dut (
    .clk, .rst,
    .term_in_val(i_val[4]), .term_in_rdy(i_rdy[4]), .term_in_msg(i_msg[4]),
    .term_out_val(o_val[4]), .term_out_rdy(o_rdy[4]), .term_out_msg(o_msg[4]),
    .west_in_val('{i_val[0], i_val[1]}), .west_in_rdy('{i_rdy[0], i_rdy[1]}),
    .west_in_msg('{i_msg[0], i_msg[1]}),
    .east_in_val('{i_val[2], i_val[3]}), .east_in_rdy('{i_rdy[2], i_rdy[3]}),
    .east_in_msg('{i_msg[2], i_msg[3]}),
    .west_out_val('{o_val[0], o_val[1]}), .west_out_rdy('{o_rdy[0], o_rdy[1]}),
    .west_out_msg('{o_msg[0], o_msg[1]}),
    .east_out_val('{o_val[2], o_val[3]}), .east_out_rdy('{o_rdy[2], o_rdy[3]}),
    .east_out_msg('{o_msg[2], o_msg[3]}),
    .priority_evt
  );

  int checks = 0, failures = 0;
  int sent [5], got [5];
  int n_prio = 0;
  logic [31:0] expq [5][$];   // sequence numbers in flight per input
  int out_pct = 100;          // chance of an output being ready, percent

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int exp_port(net_msg_t m);
    int hops;
    hops = (int'(m.dest) - int'(ID) + 4) % 4;
    if (hops == 0) return 4;
    return (hops <= 2 ? 2 : 0) + int'(m.ns);
  endfunction

  // sinks
  always @(negedge clk)
    for (int o = 0; o < 5; o++) o_rdy[o] = ($urandom_range(1, 100) <= out_pct);

  always @(posedge clk) if (!rst) begin
    if (priority_evt) n_prio++;
    for (int o = 0; o < 5; o++)
      if (o_val[o] && o_rdy[o]) begin
        int src;
        src = int'(o_msg[o].data[7:0]);
        checks += 2;
        if (exp_port(o_msg[o]) != o) begin
          failures++;
          $display("FAIL message dest=%0d ns=%0d left by output %0d", o_msg[o].dest, o_msg[o].ns, o);
        end
        if (src > 4 || expq[src].size() == 0 || expq[src][0] != o_msg[o].data[39:8]) begin
          failures++;
          $display("FAIL out of order or unknown message from input %0d", src);
        end else begin
          void'(expq[src].pop_front());
          got[src]++;
        end
      end
  end

  function automatic net_msg_t make(int src, int dest, logic ns);
    net_msg_t m;
    m = '0;
    m.dest = 2'(dest);
    m.ns = ns;
    m.addr = 32'h100;
    m.data[7:0] = 8'(src);
    m.data[39:8] = 32'(sent[src]);
    return m;
  endfunction

  // push one message into input src (blocking until accepted)
  task automatic send(int src, int dest, logic ns);
    @(negedge clk);
    i_msg[src] = make(src, dest, ns);
    i_val[src] = 1;
    expq[src].push_back(32'(sent[src]));
    do @(posedge clk); while (!i_rdy[src]);
    sent[src]++;
    @(negedge clk) i_val[src] = 0;
  endtask

  task automatic drain();
    int n;
    n = 0;
    while (n < 200) begin
      int busy;
      busy = 0;
      for (int s = 0; s < 5; s++) busy += expq[s].size();
      if (busy == 0) break;
      @(posedge clk); n++;
    end
  endtask

  initial begin
    for (int s = 0; s < 5; s++) begin
      i_val[s] = 0; i_msg[s] = '0; sent[s] = 0; got[s] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    // queue size: with the terminal output blocked, exactly QDEPTH fit
    out_pct = 0;
    repeat (2) @(posedge clk);
    begin
      int acc;
      acc = 0;
      @(negedge clk);
      i_val[4] = 1;
      for (int k = 0; k < QDEPTH + 3; k++) begin
        i_msg[4] = make(4, int'(ID), 0);
        @(posedge clk);
        if (i_rdy[4]) begin expq[4].push_back(32'(sent[4])); sent[4]++; acc++; end
        @(negedge clk);
      end
      i_val[4] = 0;
      checks++;
      if (acc != QDEPTH) begin failures++; $display("FAIL queue took %0d messages", acc); end
    end
    out_pct = 100;
    drain();

    // secure first at the terminal output: normal from the west, secure from the east
    out_pct = 0;
    repeat (2) @(posedge clk);
    send(0, int'(ID), 0);
    send(3, int'(ID), 1);
    @(negedge clk);
    begin
      int p0;
      p0 = n_prio;
      force o_rdy[4] = 1'b1;
      @(posedge clk);
      checks += 2;
      if (!(o_val[4] && o_msg[4].ns)) begin failures++; $display("FAIL secure message not first"); end
      #1;
      if (n_prio == p0) begin failures++; $display("FAIL priority event missing"); end
      @(negedge clk) release o_rdy[4];
    end
    out_pct = 100;
    drain();

    // random traffic on all inputs
    out_pct = 60;
    fork
      for (int k = 0; k < 150; k++) send(0, $urandom_range(0, 3), 0);
      for (int k = 0; k < 150; k++) send(1, $urandom_range(0, 3), 1);
      for (int k = 0; k < 150; k++) send(2, $urandom_range(0, 3), 0);
      for (int k = 0; k < 150; k++) send(3, $urandom_range(0, 3), 1);
      for (int k = 0; k < 150; k++) send(4, $urandom_range(0, 3), 1'($urandom));
    join
    out_pct = 100;
    drain();
    for (int s = 0; s < 5; s++) begin
      checks++;
      if (got[s] != sent[s] || expq[s].size() != 0) begin
        failures++;
        $display("FAIL input %0d: sent %0d delivered %0d", s, sent[s], got[s]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
