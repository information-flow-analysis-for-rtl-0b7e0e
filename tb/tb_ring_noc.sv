// tb_ring_noc: checks the four-node ring network end to end.
//
// Every node sends random messages of both security domains to random nodes
// (itself included) while every node's terminal output accepts at random. Each
// message carries its source, domain and a sequence number; the testbench
// checks that it arrives at its destination and nowhere else, that nothing is
// lost or duplicated, and that messages between one pair of nodes in one
// domain arrive in order (they follow one path). It also checks the number of
// hops through the latency of a lone message on an idle network.
module tb_ring_noc;
  import tz_pkg::*;

  localparam int N = NUM_NODES;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic     in_val [N], in_rdy [N], out_val [N], out_rdy [N];
  net_msg_t in_msg [N], out_msg [N];
  logic [N-1:0] priority_evt;

  ring_noc #(.QDEPTH(4)) dut (.*);

  int checks = 0, failures = 0;
  int sent [N], got [N];
  int seq [N][N][2];           // next sequence number sent, per source/dest/domain
  int nxt [N][N][2];           // next sequence number expected
  int out_pct = 100;
  int n_prio = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk)
    for (int o = 0; o < N; o++) out_rdy[o] = ($urandom_range(1, 100) <= out_pct);

  int last_arrival;
  always @(posedge clk) if (!rst) begin
    n_prio += int'(|priority_evt);
    for (int d = 0; d < N; d++)
      if (out_val[d] && out_rdy[d]) begin
        int s, ns, q;
        s  = int'(out_msg[d].data[7:0]);
        ns = int'(out_msg[d].ns);
        q  = int'(out_msg[d].data[39:8]);
        checks += 2;
        if (int'(out_msg[d].dest) != d) begin
          failures++; $display("FAIL message for %0d arrived at %0d", out_msg[d].dest, d);
        end
        if (s >= N || q != nxt[s][d][ns]) begin
          failures++; $display("FAIL %0d->%0d ns=%0d: got seq %0d", s, d, ns, q);
        end else nxt[s][d][ns]++;
        got[d]++;
        last_arrival = $time;
      end
  end

  task automatic send(int s, int d, logic ns);
    @(negedge clk);
    in_msg[s] = '0;
    in_msg[s].dest = 2'(d);
    in_msg[s].ns = ns;
    in_msg[s].data[7:0] = 8'(s);
    in_msg[s].data[39:8] = 32'(seq[s][d][ns]);
    in_val[s] = 1;
    do @(posedge clk); while (!in_rdy[s]);
    seq[s][d][ns]++;
    sent[d]++;
    @(negedge clk) in_val[s] = 0;
  endtask

  initial begin
    for (int s = 0; s < N; s++) begin
      in_val[s] = 0; in_msg[s] = '0; sent[s] = 0; got[s] = 0;
      for (int d = 0; d < N; d++) for (int k = 0; k < 2; k++) begin
        seq[s][d][k] = 0; nxt[s][d][k] = 0;
      end
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    // latency on an idle ring: one cycle per router passed
    for (int s = 0; s < N; s++)
      for (int d = 0; d < N; d++) begin
        int t0, hops, exp_lat;
        hops = (d - s + N) % N;
        if (hops > N / 2) hops = N - hops;
        exp_lat = hops + 1;
        send(s, d, 1'(d));
        t0 = $time - 10;   // the accepting edge
        repeat (10) @(posedge clk);
        checks++;
        if ((last_arrival - t0) / 10 != exp_lat) begin
          failures++;
          $display("FAIL %0d->%0d took %0d cycles, expected %0d", s, d, (last_arrival - t0) / 10, exp_lat);
        end
      end

    // random traffic from all nodes at once
    out_pct = 50;
    fork
      for (int k = 0; k < 200; k++) send(0, $urandom_range(0, N - 1), 1'($urandom));
      for (int k = 0; k < 200; k++) send(1, $urandom_range(0, N - 1), 1'($urandom));
      for (int k = 0; k < 200; k++) send(2, $urandom_range(0, N - 1), 1'($urandom));
      for (int k = 0; k < 200; k++) send(3, $urandom_range(0, N - 1), 1'($urandom));
    join
    out_pct = 100;
    repeat (100) @(posedge clk);
    for (int d = 0; d < N; d++) begin
      checks++;
      if (got[d] != sent[d]) begin
        failures++; $display("FAIL node %0d: %0d sent to it, %0d arrived", d, sent[d], got[d]);
      end
    end
    checks++;
    if (n_prio == 0) begin failures++; $display("FAIL no secure-first arbitration seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
