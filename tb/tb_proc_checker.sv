// tb_proc_checker: checks a core's network terminal and its processor
// security checker.
//
// Requests: with both L1 caches asking, the two must alternate; each request
// must go to the DMA node for a DMA register address and to the L2 node
// otherwise, carry the node and cache in its opaque field and keep its fields.
// Responses: each must reach the cache named in its opaque field; a response
// whose NS-bit is above the core's must arrive with zero data (its NS-bit
// kept) and raise the filter event; any other passes unchanged.
module tb_proc_checker;
  import tz_pkg::*;

  localparam logic [NODE_W-1:0] NODE = NODE_CORE1;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic     core_ns = 0;
  logic     l1_req_val [2], l1_req_rdy [2], l1_resp_val [2], l1_resp_rdy [2];
  mreq_t    l1_req [2];
  mresp_t   l1_resp [2];
  logic     net_out_val, net_out_rdy = 1, net_in_val = 0, net_in_rdy, filter_evt;
  net_msg_t net_out_msg, net_in_msg = '0;

  proc_checker #(.NODE(NODE)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    int last;
    for (int p = 0; p < 2; p++) begin
      l1_req_val[p] = 0; l1_req[p] = '0; l1_resp_rdy[p] = 1;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    // requests: both caches ask for 20 cycles
    last = -1;
    for (int k = 0; k < 20; k++) begin
      @(negedge clk);
      for (int p = 0; p < 2; p++) begin
        l1_req_val[p]  = 1;
        l1_req[p].typ  = mtype_e'($urandom_range(0, 1));
        l1_req[p].ns   = 1'($urandom);
        l1_req[p].addr = ($urandom_range(0, 3) == 0) ? 32'(DMA_BASE) + 32'(4 * $urandom_range(0, 5))
                                                     : $urandom;
        l1_req[p].data = {4{$urandom}};
        l1_req[p].strb = 16'($urandom);
      end
      #1;
      begin
        int p;
        p = int'(net_out_msg.opaque[0]);
        check("request valid", {127'b0, net_out_val}, 128'd1);
        if (last >= 0) check("caches alternate", 128'(p), 128'(1 - last));
        check("ready to the chosen cache", {126'b0, l1_req_rdy[1], l1_req_rdy[0]}, 128'(1 << p));
        check("opaque node", {126'b0, net_out_msg.opaque[3:2]}, 128'(NODE));
        check("destination", {126'b0, net_out_msg.dest},
              128'(is_dma_addr(l1_req[p].addr) ? NODE_DMA : NODE_L2));
        check("address kept", 128'(net_out_msg.addr), 128'(l1_req[p].addr));
        check("ns kept", {127'b0, net_out_msg.ns}, {127'b0, l1_req[p].ns});
        check("data kept", net_out_msg.data, l1_req[p].data);
        check("not a response", {127'b0, net_out_msg.is_resp}, 128'd0);
        last = p;
      end
    end
    @(negedge clk);
    l1_req_val[0] = 0;
    #1 check("single request from port 1", {127'b0, net_out_msg.opaque[0]}, 128'd1);
    l1_req_val[1] = 0;

    // responses
    for (int k = 0; k < 40; k++) begin
      logic [127:0] d;
      int p;
      @(negedge clk);
      core_ns = 1'($urandom);
      p = $urandom_range(0, 1);
      d = {4{$urandom}};
      net_in_val = 1;
      net_in_msg = '0;
      net_in_msg.is_resp = 1;
      net_in_msg.ns = 1'($urandom);
      net_in_msg.opaque = {NODE, 1'b0, 1'(p)};
      net_in_msg.data = d;
      l1_resp_rdy[0] = 1'($urandom);
      l1_resp_rdy[1] = 1'($urandom);
      #1;
      check("response to the right cache", {126'b0, l1_resp_val[1], l1_resp_val[0]}, 128'(1 << p));
      check("ready from that cache", {127'b0, net_in_rdy}, {127'b0, l1_resp_rdy[p]});
      check("ns kept", {127'b0, l1_resp[p].ns}, {127'b0, net_in_msg.ns});
      if (net_in_msg.ns > core_ns) begin
        check("secure data filtered", l1_resp[p].data, '0);
        check("filter event", {127'b0, filter_evt}, {127'b0, l1_resp_rdy[p]});
      end else begin
        check("data passed", l1_resp[p].data, d);
        check("no filter event", {127'b0, filter_evt}, 128'd0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
