// tb_mem_arbiter: checks the two-port memory request arbiter.
//
// Port 0 stands for the L2 cache and port 1 for the DMA controller. Directed
// cases check who wins when both ask in the same cycle (a secure request over a
// normal one, otherwise port 0) and that a conflict event is raised. A random
// phase then runs both ports at once and checks that every response returns to
// the port that asked, with the data the memory model gave for that address.
module tb_mem_arbiter;
  import tz_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [1:0] in_req_val = '0, in_req_rdy, in_resp_val, in_resp_rdy = '0;
  mreq_t      in_req [2];
  mresp_t     in_resp;
  logic       out_req_val, out_req_rdy, out_resp_val, out_resp_rdy, conflict_evt;
  mreq_t      out_req;
  mresp_t     out_resp;

  mem_arbiter dut (.*);

  // memory model: one outstanding request, variable delay
  logic  pend = 0;
  int    dly = 0, n_conf = 0;
  mreq_t preq = '0;
  assign out_req_rdy  = !pend;
  assign out_resp_val = pend && (dly == 0);
  always_comb begin
    out_resp        = '0;
    out_resp.typ    = preq.typ;
    out_resp.opaque = preq.opaque;
    out_resp.ns     = preq.ns;
    out_resp.data   = {4{~preq.addr}};
  end
  always @(posedge clk) begin
    if (!rst) begin
      if (out_req_val && out_req_rdy) begin
        pend <= 1; dly <= $urandom_range(0, 3); preq <= out_req;
      end else if (pend && dly != 0) dly <= dly - 1;
      else if (out_resp_val && out_resp_rdy) pend <= 0;
      if (conflict_evt) n_conf++;
    end
  end

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
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

  // One request from port p; checks the response data and where it went.
  task automatic issue(int p, logic ns, logic [31:0] a);
    @(negedge clk);
    in_req[p] = '0;
    in_req[p].ns = ns; in_req[p].addr = a; in_req[p].opaque = 4'(p);
    in_req_val[p] = 1;
    do @(posedge clk); while (!in_req_rdy[p]);
    @(negedge clk);
    in_req_val[p] = 0;
    in_resp_rdy[p] = 1;
    do @(posedge clk); while (!in_resp_val[p]);
    check($sformatf("port %0d data", p), in_resp.data, {4{~a}});
    check($sformatf("port %0d opaque", p), {124'b0, in_resp.opaque}, 128'(p));
    check("response to one port only", {126'b0, in_resp_val}, 128'(1 << p));
    @(negedge clk);
    in_resp_rdy[p] = 0;
  endtask

  // Both ports ask in the same cycle; returns which port got memory first.
  task automatic race(logic ns0, logic ns1, output int first);
    int c0;
    @(negedge clk);
    for (int p = 0; p < 2; p++) begin
      in_req[p] = '0; in_req[p].opaque = 4'(p); in_req[p].addr = 32'(16 * (p + 1));
    end
    in_req[0].ns = ns0; in_req[1].ns = ns1;
    c0 = n_conf;
    in_req_val = 2'b11;
    do @(posedge clk); while (!out_req_val);
    first = int'(out_req.opaque);
    #1;
    check("conflict counted", 128'(n_conf - c0), 128'd1);
    in_resp_rdy = 2'b11;
    // let both requests finish
    fork
      begin do @(posedge clk); while (!in_req_rdy[0]); @(negedge clk) in_req_val[0] = 0; end
      begin do @(posedge clk); while (!in_req_rdy[1]); @(negedge clk) in_req_val[1] = 0; end
    join
    repeat (8) @(posedge clk);
    @(negedge clk) in_resp_rdy = 2'b00;
  endtask

  initial begin
    int first;
    in_req[0] = '0; in_req[1] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    issue(0, 0, 32'h100);
    issue(1, 1, 32'h9000);
    race(0, 0, first); check("both normal: port 0 first", 128'(first), 128'd0);
    race(1, 1, first); check("both secure: port 0 first", 128'(first), 128'd0);
    race(0, 1, first); check("secure port 1 first", 128'(first), 128'd1);
    race(1, 0, first); check("secure port 0 first", 128'(first), 128'd0);
    // both ports busy at random
    fork
      for (int n = 0; n < 50; n++) begin
        repeat ($urandom_range(0, 3)) @(posedge clk);
        issue(0, 1'($urandom), 32'($urandom_range(0, 4095)) << 4);
      end
      for (int n = 0; n < 50; n++) begin
        repeat ($urandom_range(0, 3)) @(posedge clk);
        issue(1, 1'($urandom), 32'($urandom_range(0, 4095)) << 4);
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
