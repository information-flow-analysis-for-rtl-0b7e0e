// tb_mem_access_ctrl: checks the memory access controller in front of main
// memory.
//
// A small memory model answers forwarded requests with a line that encodes the
// request address, so the testbench can tell a forwarded read from a refused
// one. Checked: normal-world access below the partition is forwarded; normal
// access at or above it is refused with an all-zero line marked secure and a
// reject event, and never reaches memory; secure access to either region is
// forwarded; the partition register can be read by anyone, written only by the
// secure world, and a new value moves the boundary.
module tb_mem_access_ctrl;
  import tz_pkg::*;

  localparam logic [31:0] PART0 = 32'h0000_8000;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic   req_val = 0, req_rdy, resp_val, resp_rdy = 0;
  mreq_t  req = '0;
  mresp_t resp;
  logic   mem_req_val, mem_req_rdy, mem_resp_val, mem_resp_rdy;
  mreq_t  mem_req;
  mresp_t mem_resp;
  logic [31:0] partition;
  logic   reject_evt;

  mem_access_ctrl #(.PARTITION_RESET(PART0)) dut (.*);

  // memory model: one outstanding request, answers two cycles later
  int          n_mem = 0, n_rej = 0;
  logic        pend = 0;
  logic [1:0]  dly = 0;
  mreq_t       preq = '0;
  assign mem_req_rdy  = !pend;
  assign mem_resp_val = pend && (dly == 0);
  always_comb begin
    mem_resp        = '0;
    mem_resp.typ    = preq.typ;
    mem_resp.opaque = preq.opaque;
    mem_resp.ns     = preq.ns;
    mem_resp.data   = {4{preq.addr ^ 32'h5A00_0000}};
  end
  always @(posedge clk) begin
    if (rst) begin
      pend <= 0;
    end else begin
      if (mem_req_val && mem_req_rdy) begin
        pend <= 1; dly <= 2; preq <= mem_req; n_mem++;
      end else if (pend && dly != 0) dly <= dly - 1;
      else if (mem_resp_val && mem_resp_rdy) pend <= 0;
      if (reject_evt) n_rej++;
    end
  end

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

  task automatic access(mtype_e t, logic ns, logic [31:0] a, logic [31:0] wd, output mresp_t rsp);
    @(negedge clk);
    req_val = 1; req.typ = t; req.ns = ns; req.addr = a; req.opaque = 4'h9;
    req.data = {4{wd}}; req.strb = 16'h000F << {a[3:2], 2'b00};
    do @(posedge clk); while (!req_rdy);
    @(negedge clk);
    req_val = 0; resp_rdy = 1;
    do @(posedge clk); while (!resp_val);
    rsp = resp;
    @(negedge clk);
    resp_rdy = 0;
  endtask

  // one access with the expected outcome: forwarded to memory or refused
  task automatic expect_access(string what, mtype_e t, logic ns, logic [31:0] a, logic fwd);
    mresp_t rsp;
    int m0, r0;
    m0 = n_mem; r0 = n_rej;
    access(t, ns, a, 32'h1234_5678, rsp);
    check({what, ": forwarded"}, 128'(n_mem - m0), fwd ? 128'd1 : 128'd0);
    check({what, ": reject event"}, 128'(n_rej - r0), fwd ? 128'd0 : 128'd1);
    check({what, ": opaque"}, {124'b0, rsp.opaque}, 128'h9);
    if (t == MT_RD)
      check({what, ": data"}, rsp.data, fwd ? {4{a ^ 32'h5A00_0000}} : '0);
    if (!fwd && !is_ctrl_addr(a)) check({what, ": marked secure"}, {127'b0, rsp.ns}, 128'd1);
  endtask

  initial begin
    mresp_t rsp;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    check("partition reset", 128'(partition), 128'(PART0));

    expect_access("normal read, normal memory",  MT_RD, 0, 32'h0000_1230, 1);
    expect_access("normal write, normal memory", MT_WR, 0, 32'h0000_7FF0, 1);
    expect_access("normal read, secure memory",  MT_RD, 0, 32'h0000_8000, 0);
    expect_access("normal write, secure memory", MT_WR, 0, 32'h0000_9004, 0);
    expect_access("secure read, secure memory",  MT_RD, 1, 32'h0000_9000, 1);
    expect_access("secure read, normal memory",  MT_RD, 1, 32'h0000_0400, 1);

    // partition register
    access(MT_RD, 0, 32'h0, '0, rsp);
    check("partition read", 128'(line_word(rsp.data, 32'h0)), 128'(PART0));
    expect_access("normal partition write", MT_WR, 0, 32'h0, 0);
    check("partition unchanged", 128'(partition), 128'(PART0));
    access(MT_WR, 1, 32'h0, 32'h0000_4000, rsp);
    check("secure partition write", 128'(partition), 128'h4000);
    expect_access("normal read, newly secure", MT_RD, 0, 32'h0000_5000, 0);
    expect_access("normal read, still normal", MT_RD, 0, 32'h0000_3FF0, 1);
    access(MT_WR, 1, 32'h0, 32'h0000_C000, rsp);
    expect_access("normal read, normal again", MT_RD, 0, 32'h0000_5000, 1);
    expect_access("normal read, top secure",   MT_RD, 0, 32'h0000_C010, 0);
    // other control addresses answer locally with zero and touch no memory
    begin
      int m0, r0;
      m0 = n_mem; r0 = n_rej;
      access(MT_RD, 1, 32'h0000_0040, '0, rsp);
      check("ctrl read: not forwarded", 128'(n_mem - m0), 128'd0);
      check("ctrl read: no reject", 128'(n_rej - r0), 128'd0);
      check("ctrl read: zero", rsp.data, '0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
