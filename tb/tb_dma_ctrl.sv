// tb_dma_ctrl: checks the DMA controller, its two checkers and its domain
// register.
//
// The memory side is a model of main memory behind the access controller:
// lines at or above PART are secure, a normal-world request to them reads
// zeros and its writes are dropped. Commands come from the debug side
// (dma_cmd_t) and from the network side (register accesses, as a core would
// send them). Checked: copies and debug reads move the right data; every
// memory request carries the domain register's NS-bit; the checkers refuse
// requests below the domain level (error or zero response, reject event) and
// let equal or higher ones through; only the secure world may change the
// domain; a network copy is acknowledged only after its write is done; the
// status register counts completed operations; requests arriving on both
// sides at once are both served.
module tb_dma_ctrl;
  import tz_pkg::*;

  localparam logic [31:0] PART  = 32'h0000_0800;
  localparam int unsigned LINES = 256;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic     net_in_val = 0, net_in_rdy, net_out_val, net_out_rdy = 1;
  net_msg_t net_in_msg = '0, net_out_msg;
  logic     dbg_cmd_val = 0, dbg_cmd_rdy, dbg_resp_val, dbg_resp_rdy = 1, dbg_resp_err;
  dma_cmd_t dbg_cmd = '0;
  logic [31:0] dbg_resp_data;
  logic     mreq_val, mreq_rdy, mresp_val, mresp_rdy;
  mreq_t    mreq;
  mresp_t   mresp;
  logic     domain, reject_evt, done_evt;

  dma_ctrl #(.DOMAIN_RESET(1'b1)) dut (.*);

  // memory model
  logic [LINE_W-1:0] mem [LINES];
  logic  pend = 0;
  int    dly = 0;
  mreq_t preq = '0;
  logic  sec, ok;
  int    n_rej = 0, n_done = 0, n_wr = 0, ns_bad = 0;
  assign sec = preq.addr >= PART;
  assign ok  = preq.ns || !sec;
  assign mreq_rdy  = !pend;
  assign mresp_val = pend && dly == 0;
  always_comb begin
    mresp.typ    = preq.typ;
    mresp.opaque = preq.opaque;
    mresp.ns     = sec;
    mresp.data   = (preq.typ == MT_RD && ok) ? mem[preq.addr[4 +: 8]] : '0;
  end
  always @(posedge clk) if (!rst) begin
    n_rej  += int'(reject_evt);
    n_done += int'(done_evt);
    if (mreq_val && mreq_rdy) begin
      pend <= 1; dly <= 2; preq <= mreq;
      if (mreq.ns != domain) ns_bad++;
    end else if (pend && dly != 0) dly <= dly - 1;
    else if (mresp_val && mresp_rdy) begin
      pend <= 0;
      if (preq.typ == MT_WR) begin
        n_wr++;
        if (ok) mem[preq.addr[4 +: 8]] <= merge_line(mem[preq.addr[4 +: 8]], preq.data, preq.strb);
      end
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

  task automatic dbg(logic rd, logic ns, logic [31:0] src, logic [31:0] dst,
                     output logic [31:0] data, output logic err);
    @(negedge clk);
    dbg_cmd_val = 1; dbg_cmd = '{is_read: rd, src: src, dst: dst, ns: ns};
    do @(posedge clk); while (!dbg_cmd_rdy);
    @(negedge clk) dbg_cmd_val = 0;
    while (!dbg_resp_val) @(posedge clk);
    data = dbg_resp_data; err = dbg_resp_err;
    @(posedge clk);
  endtask

  // one register access from core node 1; returns the response word and the
  // cycles from acceptance to response
  task automatic reg_acc(mtype_e t, logic ns, logic [31:0] a, logic [31:0] wd,
                         output logic [31:0] rd, output int lat);
    int t0;
    @(negedge clk);
    net_in_msg = '0;
    net_in_msg.dest = NODE_DMA; net_in_msg.typ = t; net_in_msg.ns = ns;
    net_in_msg.addr = a; net_in_msg.opaque = {NODE_CORE1, 2'b01};
    net_in_msg.data = {4{wd}}; net_in_msg.strb = 16'h000F << {a[3:2], 2'b00};
    net_in_val = 1;
    do @(posedge clk); while (!net_in_rdy);
    t0 = $time;
    @(negedge clk) net_in_val = 0;
    while (!net_out_val) @(posedge clk);
    lat = int'(($time - t0) / 10);
    rd = line_word(net_out_msg.data, a);
    check("response to core 1", {126'b0, net_out_msg.dest}, 128'(NODE_CORE1));
    check("response flagged", {127'b0, net_out_msg.is_resp}, 128'd1);
    @(posedge clk);
  endtask

  function automatic logic [31:0] mword(logic [31:0] a);
    return line_word(mem[a[4 +: 8]], a);
  endfunction

  initial begin
    logic [31:0] d;
    logic        e;
    int          lat, r0, d0, w0;
    for (int l = 0; l < LINES; l++) mem[l] = {$urandom, $urandom, $urandom, $urandom};
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    check("domain reset secure", {127'b0, domain}, 128'd1);

    // debug side, secure: copy secure->secure and read back
    dbg(0, 1, 32'h0900, 32'h0A00, d, e);
    check("secure copy ok", {127'b0, e}, 128'd0);
    check("secure copy data", mem[8'hA0], mem[8'h90]);
    dbg(1, 1, 32'h0A08, 32'h0, d, e);
    check("debug read", 128'(d), 128'(mword(32'h0A08)));
    // debug side, normal, while the domain is secure: refused
    r0 = n_rej; w0 = n_wr;
    dbg(0, 0, 32'h0100, 32'h0200, d, e);
    check("normal debug refused", {127'b0, e}, 128'd1);
    check("normal debug reject event", 128'(n_rej - r0), 128'd1);
    check("refused copy wrote nothing", 128'(n_wr - w0), 128'd0);

    // network side: domain register
    r0 = n_rej;
    reg_acc(MT_RD, 0, ADDR_DMA_DOMAIN, 0, d, lat);
    check("normal register read refused", 128'(n_rej - r0), 128'd1);
    check("refused read returns zero", 128'(d), 128'd0);
    reg_acc(MT_RD, 1, ADDR_DMA_DOMAIN, 0, d, lat);
    check("secure domain read", 128'(d), 128'd1);
    reg_acc(MT_WR, 1, ADDR_DMA_DOMAIN, 0, d, lat);
    check("secure sets domain normal", {127'b0, domain}, 128'd0);
    reg_acc(MT_WR, 0, ADDR_DMA_DOMAIN, 1, d, lat);
    check("normal cannot set domain", {127'b0, domain}, 128'd0);

    // network copy by the normal world, normal -> normal
    d0 = n_done;
    reg_acc(MT_WR, 0, ADDR_DMA_SRC, 32'h0340, d, lat);
    reg_acc(MT_WR, 0, ADDR_DMA_DST, 32'h0560, d, lat);
    check("copy acknowledged with dst", 128'(d), 128'h560);
    check("ack after the copy", 128'(lat >= 6), 128'd1);
    check("normal copy data", mem[8'h56], mem[8'h34]);
    check("done counted", 128'(n_done - d0), 128'd1);
    reg_acc(MT_RD, 0, ADDR_DMA_STATUS, 0, d, lat);
    check("status counts operations", 128'(d), 128'(n_done));
    // normal-domain copy from secure memory moves zeros only
    reg_acc(MT_WR, 0, ADDR_DMA_SRC, 32'h0900, d, lat);
    reg_acc(MT_WR, 0, ADDR_DMA_DST, 32'h0570, d, lat);
    check("secure data not copied", mem[8'h57], '0);
    // normal-domain copy into secure memory is dropped
    begin
      logic [127:0] old_line;
      old_line = mem[8'hB0];
      reg_acc(MT_WR, 0, ADDR_DMA_SRC, 32'h0340, d, lat);
      reg_acc(MT_WR, 0, ADDR_DMA_DST, 32'h0B00, d, lat);
      check("secure memory not overwritten", mem[8'hB0], old_line);
    end
    // a secure debug command passes a normal domain; its memory access is normal
    dbg(1, 1, 32'h0344, 32'h0, d, e);
    check("secure debug passes normal domain", {127'b0, e}, 128'd0);
    check("debug read normal word", 128'(d), 128'(mword(32'h0344)));

    // both sides at once
    d0 = n_done;
    fork
      dbg(0, 0, 32'h0120, 32'h0130, d, e);
      begin
        logic [31:0] d2;
        int l2;
        reg_acc(MT_WR, 0, ADDR_DMA_SRC, 32'h0140, d2, l2);
        reg_acc(MT_WR, 0, ADDR_DMA_DST, 32'h0150, d2, l2);
      end
    join
    check("both sides served", 128'(n_done - d0), 128'd2);
    check("debug copy data", mem[8'h13], mem[8'h12]);
    check("network copy data", mem[8'h15], mem[8'h14]);
    check("memory requests carry the domain", 128'(ns_bad), 128'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
