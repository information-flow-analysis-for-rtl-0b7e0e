// tb_sec_cache: checks the NS-tagged cache in both of its roles.
//
// Two instances run side by side on the same request stream: u_l1 (IS_L2=0)
// and u_l2 (IS_L2=1), each with few sets so that lines are evicted often, and
// each with its own memory model. The model behaves like memory behind the
// access controller: locations at or above PART are secure; a normal-world
// access to them returns zeros marked secure and a write is dropped.
//
// A reference copy of memory in the testbench gives the expected result of
// every access: the line's contents where the requester may see it, zeros
// where it may not. Random reads and writes by both worlds are checked, then
// the L2's cacheable-control register: secure memory passes uncached while it
// is 0, only the secure world can set it, and once set secure lines are cached.
// The hit latency (2 cycles from acceptance to response) is checked, and every
// event (hit, miss, write-back, denied fill, bypass) must have happened.
module tb_sec_cache;
  import tz_pkg::*;

  localparam int unsigned SETS  = 4;
  localparam logic [31:0] PART  = 32'h0000_0600;
  localparam int unsigned LINES = 128;          // model covers 0x000-0x7FF

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic   creq_val = 0, cresp_rdy = 0;
  mreq_t  creq = '0;
  logic   creq_rdy [2], cresp_val [2];
  mresp_t cresp [2];
  logic   mreq_val [2], mreq_rdy [2], mresp_val [2], mresp_rdy [2];
  mreq_t  mreq [2];
  mresp_t mresp [2];
  logic   hit_evt [2], miss_evt [2], wb_evt [2], bypass_evt [2], deny_evt [2];

  // Each instance gets the request once, in turn (sel).
  int sel = 0;

  for (genvar g = 0; g < 2; g++) begin : g_dut
    sec_cache #(.SETS(SETS), .IS_L2(g == 1)) u_cache (
      .clk, .rst,
      .creq_val(creq_val && sel == g), .creq_rdy(creq_rdy[g]), .creq,
      .cresp_val(cresp_val[g]), .cresp_rdy, .cresp(cresp[g]),
      .mreq_val(mreq_val[g]), .mreq_rdy(mreq_rdy[g]), .mreq(mreq[g]),
      .mresp_val(mresp_val[g]), .mresp_rdy(mresp_rdy[g]), .mresp(mresp[g]),
      .partition(PART),
      .hit_evt(hit_evt[g]), .miss_evt(miss_evt[g]), .wb_evt(wb_evt[g]),
      .bypass_evt(bypass_evt[g]), .deny_evt(deny_evt[g])
    );

    // memory model behind the access check, answering after 3 cycles
    logic [LINE_W-1:0] mem [LINES];
    logic  pend;
    int    dly;
    mreq_t preq;
    logic  sec, ok;
    assign sec = preq.addr >= PART;
    assign ok  = preq.ns || !sec;
    assign mreq_rdy[g]  = !pend;
    assign mresp_val[g] = pend && dly == 0;
    always_comb begin
      mresp[g].typ    = preq.typ;
      mresp[g].opaque = preq.opaque;
      mresp[g].ns     = sec;
      mresp[g].data   = (preq.typ == MT_RD && ok) ? mem[preq.addr[4 +: 7]] : '0;
    end
    always @(posedge clk) begin
      if (rst) begin
        pend <= 0; dly <= 0; preq <= '0;
      end else if (mreq_val[g] && mreq_rdy[g]) begin
        pend <= 1; dly <= 3; preq <= mreq[g];
      end else if (pend && dly != 0) begin
        dly <= dly - 1;
      end else if (mresp_val[g] && mresp_rdy[g]) begin
        pend <= 0;
        if (preq.typ == MT_WR && ok && !is_ctrl_addr(preq.addr))
          mem[preq.addr[4 +: 7]] <= merge_line(mem[preq.addr[4 +: 7]], preq.data, preq.strb);
      end
    end
  end

  int n_hit [2], n_miss [2], n_wb [2], n_byp [2], n_deny [2];
  initial for (int g = 0; g < 2; g++) begin
    n_hit[g] = 0; n_miss[g] = 0; n_wb[g] = 0; n_byp[g] = 0; n_deny[g] = 0;
  end
  always @(posedge clk) if (!rst)
    for (int g = 0; g < 2; g++) begin
      n_hit[g]  += int'(hit_evt[g]);
      n_miss[g] += int'(miss_evt[g]);
      n_wb[g]   += int'(wb_evt[g]);
      n_byp[g]  += int'(bypass_evt[g]);
      n_deny[g] += int'(deny_evt[g]);
    end

  logic [LINE_W-1:0] ref_mem [LINES];
  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
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

  // One access to instance g; returns the response and cycles to response.
  task automatic access1(int g, mtype_e t, logic ns, logic [31:0] a, logic [127:0] d,
                         logic [15:0] s, output mresp_t rsp, output int lat);
    int c;
    @(negedge clk);
    sel = g;
    creq_val = 1; creq.typ = t; creq.ns = ns; creq.addr = a; creq.data = d;
    creq.strb = s; creq.opaque = 4'(g);
    do @(posedge clk); while (!creq_rdy[g]);
    @(negedge clk);
    creq_val = 0; cresp_rdy = 1;
    c = 1;
    while (!cresp_val[g]) begin @(negedge clk); c++; end
    rsp = cresp[g];
    lat = c;
    @(negedge clk);
    cresp_rdy = 0;
  endtask

  // Same access on both instances, checked against the reference.
  task automatic access(mtype_e t, logic ns, logic [31:0] a, logic [127:0] d, logic [15:0] s);
    mresp_t rsp;
    int lat;
    logic ok;
    ok = ns || (a < PART);
    for (int g = 0; g < 2; g++) begin
      access1(g, t, ns, a, d, s, rsp, lat);
      if (t == MT_RD)
        check($sformatf("inst %0d read %h ns=%0d", g, a, ns), rsp.data,
              ok ? ref_mem[a[4 +: 7]] : '0);
      check($sformatf("inst %0d opaque", g), {124'b0, rsp.opaque}, 128'(g));
    end
    if (t == MT_WR && ok) ref_mem[a[4 +: 7]] = merge_line(ref_mem[a[4 +: 7]], d, s);
  endtask

  task automatic rand_phase(int n, logic [31:0] lo, logic [31:0] hi);
    for (int i = 0; i < n; i++) begin
      logic [31:0] a;
      logic [127:0] d;
      int w;
      a = 32'($urandom_range(lo >> 4, (hi >> 4) - 1)) << 4;
      w = $urandom_range(0, 3);
      a[3:2] = 2'(w);
      d = {4{$urandom}};
      if ($urandom_range(0, 2) == 0)
        access(MT_WR, 1'($urandom), a, d, 16'h000F << (4 * w));
      else
        access(MT_RD, 1'($urandom), a, '0, '0);
    end
  endtask

  initial begin
    mresp_t rsp;
    int lat, h0;
    for (int l = 0; l < LINES; l++) begin
      ref_mem[l] = {$urandom, $urandom, $urandom, $urandom};
      g_dut[0].mem[l] = ref_mem[l];
      g_dut[1].mem[l] = ref_mem[l];
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    // hit latency
    access(MT_RD, 0, 32'h0000_0120, '0, '0);
    h0 = n_hit[0];
    access1(0, MT_RD, 0, 32'h0000_0124, '0, '0, rsp, lat);
    check("L1 hit", 128'(n_hit[0] - h0), 128'd1);
    check("hit latency", 128'(lat), 128'd2);

    // both worlds, both regions, while the L2 keeps secure memory uncached
    rand_phase(400, 32'h100, 32'h800);

    // L2 cacheable-control register
    access1(1, MT_RD, 1, ADDR_L2CTRL, '0, '0, rsp, lat);
    check("l2ctrl reset", 128'(rsp.data[0]), 128'd0);
    access1(1, MT_WR, 0, ADDR_L2CTRL, {4{32'h1}}, 16'h00F0, rsp, lat);
    access1(1, MT_RD, 1, ADDR_L2CTRL, '0, '0, rsp, lat);
    check("l2ctrl normal write ignored", 128'(rsp.data[32]), 128'd0);
    h0 = n_byp[1];
    access(MT_RD, 1, 32'h0000_0700, '0, '0);
    check("secure line bypasses L2", 128'(n_byp[1] - h0), 128'd1);
    access1(1, MT_WR, 1, ADDR_L2CTRL, {4{32'h1}}, 16'h00F0, rsp, lat);
    access1(1, MT_RD, 0, ADDR_L2CTRL, '0, '0, rsp, lat);
    check("l2ctrl secure write", 128'(rsp.data[32]), 128'd1);
    h0 = n_byp[1];
    access(MT_RD, 1, 32'h0000_0700, '0, '0);
    access(MT_RD, 1, 32'h0000_0700, '0, '0);
    check("secure line cached in L2", 128'(n_byp[1] - h0), 128'd0);
    rand_phase(400, 32'h100, 32'h800);

    // write back everything still dirty by sweeping other lines, then compare
    for (int l = 16; l < 16 + 4 * SETS; l++) access(MT_RD, 1, 32'(l * 16), '0, '0);
    for (int l = 48; l < 48 + 4 * SETS; l++) access(MT_RD, 1, 32'(l * 16), '0, '0);
    for (int l = 16; l < LINES; l++) begin
      check("L1 memory image", g_dut[0].mem[l], ref_mem[l]);
    end

    for (int g = 0; g < 2; g++) begin
      checks += 4;
      if (n_hit[g] == 0)  begin failures++; $display("FAIL no hit in %0d", g); end
      if (n_miss[g] == 0) begin failures++; $display("FAIL no miss in %0d", g); end
      if (n_wb[g] == 0)   begin failures++; $display("FAIL no write-back in %0d", g); end
      if (n_deny[g] == 0) begin failures++; $display("FAIL no denied fill in %0d", g); end
    end
    checks++;
    if (n_byp[1] == 0) begin failures++; $display("FAIL no L2 bypass"); end
    $display("events L1: hit=%0d miss=%0d wb=%0d deny=%0d; L2: hit=%0d miss=%0d wb=%0d deny=%0d bypass=%0d",
             n_hit[0], n_miss[0], n_wb[0], n_deny[0], n_hit[1], n_miss[1], n_wb[1], n_deny[1], n_byp[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
