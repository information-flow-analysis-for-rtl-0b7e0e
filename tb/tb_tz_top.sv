// tb_tz_top: end-to-end test of the two-core system at its default sizes.
//
// Loads a program for each core and some data into main memory, runs both
// cores together and checks every value they report through mtc0 against the
// values worked out here. The programs exercise the pipeline (bypass, load-use
// stall, branches, jumps, mul/div/rem, sub-word loads and stores), L1
// evictions with write-back, the L2 cache, and the security checks: the
// normal-world core tries to read secure memory, to move the partition, to set
// the L2 cacheable-control register and to use the DMA controller, and gets
// zeros or no effect; the secure core reads its secrets and normal memory,
// starts a DMA copy, then enables caching of secure memory. Afterwards the
// testbench drives the debug port with normal, disabled and secure debug,
// and switches core 0 into the secure world. Each mechanism's occurrences are
// counted; one that never happened is a failure.
`timescale 1ns/1ps
module tb_tz_top;
  import tz_pkg::*;
  import tz_asm_pkg::*;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic [1:0]  ns_switch_req = '0;
  logic [1:0]  ns_switch_ack, core_ns, to_mngr_val;
  logic [31:0] from_mngr_data [2];
  logic [31:0] to_mngr_data [2];
  logic        dbg_sec_en = 0, dbg_ns_en = 0, dbg_req_val = 0, dbg_req_read = 0;
  logic        dbg_req_rdy, dbg_resp_val, dbg_resp_err;
  logic [31:0] dbg_req_src = 0, dbg_req_dst = 0, dbg_resp_data;
  logic        init_we = 0;
  logic [31:0] init_addr = 0, init_data = 0;

  always #5 clk = ~clk;

  tz_top dut (
    .clk, .rst, .ns_switch_req, .ns_switch_ack, .core_ns,
    .from_mngr_data, .to_mngr_val, .to_mngr_data,
    .dbg_sec_en, .dbg_ns_en, .dbg_req_val, .dbg_req_rdy, .dbg_req_read,
    .dbg_req_src, .dbg_req_dst, .dbg_resp_val, .dbg_resp_data, .dbg_resp_err,
    .init_we, .init_addr, .init_data
  );

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  // ---------------------------------------------------------- programs
  logic [31:0] prog [2][$];
  logic [31:0] exp_out [2][$];
  logic [31:0] got_out [2][$];

  function automatic logic [31:0] here(int c);
    return (c == 0 ? 32'h200 : 32'h8200) + 32'(prog[c].size() * 4);
  endfunction
  task automatic e(int c, logic [31:0] i); prog[c].push_back(i); endtask

  localparam logic [31:0] SECRET = 32'hDEAD_BEEF;
  localparam logic [31:0] PAT0 = 32'hA5A5_0001, PAT1 = 32'hA5A5_0002;

  task automatic build();
    int jal_at, j_at, spin;
    // ---- core 0, normal world
    e(0, ORI(1, 0, 16'h1000));
    e(0, ADDIU(2, 0, 7));
    e(0, ADDIU(3, 0, 6));
    e(0, MUL(4, 2, 3));            // r3 bypassed from X
    e(0, SW(4, 0, 1));
    e(0, LW(5, 0, 1));
    e(0, ADDU(6, 5, 5));           // load-use stall
    e(0, MTC0(6));                 exp_out[0].push_back(84);
    e(0, ADDIU(7, 0, 10));
    e(0, ADDIU(8, 0, 0));
    e(0, ADDU(8, 8, 7));
    e(0, ADDIU(7, 7, -1));
    e(0, BNE(7, 0, -3));
    e(0, MTC0(8));                 exp_out[0].push_back(55);
    e(0, ORI(9, 0, 16'h9000));
    e(0, LW(10, 0, 9));            // secure memory: denied
    e(0, MTC0(10));                exp_out[0].push_back(0);
    e(0, SW(0, 0, 0));             // try to move the partition
    e(0, LW(11, 0, 0));
    e(0, MTC0(11));                exp_out[0].push_back(32'h8000);
    e(0, ADDIU(12, 0, 1));
    e(0, SW(12, 4, 0));            // try to make secure memory cacheable
    e(0, LW(13, 4, 0));
    e(0, MTC0(13));                exp_out[0].push_back(0);
    e(0, SW(2, 16'h100, 1));       // four lines in one set: evictions
    e(0, SW(3, 16'h200, 1));
    e(0, SW(2, 16'h300, 1));
    e(0, LW(14, 0, 1));
    e(0, MTC0(14));                exp_out[0].push_back(42);
    e(0, ADDIU(15, 0, -2));
    e(0, SB(15, 5, 1));
    e(0, LB(16, 5, 1));
    e(0, MTC0(16));                exp_out[0].push_back(32'hFFFF_FFFE);
    e(0, LBU(17, 5, 1));
    e(0, MTC0(17));                exp_out[0].push_back(32'hFE);
    e(0, ADDIU(18, 0, -3));
    e(0, SH(18, 10, 1));
    e(0, LHU(19, 10, 1));
    e(0, MTC0(19));                exp_out[0].push_back(32'hFFFD);
    e(0, LH(20, 10, 1));
    e(0, MTC0(20));                exp_out[0].push_back(32'hFFFF_FFFD);
    e(0, LW(20, 0, 1));            // whole word holds 42 still
    e(0, MTC0(20));                exp_out[0].push_back(42);
    jal_at = prog[0].size(); e(0, NOP());
    e(0, MTC0(21));                exp_out[0].push_back(99);
    j_at = prog[0].size();   e(0, NOP());
    prog[0][jal_at] = JAL(here(0));
    e(0, ADDIU(21, 0, 99));
    e(0, JR(31));
    prog[0][j_at] = J(here(0));
    e(0, ADDIU(22, 0, 100));
    e(0, ADDIU(23, 0, -7));
    e(0, DIV(24, 22, 23));
    e(0, MTC0(24));                exp_out[0].push_back(-14);
    e(0, REM(25, 22, 23));
    e(0, MTC0(25));                exp_out[0].push_back(2);
    e(0, DIVU(26, 22, 23));
    e(0, MTC0(26));                exp_out[0].push_back(0);
    e(0, ADDIU(27, 0, -16));
    e(0, SRA(28, 27, 2));
    e(0, MTC0(28));                exp_out[0].push_back(-4);
    e(0, SRL(29, 27, 28));
    e(0, MTC0(29));                exp_out[0].push_back(32'hF);
    e(0, SLT(30, 27, 0));
    e(0, MTC0(30));                exp_out[0].push_back(1);
    e(0, ORI(1, 0, 16'h9000));
    e(0, SW(1, 16'h10, 0));        // DMA register: rejected by its checker
    e(0, LW(2, 16'h10, 0));
    e(0, MTC0(2));                 exp_out[0].push_back(0);
    e(0, ADDIU(3, 0, 20));         // uncached loads, racing core 1
    e(0, LW(4, 0, 0));
    e(0, ADDIU(3, 3, -1));
    e(0, BNE(3, 0, -3));
    e(0, ORI(5, 0, 16'h600D));
    e(0, MTC0(5));                 exp_out[0].push_back(32'h600D);
    spin = prog[0].size();
    e(0, J(32'h200 + 32'(spin * 4)));

    // ---- core 1, secure world
    e(1, ORI(1, 0, 16'h9000));
    e(1, LW(2, 0, 1));
    e(1, MTC0(2));                 exp_out[1].push_back(SECRET);
    e(1, ADDIU(3, 0, 16'h123));
    e(1, SW(3, 4, 1));
    e(1, LW(4, 4, 1));
    e(1, MTC0(4));                 exp_out[1].push_back(32'h123);
    e(1, ORI(5, 0, 16'h2000));
    e(1, LW(6, 0, 5));             // normal memory, read by the secure world
    e(1, MTC0(6));                 exp_out[1].push_back(32'h55AA);
    e(1, ADDIU(3, 0, 20));
    e(1, LW(4, 0, 0));
    e(1, ADDIU(3, 3, -1));
    e(1, BNE(3, 0, -3));
    e(1, ORI(7, 0, 16'h9200));
    e(1, SW(7, 16'h10, 0));        // DMA source
    e(1, ORI(8, 0, 16'h9300));
    e(1, SW(8, 16'h14, 0));        // DMA destination: starts, returns when done
    e(1, LW(9, 16'h0C, 0));
    e(1, MTC0(9));                 exp_out[1].push_back(1);
    e(1, ORI(10, 0, 16'h600D));
    e(1, MTC0(10));                exp_out[1].push_back(32'h600D);
    e(1, MFC0(11));                // wait for the testbench
    e(1, BEQ(11, 0, -2));
    e(1, ADDIU(12, 0, 1));
    e(1, SW(12, 4, 0));            // secure memory becomes cacheable in L2
    e(1, LW(13, 4, 0));
    e(1, MTC0(13));                exp_out[1].push_back(1);
    e(1, LW(15, 16'h10, 1));
    e(1, MTC0(15));                exp_out[1].push_back(32'h1111);
    e(1, LW(15, 16'h20, 1));
    e(1, MTC0(15));                exp_out[1].push_back(32'h2222);
    e(1, ORI(16, 0, 16'h600E));
    e(1, MTC0(16));                exp_out[1].push_back(32'h600E);
    spin = prog[1].size();
    e(1, J(32'h8200 + 32'(spin * 4)));
  endtask

  task automatic load_word(logic [31:0] a, logic [31:0] d);
    @(negedge clk);
    init_we = 1'b1; init_addr = a; init_data = d;
    @(negedge clk);
    init_we = 1'b0;
  endtask

  // ---------------------------------------------------------- monitors
  always @(posedge clk) begin
    for (int c = 0; c < 2; c++)
      if (!rst && to_mngr_val[c]) got_out[c].push_back(to_mngr_data[c]);
  end

  int n_stall, n_bypass, n_squash, n_l1hit, n_l1miss, n_l1wb, n_l1deny, n_filter;
  int n_l2hit, n_l2miss, n_l2byp, n_prio, n_arb, n_macrej, n_dmarej, n_dmadone, n_switch;
  always @(posedge clk) if (!rst) begin
    n_stall  += int'(dut.g_core[0].stall_evt)  + int'(dut.g_core[1].stall_evt);
    n_bypass += int'(dut.g_core[0].bypass_evt) + int'(dut.g_core[1].bypass_evt);
    n_squash += int'(dut.g_core[0].squash_evt) + int'(dut.g_core[1].squash_evt);
    n_l1hit  += int'(dut.g_core[0].dc_hit)  + int'(dut.g_core[1].dc_hit)
              + int'(dut.g_core[0].ic_hit)  + int'(dut.g_core[1].ic_hit);
    n_l1miss += int'(dut.g_core[0].dc_miss) + int'(dut.g_core[1].dc_miss)
              + int'(dut.g_core[0].ic_miss) + int'(dut.g_core[1].ic_miss);
    n_l1wb   += int'(dut.g_core[0].dc_wb)   + int'(dut.g_core[1].dc_wb);
    n_l1deny += int'(dut.g_core[0].dc_deny) + int'(dut.g_core[1].dc_deny);
    n_filter += int'(dut.g_core[0].filter_evt) + int'(dut.g_core[1].filter_evt);
    n_l2hit  += int'(dut.l2_hit);
    n_l2miss += int'(dut.l2_miss);
    n_l2byp  += int'(dut.l2_byp);
    n_prio   += int'(|dut.noc_prio_evt);
    n_arb    += int'(dut.arb_conflict_evt);
    n_macrej += int'(dut.mac_reject_evt);
    n_dmarej += int'(dut.dma_reject_evt);
    n_dmadone += int'(dut.dma_done_evt);
    n_switch += int'(ns_switch_ack[0]) + int'(ns_switch_ack[1]);
  end

  task automatic debug_op(input logic rd, input logic [31:0] src, input logic [31:0] dst,
                          output logic [31:0] data, output logic err);
    dbg_req_val <= 1'b1; dbg_req_read <= rd; dbg_req_src <= src; dbg_req_dst <= dst;
    do @(posedge clk); while (!dbg_req_rdy);
    dbg_req_val <= 1'b0;
    do @(posedge clk); while (!dbg_resp_val);
    data = dbg_resp_data;
    err  = dbg_resp_err;
  endtask

  task automatic wait_out(int c, int n);
    while (got_out[c].size() < n) @(posedge clk);
  endtask

  function automatic void need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endfunction

  // ---------------------------------------------------------- watchdog
  localparam int MAX_CYCLES = 200000;
  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL watchdog after %0d cycles (core0 %0d/%0d outputs, core1 %0d/%0d)", MAX_CYCLES,
             got_out[0].size(), exp_out[0].size(), got_out[1].size(), exp_out[1].size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- main
  initial begin
    logic [31:0] d;
    logic        er;
    int          t0;
    from_mngr_data[0] = '0;
    from_mngr_data[1] = '0;
    build();
    repeat (2) @(posedge clk);
    for (int i = 0; i < prog[0].size(); i++) load_word(32'h200 + 32'(i * 4), prog[0][i]);
    for (int i = 0; i < prog[1].size(); i++) load_word(32'h8200 + 32'(i * 4), prog[1][i]);
    for (int a = 32'h1000; a < 32'h1400; a += 4) load_word(a, 32'h0);
    load_word(32'h2000, 32'h55AA);
    load_word(32'h9000, SECRET);
    load_word(32'h9010, 32'h1111);
    load_word(32'h9020, 32'h2222);
    load_word(32'h9200, PAT0);
    load_word(32'h9204, PAT1);
    load_word(32'h9208, 32'h0);
    load_word(32'h920C, 32'h0);
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    t0 = $time;

    wait_out(0, exp_out[0].size());
    wait_out(1, exp_out[1].size() - 4);
    $display("phase 1 done at cycle %0d", ($time - t0) / 10);

    // debug port
    dbg_ns_en <= 1'b1; dbg_sec_en <= 1'b0;
    debug_op(1'b1, 32'h9300, 32'h0, d, er);
    check("normal debug read of secure data is rejected", {31'd0, er}, 1);
    check("normal debug read returns zeros", d, 0);
    dbg_ns_en <= 1'b0;
    debug_op(1'b1, 32'h9300, 32'h0, d, er);
    check("disabled debug refused", {31'd0, er}, 1);
    dbg_sec_en <= 1'b1;
    debug_op(1'b1, 32'h9300, 32'h0, d, er);
    check("secure debug read: no error", {31'd0, er}, 0);
    check("DMA copy requested by core 1 arrived", d, PAT0);
    debug_op(1'b0, 32'h9200, 32'h9400, d, er);
    check("secure debug copy: no error", {31'd0, er}, 0);
    debug_op(1'b1, 32'h9404, 32'h0, d, er);
    check("debug copy arrived", d, PAT1);

    // let core 1 go on
    from_mngr_data[1] = 32'd1;
    wait_out(1, exp_out[1].size());

    // world switch of core 0 while it runs its loop
    check("core 0 starts normal", {31'd0, core_ns[0]}, 0);
    ns_switch_req[0] <= 1'b1;
    do @(posedge clk); while (!ns_switch_ack[0]);
    ns_switch_req[0] <= 1'b0;
    @(posedge clk);
    check("core 0 switched to secure", {31'd0, core_ns[0]}, 1);
    repeat (50) @(posedge clk);

    for (int c = 0; c < 2; c++) begin
      check($sformatf("core %0d output count", c), got_out[c].size(), exp_out[c].size());
      foreach (exp_out[c][i])
        if (i < got_out[c].size())
          check($sformatf("core %0d output %0d", c, i), got_out[c][i], exp_out[c][i]);
    end

    $display("events: stall=%0d bypass=%0d squash=%0d l1hit=%0d l1miss=%0d l1wb=%0d l1deny=%0d filter=%0d",
             n_stall, n_bypass, n_squash, n_l1hit, n_l1miss, n_l1wb, n_l1deny, n_filter);
    $display("events: l2hit=%0d l2miss=%0d l2bypass=%0d noc_priority=%0d mem_arb_conflict=%0d mac_reject=%0d dma_reject=%0d dma_done=%0d switch=%0d",
             n_l2hit, n_l2miss, n_l2byp, n_prio, n_arb, n_macrej, n_dmarej, n_dmadone, n_switch);
    need("hazard stall", n_stall);
    need("bypass", n_bypass);
    need("squash after branch/jump", n_squash);
    need("L1 hit", n_l1hit);
    need("L1 miss", n_l1miss);
    need("L1 write-back", n_l1wb);
    need("L1 refused fill", n_l1deny);
    need("processor checker filter", n_filter);
    need("L2 hit", n_l2hit);
    need("L2 miss", n_l2miss);
    need("L2 uncacheable bypass", n_l2byp);
    need("network secure-first arbitration", n_prio);
    need("memory arbiter conflict", n_arb);
    need("memory access control reject", n_macrej);
    need("DMA checker reject", n_dmarej);
    need("DMA operation", n_dmadone);
    need("world switch", n_switch);
    $display("total cycles %0d", ($time - t0) / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
