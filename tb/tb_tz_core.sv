// tb_tz_core: checks the pipelined core on its own, against results worked out
// in the testbench.
//
// The testbench assembles a program of many short tests. Each test loads
// random operands with ori/sll, runs one instruction (ALU, shift, immediate,
// multiply/divide, load/store of every width, branch or jump) right after the
// instructions that produce its operands, so that bypasses and stalls are
// exercised, and sends the result to the manager port with mtc0. The expected
// value of every mtc0 is computed here with plain SystemVerilog operators.
//
// Both memory ports are served by a behavioural memory with random ready and
// random response delays. Every request must carry the core's current NS-bit.
// Half way through, a world switch is requested: the core must acknowledge it
// once, flip its NS-bit, and go on with the program without losing or
// repeating any result. The stall, bypass and squash events must all occur.
module tb_tz_core;
  import tz_pkg::*;
  import tz_asm_pkg::*;

  localparam logic [31:0] BASE  = 32'h0000_0200;
  localparam logic [31:0] DATA  = 32'h0000_4000;
  localparam logic [31:0] MNGR  = 32'h1357_9BDF;
  localparam int unsigned WORDS = 8192;           // 32 KiB of memory

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic   imemreq_val, imemreq_rdy, imemresp_val, imemresp_rdy;
  logic   dmemreq_val, dmemreq_rdy, dmemresp_val, dmemresp_rdy;
  mreq_t  imemreq, dmemreq;
  mresp_t imemresp, dmemresp;
  logic   to_mngr_val, ns_switch_req = 0, ns_switch_ack, ns;
  logic   stall_evt, bypass_evt, squash_evt;
  logic [31:0] to_mngr_data;
  logic [31:0] from_mngr_data = MNGR;

  tz_core #(.RESET_PC(BASE), .NS_RESET(1'b0)) dut (.*);

  // ---------------------------------------------------------------- memory
  logic [31:0] mem [WORDS];

  function automatic logic [LINE_W-1:0] rd_line(logic [31:0] a);
    logic [LINE_W-1:0] l;
    for (int w = 0; w < 4; w++) l[w*32 +: 32] = mem[{a[14:4], 2'(w)}];
    return l;
  endfunction

  // one port of the memory model: p = 0 instruction, 1 data
  logic   pend [2], rdy_r [2];
  int     dly [2];
  mreq_t  preq [2];
  int     n_req = 0, ns_bad = 0;
  always @(negedge clk) for (int p = 0; p < 2; p++) rdy_r[p] = ($urandom_range(0, 3) != 0);
  assign imemreq_rdy  = !pend[0] && rdy_r[0];
  assign dmemreq_rdy  = !pend[1] && rdy_r[1];
  assign imemresp_val = pend[0] && dly[0] == 0;
  assign dmemresp_val = pend[1] && dly[1] == 0;
  always_comb begin
    imemresp = '{typ: preq[0].typ, opaque: preq[0].opaque, ns: preq[0].ns, data: rd_line(preq[0].addr)};
    dmemresp = '{typ: preq[1].typ, opaque: preq[1].opaque, ns: preq[1].ns,
                 data: preq[1].typ == MT_RD ? rd_line(preq[1].addr) : '0};
  end
  always @(posedge clk) begin
    if (rst) begin
      for (int p = 0; p < 2; p++) begin pend[p] <= 0; dly[p] <= 0; preq[p] <= '0; end
    end else begin
      if (imemreq_val && imemreq_rdy) begin
        pend[0] <= 1; dly[0] <= $urandom_range(0, 3); preq[0] <= imemreq;
        n_req++; if (imemreq.ns != ns) ns_bad++;
      end else if (pend[0] && dly[0] != 0) dly[0] <= dly[0] - 1;
      else if (imemresp_val && imemresp_rdy) pend[0] <= 0;
      if (dmemreq_val && dmemreq_rdy) begin
        pend[1] <= 1; dly[1] <= $urandom_range(0, 3); preq[1] <= dmemreq;
        n_req++; if (dmemreq.ns != ns) ns_bad++;
      end else if (pend[1] && dly[1] != 0) dly[1] <= dly[1] - 1;
      else if (dmemresp_val && dmemresp_rdy) begin
        pend[1] <= 0;
        if (preq[1].typ == MT_WR)
          for (int b = 0; b < 16; b++)
            if (preq[1].strb[b])
              mem[{preq[1].addr[14:4], 2'(b / 4)}][(b % 4) * 8 +: 8] <= preq[1].data[b*8 +: 8];
      end
    end
  end

  // ---------------------------------------------------------------- program
  logic [31:0] prog [$];
  logic [31:0] exp_out [$];
  logic [31:0] got_out [$];
  int          out_at [$];     // program index of each mtc0, for messages

  function automatic logic [31:0] pc_here();
    return BASE + 32'(prog.size() * 4);
  endfunction

  task automatic e(logic [31:0] i); prog.push_back(i); endtask

  task automatic li(int r, logic [31:0] v);
    e(ORI(r, 0, int'(v[31:16])));
    e(SLL(r, r, 16));
    e(ORI(r, r, int'(v[15:0])));
  endtask

  task automatic out(int r, logic [31:0] v);
    out_at.push_back(prog.size());
    e(MTC0(r));
    exp_out.push_back(v);
  endtask

  function automatic logic [31:0] rnd();
    case ($urandom_range(0, 3))
      0: return 32'($urandom_range(0, 40));
      1: return -32'($urandom_range(1, 40));
      2: return {1'b1, 31'($urandom)};
      default: return $urandom;
    endcase
  endfunction

  task automatic t_rtype();
    logic [31:0] a, b, r;
    int k;
    a = rnd(); b = rnd();
    k = $urandom_range(0, 13);
    if (k >= 9 && b == 0) b = 7;
    if ((k == 9 || k == 11) && a == 32'h8000_0000 && b == '1) b = 3;
    li(1, a); li(2, b);
    case (k)
      0: begin e(ADDU(3, 1, 2)); r = a + b; end
      1: begin e(SUBU(3, 1, 2)); r = a - b; end
      2: begin e(AND_(3, 1, 2)); r = a & b; end
      3: begin e(OR_ (3, 1, 2)); r = a | b; end
      4: begin e(XOR_(3, 1, 2)); r = a ^ b; end
      5: begin e(NOR_(3, 1, 2)); r = ~(a | b); end
      6: begin e(SLT (3, 1, 2)); r = 32'($signed(a) < $signed(b)); end
      7: begin e(SLTU(3, 1, 2)); r = 32'(a < b); end
      8: begin e(MUL (3, 1, 2)); r = a * b; end
      9: begin e(DIV(3, 1, 2)); r = 32'($signed(a) / $signed(b)); end
      10: begin e(DIVU(3, 1, 2)); r = a / b; end
      11: begin e(REM(3, 1, 2)); r = 32'($signed(a) % $signed(b)); end
      12: begin e(REMU(3, 1, 2)); r = a % b; end
      default: begin e(SLLV(3, 1, 2)); r = a << b[4:0]; end
    endcase
    out(3, r);
  endtask

  task automatic t_shift_imm();
    logic [31:0] a, r;
    int sh, imm;
    a = rnd(); sh = $urandom_range(0, 31); imm = $urandom_range(0, 65535);
    li(1, a);
    case ($urandom_range(0, 10))
      0: begin e(SLL(3, 1, sh)); r = a << sh; end
      1: begin e(SRL(3, 1, sh)); r = a >> sh; end
      2: begin e(SRA(3, 1, sh)); r = 32'($signed(a) >>> sh); end
      3: begin e(ORI(2, 0, sh)); e(SRLV(3, 1, 2)); r = a >> sh; end
      4: begin e(ORI(2, 0, sh)); e(SRAV(3, 1, 2)); r = 32'($signed(a) >>> sh); end
      5: begin e(ADDIU(3, 1, imm)); r = a + {{16{imm[15]}}, imm[15:0]}; end
      6: begin e(SLTI(3, 1, imm)); r = 32'($signed(a) < $signed({{16{imm[15]}}, imm[15:0]})); end
      7: begin e(SLTIU(3, 1, imm)); r = 32'(a < {{16{imm[15]}}, imm[15:0]}); end
      8: begin e(ANDI(3, 1, imm)); r = a & {16'b0, imm[15:0]}; end
      9: begin e(ORI(3, 1, imm)); r = a | {16'b0, imm[15:0]}; end
      default: begin e(XORI(3, 1, imm)); r = a ^ {16'b0, imm[15:0]}; end
    endcase
    out(3, r);
  endtask

  // store then load back, widths at random; memory at DATA is known to the
  // testbench through dmem_ref
  logic [7:0] dmem_ref [int];
  function automatic logic [7:0] ref_byte(int a);
    return dmem_ref.exists(a) ? dmem_ref[a] : 8'h00;
  endfunction

  task automatic t_mem();
    logic [31:0] v, r;
    int off, sw, lw;
    v = rnd();
    sw = $urandom_range(0, 2);                  // 0 byte, 1 half, 2 word
    off = $urandom_range(0, 255) & ~((1 << sw) - 1);
    li(1, v);
    e(ORI(4, 0, int'(DATA)));
    case (sw)
      0: e(SB(1, off, 4));
      1: e(SH(1, off, 4));
      default: e(SW(1, off, 4));
    endcase
    for (int b = 0; b < (1 << sw); b++) dmem_ref[int'(DATA) + off + b] = v[b*8 +: 8];
    lw = $urandom_range(0, 4);                  // lb lbu lh lhu lw
    off = $urandom_range(0, 255);
    off = (lw == 4) ? off & ~3 : (lw >= 2 ? off & ~1 : off);
    case (lw)
      0: begin e(LB (3, off, 4)); r = {{24{ref_byte(int'(DATA) + off)[7]}}, ref_byte(int'(DATA) + off)}; end
      1: begin e(LBU(3, off, 4)); r = {24'b0, ref_byte(int'(DATA) + off)}; end
      2: begin e(LH (3, off, 4));
               r = {{16{ref_byte(int'(DATA) + off + 1)[7]}}, ref_byte(int'(DATA) + off + 1),
                    ref_byte(int'(DATA) + off)}; end
      3: begin e(LHU(3, off, 4));
               r = {16'b0, ref_byte(int'(DATA) + off + 1), ref_byte(int'(DATA) + off)}; end
      default: begin e(LW(3, off, 4));
               r = {ref_byte(int'(DATA) + off + 3), ref_byte(int'(DATA) + off + 2),
                    ref_byte(int'(DATA) + off + 1), ref_byte(int'(DATA) + off)}; end
    endcase
    e(ADDIU(3, 3, 1));                          // use right after the load
    out(3, r + 1);
  endtask

  task automatic t_branch();
    logic [31:0] a, b;
    logic taken;
    int k;
    a = rnd(); b = ($urandom_range(0, 2) == 0) ? a : rnd();
    li(1, a); li(2, b);
    e(ADDIU(5, 0, 0));
    k = $urandom_range(0, 5);
    case (k)
      0: begin e(BEQ(1, 2, 2));  taken = (a == b); end
      1: begin e(BNE(1, 2, 2));  taken = (a != b); end
      2: begin e(BLEZ(1, 2));    taken = ($signed(a) <= 0); end
      3: begin e(BGTZ(1, 2));    taken = ($signed(a) > 0); end
      4: begin e(BLTZ(1, 2));    taken = ($signed(a) < 0); end
      default: begin e(BGEZ(1, 2)); taken = ($signed(a) >= 0); end
    endcase
    e(ADDIU(5, 5, 1));
    e(ADDIU(5, 5, 2));
    e(ADDIU(5, 5, 4));
    out(5, taken ? 32'd4 : 32'd7);
  endtask

  task automatic t_jump();
    logic [31:0] p;
    case ($urandom_range(0, 2))
      0: begin
        p = pc_here();
        e(JAL(p + 12)); e(ADDIU(31, 0, 1)); e(ADDIU(31, 0, 2));
        out(31, p + 4);
      end
      1: begin
        p = pc_here();
        e(ORI(6, 0, int'(p + 20)));
        e(JALR(7, 6));                     // to p+20
        e(ADDIU(7, 0, 1)); e(ADDIU(7, 0, 2)); e(ADDIU(7, 0, 3));
        out(7, p + 8);
      end
      default: begin
        p = pc_here();
        e(ORI(6, 0, int'(p + 16)));
        e(JR(6));
        e(ADDIU(6, 0, 1)); e(ADDIU(6, 0, 2));
        e(J(p + 24));
        e(ADDIU(6, 0, 3));
        out(6, p + 16);
      end
    endcase
  endtask

  task automatic build();
    e(MFC0(1));
    out(1, MNGR);
    for (int k = 0; k < 250; k++)
      case ($urandom_range(0, 4))
        0: t_rtype();
        1: t_shift_imm();
        2: t_mem();
        3: t_branch();
        default: t_jump();
      endcase
    e(J(pc_here()));
  endtask

  // ---------------------------------------------------------------- checks
  int checks = 0, failures = 0;
  int n_stall = 0, n_bypass = 0, n_squash = 0, n_ack = 0;

  always @(posedge clk) if (!rst) begin
    if (to_mngr_val) got_out.push_back(to_mngr_data);
    n_stall  += int'(stall_evt);
    n_bypass += int'(bypass_evt);
    n_squash += int'(squash_evt);
    n_ack    += int'(ns_switch_ack);
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: %0d of %0d results", got_out.size(), exp_out.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL never happened: %s", what); end
  endtask

  initial begin
    build();
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
    foreach (prog[i]) mem[(BASE >> 2) + i] = prog[i];
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    // world switch half way
    while (got_out.size() < exp_out.size() / 2) @(posedge clk);
    @(negedge clk) ns_switch_req = 1;
    while (!ns_switch_ack) @(posedge clk);
    @(negedge clk) ns_switch_req = 0;
    checks++;
    if (ns !== 1'b1) begin failures++; $display("FAIL NS-bit did not switch"); end

    while (got_out.size() < exp_out.size()) @(posedge clk);
    repeat (50) @(posedge clk);
    checks++;
    if (got_out.size() != exp_out.size()) begin
      failures++; $display("FAIL %0d results, expected %0d", got_out.size(), exp_out.size());
    end
    foreach (exp_out[i]) begin
      checks++;
      if (i >= got_out.size() || got_out[i] !== exp_out[i]) begin
        failures++;
        if (failures < 10)
          $display("FAIL result %0d: got %h expected %h (after %h %h %h)", i,
                   i < got_out.size() ? got_out[i] : 32'h0, exp_out[i],
                   prog[out_at[i] - 3], prog[out_at[i] - 2], prog[out_at[i] - 1]);
      end
    end
    checks += 2;
    if (ns_bad != 0) begin failures++; $display("FAIL %0d requests with a wrong NS-bit", ns_bad); end
    if (n_ack != 1)  begin failures++; $display("FAIL %0d switch acknowledgements", n_ack); end
    need("stall", n_stall);
    need("bypass", n_bypass);
    need("squash", n_squash);
    $display("%0d results, %0d memory requests, stall=%0d bypass=%0d squash=%0d",
             got_out.size(), n_req, n_stall, n_bypass, n_squash);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
