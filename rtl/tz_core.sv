// tz_core: five-stage pipelined processor (Fetch, Decode, Execute, Memory,
// Writeback) for a MIPS-style 32-bit instruction set, whose every memory
// request carries the core's NS-bit.
//
// NS-bit. The core holds one NS-bit (1: secure world, 0: normal world), reset
// to NS_RESET and attached to every instruction fetch and data access. A
// request on ns_switch_req flips it, safely: the core stops fetching, lets
// every instruction already in the pipeline finish (including outstanding
// memory accesses), and only then flips the bit and pulses ns_switch_ack.
// No instruction fetched under one world ever issues a memory request under
// the other. With ns_switch_req tied low the core is a fixed-world core.
//
// Pipeline. F fetches from the instruction memory port; D decodes, reads the
// register file, checks hazards and resolves jumps; X runs the ALU, the
// multiplier/divider and branch comparisons; M makes the data access; W
// writes the register file. A source register written by the instruction in
// X is bypassed from the ALU result into D; a source register written by an
// instruction in M or W (or by a load in X) stalls D until the write is done.
// Branches resolve in X, jumps in D; fetch goes on sequentially and the
// wrong-path instructions are squashed. Memory ports are valid/ready with
// variable latency: F keeps one fetch outstanding, M stalls the pipeline while
// its access is outstanding.
//
// Instructions (standard MIPS32 encodings unless noted; no delay slots):
//   addu subu and or xor nor slt sltu; addiu andi ori xori slti sltiu;
//   sll srl sra sllv srlv srav; lw lh lhu lb lbu sw sh sb;
//   beq bne blez bgtz bltz bgez j jal jr jalr;
//   mul div divu rem remu (opcode 0x1C, funct 0x02 / 0x1A / 0x1B / 0x1E / 0x1F;
//     three-register forms, rd = rs op rt; division by zero gives all ones for
//     a quotient and the dividend for a remainder);
//   mfc0 rt (reads from_mngr_data), mtc0 rt (sends rt on to_mngr_*), nop.
// Any other encoding executes as a nop.
//
// Memory messages are line-wide (tz_pkg::mreq_t): stores put their data in
// the right byte lanes and set only their strobes; loads and fetches pick
// their bytes out of the returned line.
//
// Following the reference design: the five stages, the hazard check in D with
// stalls and a bypass from the ALU output, the ALU and multiplier in X, the
// hard-wired or switchable NS-bit on every request, and the drain-then-switch
// rule. This design's choices: encodings of mul/div/rem, mfc0/mtc0 semantics,
// no branch delay slot, and the handshakes. Not implemented: syscall, eret,
// chmod, dirmem, debug, prelw and amo.
module tz_core
  import tz_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0000_0200,
  parameter bit          NS_RESET = 1'b0
) (
  input  logic         clk,
  input  logic         rst,
  // instruction memory port
  output logic         imemreq_val,
  input  logic         imemreq_rdy,
  output mreq_t        imemreq,
  input  logic         imemresp_val,
  output logic         imemresp_rdy,
  input  mresp_t       imemresp,
  // data memory port
  output logic         dmemreq_val,
  input  logic         dmemreq_rdy,
  output mreq_t        dmemreq,
  input  logic         dmemresp_val,
  output logic         dmemresp_rdy,
  input  mresp_t       dmemresp,
  // manager interface
  input  logic [31:0]  from_mngr_data,
  output logic         to_mngr_val,
  output logic [31:0]  to_mngr_data,
  // world switch
  input  logic         ns_switch_req,
  output logic         ns_switch_ack,
  output logic         ns,
  // statistics pulses
  output logic         stall_evt,
  output logic         bypass_evt,
  output logic         squash_evt
);
  // ------------------------------------------------------------------ types
  typedef enum logic [4:0] {
    A_ADD, A_SUB, A_AND, A_OR, A_XOR, A_NOR, A_SLT, A_SLTU,
    A_SLL, A_SRL, A_SRA, A_MUL, A_DIV, A_DIVU, A_REM, A_REMU, A_CP0, A_LINK, A_PASS
  } alu_e;
  typedef enum logic [2:0] {B_NONE, B_EQ, B_NE, B_LEZ, B_GTZ, B_LTZ, B_GEZ} br_e;
  typedef enum logic [1:0] {M_NONE, M_LD, M_ST} mem_e;
  typedef enum logic [1:0] {SZ_W, SZ_H, SZ_B} size_e;

  typedef struct packed {
    alu_e        alu;
    br_e         br;
    mem_e        mem;
    size_e       size;
    logic        sext;      // signed sub-word load
    logic        wen;
    logic [4:0]  waddr;
    logic        mtc0;
    logic        rs_used;
    logic        rt_used;
    logic        use_imm;   // op1 = immediate
    logic        shamt_op;  // op0 = shamt (shift by constant)
    logic        jmp;       // j / jal (target from instruction)
    logic        jreg;      // jr / jalr
  } ctrl_t;

  // ---------------------------------------------------------------- state
  logic [31:0] rf [32];

  // fetch
  logic [31:0] pc_f;
  logic        f_pend, f_drop;
  logic [31:0] f_pc;            // pc of the outstanding fetch
  // D
  logic        d_val;
  logic [31:0] d_pc, d_inst;
  // X
  logic        x_val;
  logic [31:0] x_pc, x_op0, x_op1, x_sd, x_imm;
  ctrl_t       x_c;
  // M
  logic        m_val, m_sent;
  logic [31:0] m_res, m_sd;
  ctrl_t       m_c;
  // W
  logic        w_val;
  logic [31:0] w_res;
  ctrl_t       w_c;

  // ---------------------------------------------------------------- decode
  ctrl_t       dc;
  logic [5:0]  op, fn;
  logic [4:0]  rs, rt, rd;
  logic [31:0] imm_s, imm_z;
  assign op = d_inst[31:26];
  assign rs = d_inst[25:21];
  assign rt = d_inst[20:16];
  assign rd = d_inst[15:11];
  assign fn = d_inst[5:0];
  assign imm_s = {{16{d_inst[15]}}, d_inst[15:0]};
  assign imm_z = {16'd0, d_inst[15:0]};

  logic        imm_is_z;
  always_comb begin
    dc = '{alu: A_ADD, br: B_NONE, mem: M_NONE, size: SZ_W, default: '0};
    imm_is_z = 1'b0;
    case (op)
      6'h00: begin
        dc.rs_used = 1'b1; dc.rt_used = 1'b1; dc.wen = 1'b1; dc.waddr = rd;
        case (fn)
          6'h00: begin dc.alu = A_SLL; dc.shamt_op = 1'b1; dc.rs_used = 1'b0; end
          6'h02: begin dc.alu = A_SRL; dc.shamt_op = 1'b1; dc.rs_used = 1'b0; end
          6'h03: begin dc.alu = A_SRA; dc.shamt_op = 1'b1; dc.rs_used = 1'b0; end
          6'h04: dc.alu = A_SLL;
          6'h06: dc.alu = A_SRL;
          6'h07: dc.alu = A_SRA;
          6'h08: begin dc.jreg = 1'b1; dc.wen = 1'b0; dc.rt_used = 1'b0; end
          6'h09: begin dc.jreg = 1'b1; dc.alu = A_LINK; dc.rt_used = 1'b0; end
          6'h21: dc.alu = A_ADD;
          6'h23: dc.alu = A_SUB;
          6'h24: dc.alu = A_AND;
          6'h25: dc.alu = A_OR;
          6'h26: dc.alu = A_XOR;
          6'h27: dc.alu = A_NOR;
          6'h2a: dc.alu = A_SLT;
          6'h2b: dc.alu = A_SLTU;
          default: begin dc.wen = 1'b0; dc.rs_used = 1'b0; dc.rt_used = 1'b0; end
        endcase
      end
      6'h1c: begin
        dc.rs_used = 1'b1; dc.rt_used = 1'b1; dc.wen = 1'b1; dc.waddr = rd;
        case (fn)
          6'h02: dc.alu = A_MUL;
          6'h1a: dc.alu = A_DIV;
          6'h1b: dc.alu = A_DIVU;
          6'h1e: dc.alu = A_REM;
          6'h1f: dc.alu = A_REMU;
          default: begin dc.wen = 1'b0; dc.rs_used = 1'b0; dc.rt_used = 1'b0; end
        endcase
      end
      6'h01: begin
        dc.rs_used = 1'b1;
        dc.br = (rt == 5'd1) ? B_GEZ : B_LTZ;
      end
      6'h02: dc.jmp = 1'b1;
      6'h03: begin dc.jmp = 1'b1; dc.wen = 1'b1; dc.waddr = 5'd31; dc.alu = A_LINK; end
      6'h04: begin dc.rs_used = 1'b1; dc.rt_used = 1'b1; dc.br = B_EQ; end
      6'h05: begin dc.rs_used = 1'b1; dc.rt_used = 1'b1; dc.br = B_NE; end
      6'h06: begin dc.rs_used = 1'b1; dc.br = B_LEZ; end
      6'h07: begin dc.rs_used = 1'b1; dc.br = B_GTZ; end
      6'h09, 6'h0a, 6'h0b, 6'h0c, 6'h0d, 6'h0e: begin
        dc.rs_used = 1'b1; dc.use_imm = 1'b1; dc.wen = 1'b1; dc.waddr = rt;
        case (op)
          6'h0a: dc.alu = A_SLT;
          6'h0b: dc.alu = A_SLTU;
          6'h0c: begin dc.alu = A_AND; imm_is_z = 1'b1; end
          6'h0d: begin dc.alu = A_OR;  imm_is_z = 1'b1; end
          6'h0e: begin dc.alu = A_XOR; imm_is_z = 1'b1; end
          default: dc.alu = A_ADD;
        endcase
      end
      6'h10: begin
        if (rs == 5'd0) begin dc.alu = A_CP0; dc.wen = 1'b1; dc.waddr = rt; end
        else if (rs == 5'd4) begin dc.mtc0 = 1'b1; dc.rt_used = 1'b1; dc.alu = A_PASS; end
      end
      6'h20, 6'h21, 6'h23, 6'h24, 6'h25: begin
        dc.rs_used = 1'b1; dc.use_imm = 1'b1; dc.wen = 1'b1; dc.waddr = rt;
        dc.mem = M_LD;
        dc.size = (op[1:0] == 2'b11) ? SZ_W : (op[0] ? SZ_H : SZ_B);
        dc.sext = !op[2];
      end
      6'h28, 6'h29, 6'h2b: begin
        dc.rs_used = 1'b1; dc.rt_used = 1'b1; dc.use_imm = 1'b1; dc.mem = M_ST;
        dc.size = (op[1:0] == 2'b11) ? SZ_W : (op[0] ? SZ_H : SZ_B);
      end
      default: ;
    endcase
    if (dc.waddr == 5'd0) dc.wen = 1'b0;
  end

  // ------------------------------------------------------ X-stage results
  logic [31:0] alu_out;
  logic        br_taken;
  logic [63:0] prod;
  assign prod = x_op0 * x_op1;

  always_comb begin
    case (x_c.alu)
      A_ADD:  alu_out = x_op0 + x_op1;
      A_SUB:  alu_out = x_op0 - x_op1;
      A_AND:  alu_out = x_op0 & x_op1;
      A_OR:   alu_out = x_op0 | x_op1;
      A_XOR:  alu_out = x_op0 ^ x_op1;
      A_NOR:  alu_out = ~(x_op0 | x_op1);
      A_SLT:  alu_out = {31'd0, $signed(x_op0) < $signed(x_op1)};
      A_SLTU: alu_out = {31'd0, x_op0 < x_op1};
      A_SLL:  alu_out = x_op1 << x_op0[4:0];
      A_SRL:  alu_out = x_op1 >> x_op0[4:0];
      A_SRA:  alu_out = $unsigned($signed(x_op1) >>> x_op0[4:0]);
      A_MUL:  alu_out = prod[31:0];
      A_DIV:  alu_out = (x_op1 == 0) ? 32'hFFFF_FFFF :
                        (x_op0 == 32'h8000_0000 && x_op1 == 32'hFFFF_FFFF) ? x_op0 :
                        $unsigned($signed(x_op0) / $signed(x_op1));
      A_DIVU: alu_out = (x_op1 == 0) ? 32'hFFFF_FFFF : x_op0 / x_op1;
      A_REM:  alu_out = (x_op1 == 0) ? x_op0 :
                        (x_op0 == 32'h8000_0000 && x_op1 == 32'hFFFF_FFFF) ? 32'd0 :
                        $unsigned($signed(x_op0) % $signed(x_op1));
      A_REMU: alu_out = (x_op1 == 0) ? x_op0 : x_op0 % x_op1;
      A_CP0:  alu_out = from_mngr_data;
      A_LINK: alu_out = x_pc + 32'd4;
      A_PASS: alu_out = x_op1;
      default: alu_out = '0;
    endcase
    case (x_c.br)
      B_EQ:   br_taken = (x_op0 == x_op1);
      B_NE:   br_taken = (x_op0 != x_op1);
      B_LEZ:  br_taken = $signed(x_op0) <= 0;
      B_GTZ:  br_taken = $signed(x_op0) > 0;
      B_LTZ:  br_taken = $signed(x_op0) < 0;
      B_GEZ:  br_taken = $signed(x_op0) >= 0;
      default: br_taken = 1'b0;
    endcase
  end

  // ------------------------------------------------------- hazards / flow
  logic m_wait, m_adv, m_free, x_adv, x_free, d_adv;
  assign m_wait = m_val && (m_c.mem != M_NONE) && !(m_sent && dmemresp_val);
  assign m_adv  = m_val && !m_wait;
  assign m_free = !m_val || m_adv;
  assign x_adv  = x_val && m_free;
  assign x_free = !x_val || x_adv;

  logic [31:0] rs_val, rt_val;
  logic        haz_stall, byp_rs, byp_rt;
  always_comb begin
    haz_stall = 1'b0;
    byp_rs    = 1'b0;
    byp_rt    = 1'b0;
    rs_val    = rf[rs];
    rt_val    = rf[rt];
    if (dc.rs_used && rs != 5'd0) begin
      if (x_val && x_c.wen && x_c.waddr == rs) begin
        if (x_c.mem == M_LD) haz_stall = 1'b1;
        else begin rs_val = alu_out; byp_rs = 1'b1; end
      end else if ((m_val && m_c.wen && m_c.waddr == rs) ||
                   (w_val && w_c.wen && w_c.waddr == rs))
        haz_stall = 1'b1;
    end
    if (dc.rt_used && rt != 5'd0) begin
      if (x_val && x_c.wen && x_c.waddr == rt) begin
        if (x_c.mem == M_LD) haz_stall = 1'b1;
        else begin rt_val = alu_out; byp_rt = 1'b1; end
      end else if ((m_val && m_c.wen && m_c.waddr == rt) ||
                   (w_val && w_c.wen && w_c.waddr == rt))
        haz_stall = 1'b1;
    end
  end

  logic redir_x, redir_d, redirect;
  logic [31:0] target_x, target_d, target;
  assign redir_x  = x_adv && (x_c.br != B_NONE) && br_taken;
  assign target_x = x_pc + 32'd4 + (x_imm << 2);
  assign d_adv    = d_val && !haz_stall && x_free && !redir_x;
  assign redir_d  = d_adv && (dc.jmp || dc.jreg);
  assign target_d = dc.jreg ? rs_val : {d_pc[31:28], d_inst[25:0], 2'b00};
  assign redirect = redir_x || redir_d;
  assign target   = redir_x ? target_x : target_d;

  // world switch: stop fetching, drain, then flip
  logic drained;
  assign drained = !f_pend && !d_val && !x_val && !m_val && !w_val;

  // -------------------------------------------------------------- fetch
  assign imemreq_val     = !f_pend && !redirect && !ns_switch_req;
  assign imemreq.typ     = MT_RD;
  assign imemreq.opaque  = '0;
  assign imemreq.ns      = ns;
  assign imemreq.addr    = pc_f;
  assign imemreq.strb    = '0;
  assign imemreq.data    = '0;

  logic d_load;   // a fetched instruction enters D this cycle
  assign imemresp_rdy = f_pend && (f_drop || redirect || !d_val || d_adv);
  assign d_load = imemresp_val && imemresp_rdy && !f_drop && !redirect;

  // -------------------------------------------------------------- memory
  logic [31:0] st_word;
  logic [15:0] st_strb;
  always_comb begin
    case (m_c.size)
      SZ_B: begin st_word = {4{m_sd[7:0]}};  st_strb = 16'h0001 << m_res[3:0]; end
      SZ_H: begin st_word = {2{m_sd[15:0]}}; st_strb = 16'h0003 << {m_res[3:1], 1'b0}; end
      default: begin st_word = m_sd;         st_strb = 16'h000F << {m_res[3:2], 2'b00}; end
    endcase
  end
  assign dmemreq_val    = m_val && (m_c.mem != M_NONE) && !m_sent;
  assign dmemreq.typ    = (m_c.mem == M_ST) ? MT_WR : MT_RD;
  assign dmemreq.opaque = '0;
  assign dmemreq.ns     = ns;
  assign dmemreq.addr   = m_res;
  assign dmemreq.strb   = (m_c.mem == M_ST) ? st_strb : '0;
  assign dmemreq.data   = {4{st_word}};
  assign dmemresp_rdy   = m_val && m_sent;

  logic [31:0] ld_word, ld_val;
  always_comb begin
    ld_word = line_word(dmemresp.data, m_res) >> {m_res[1:0], 3'b000};
    case (m_c.size)
      SZ_B:    ld_val = m_c.sext ? {{24{ld_word[7]}},  ld_word[7:0]}  : {24'd0, ld_word[7:0]};
      SZ_H:    ld_val = m_c.sext ? {{16{ld_word[15]}}, ld_word[15:0]} : {16'd0, ld_word[15:0]};
      default: ld_val = ld_word;
    endcase
  end

  // ----------------------------------------------------------- registers
  always_ff @(posedge clk) begin
    if (rst) begin
      pc_f   <= RESET_PC;
      f_pend <= 1'b0;
      f_drop <= 1'b0;
      f_pc   <= '0;
      d_val  <= 1'b0;
      d_pc   <= '0;
      d_inst <= '0;
      x_val  <= 1'b0;
      x_c    <= '0;
      x_pc   <= '0;
      x_op0  <= '0;
      x_op1  <= '0;
      x_sd   <= '0;
      x_imm  <= '0;
      m_val  <= 1'b0;
      m_sent <= 1'b0;
      m_c    <= '0;
      m_res  <= '0;
      m_sd   <= '0;
      w_val  <= 1'b0;
      w_c    <= '0;
      w_res  <= '0;
      ns     <= NS_RESET;
      ns_switch_ack <= 1'b0;
      for (int i = 0; i < 32; i++) rf[i] <= '0;
    end else begin
      ns_switch_ack <= 1'b0;
      // fetch
      if (imemreq_val && imemreq_rdy) begin
        f_pend <= 1'b1;
        f_pc   <= pc_f;
        pc_f   <= pc_f + 32'd4;
      end
      if (imemresp_val && imemresp_rdy) begin
        f_pend <= 1'b0;
        f_drop <= 1'b0;
      end else if (redirect && f_pend) begin
        f_drop <= 1'b1;
      end
      if (redirect) pc_f <= target;

      // D
      if (d_load) begin
        d_val  <= 1'b1;
        d_pc   <= f_pc;
        d_inst <= line_word(imemresp.data, f_pc);
      end else if (d_adv || redir_x) begin
        d_val  <= 1'b0;
      end

      // X
      if (d_adv) begin
        x_val <= 1'b1;
        x_c   <= dc;
        x_pc  <= d_pc;
        x_op0 <= dc.shamt_op ? {27'd0, d_inst[10:6]} : rs_val;
        x_op1 <= dc.use_imm ? (imm_is_z ? imm_z : imm_s) : rt_val;
        x_sd  <= rt_val;
        x_imm <= imm_s;
      end else if (x_adv) begin
        x_val <= 1'b0;
      end

      // M
      if (dmemreq_val && dmemreq_rdy) m_sent <= 1'b1;
      if (x_adv) begin
        m_val  <= 1'b1;
        m_sent <= 1'b0;
        m_c    <= x_c;
        m_res  <= alu_out;
        m_sd   <= x_sd;
      end else if (m_adv) begin
        m_val  <= 1'b0;
        m_sent <= 1'b0;
      end

      // W
      w_val <= m_adv;
      if (m_adv) begin
        w_c   <= m_c;
        w_res <= (m_c.mem == M_LD) ? ld_val : m_res;
      end
      if (w_val && w_c.wen) rf[w_c.waddr] <= w_res;

      // world switch once the pipeline is empty
      if (ns_switch_req && drained && !ns_switch_ack) begin
        ns            <= ~ns;
        ns_switch_ack <= 1'b1;
      end
    end
  end

  assign to_mngr_val  = w_val && w_c.mtc0;
  assign to_mngr_data = w_res;

  assign stall_evt  = d_val && haz_stall;
  assign bypass_evt = d_adv && (byp_rs || byp_rt);
  assign squash_evt = redirect;

endmodule
