// dma_ctrl: DMA controller that moves data between main memory locations,
// with its two security checkers and its security-level register.
//
// A DMA operation request names a source and a destination address. The
// controller reads the source line (16 bytes) from main memory into its data
// buffer, writes the buffer to the destination line, and once the write has
// been answered acknowledges the request. Every memory request it makes carries
// the NS-bit held in its security-level register (the "domain" register), so
// the memory access control module checks DMA traffic like any other.
//
// Requests come from two sides, each through its own sec_checker, which lets a
// request through only if its NS-bit is at least the domain register's value:
//  * the network (cores), as word accesses to memory-mapped registers:
//      ADDR_DMA_DOMAIN  domain register; anyone reads, only secure writes
//      ADDR_DMA_STATUS  read: number of operations completed (wraps)
//      ADDR_DMA_SRC     source address of the next operation
//      ADDR_DMA_DST     writing it starts the operation src -> written value;
//                       the write's response is the acknowledgement, sent
//                       only when the operation has finished
//    A rejected access is answered at once with zero data (it is not carried
//    out), so the core does not hang.
//  * the debug interface, as dma_cmd_t: a copy, or a read of one word at src
//    (returned on dbg_resp_data). A rejected command is answered with
//    dbg_resp_err set.
// An arbiter picks between the two sides when both have a request while the
// engine is idle, alternating between them. One operation runs at a time.
//
// Timing: accepted in the idle cycle, then one memory read and (for a copy)
// one memory write, each taking as long as the memory path takes, then the
// acknowledgement.
//
// Following the reference design: memory-to-memory copy through a data buffer
// using one read and one write request, the acknowledgement after the write
// response, the domain register and its NS-bit on every memory request, the
// two checkers with the "equal or higher" rule, the arbiter, and the debug
// read command. This design's choices: the register map, one line per
// operation, the alternating arbiter, the status counter and the domain's
// reset value (secure).
module dma_ctrl
  import tz_pkg::*;
#(
  parameter bit DOMAIN_RESET = 1'b1
) (
  input  logic         clk,
  input  logic         rst,
  // network terminal
  input  logic         net_in_val,
  output logic         net_in_rdy,
  input  net_msg_t     net_in_msg,
  output logic         net_out_val,
  input  logic         net_out_rdy,
  output net_msg_t     net_out_msg,
  // debug interface
  input  logic         dbg_cmd_val,
  output logic         dbg_cmd_rdy,
  input  dma_cmd_t     dbg_cmd,
  output logic         dbg_resp_val,
  input  logic         dbg_resp_rdy,
  output logic [31:0]  dbg_resp_data,
  output logic         dbg_resp_err,
  // memory side (to the memory request arbiter)
  output logic         mreq_val,
  input  logic         mreq_rdy,
  output mreq_t        mreq,
  input  logic         mresp_val,
  output logic         mresp_rdy,
  input  mresp_t       mresp,
  output logic         domain,
  output logic         reject_evt,
  output logic         done_evt
);
  typedef enum logic [2:0] {E_IDLE, E_RD, E_RD_WAIT, E_WR, E_WR_WAIT, E_DONE} estate_e;
  estate_e           st;
  dma_cmd_t          cmd;
  logic              owner_dbg;      // operation belongs to the debug side
  logic              last_dbg;       // arbiter: debug side served last
  logic [LINE_W-1:0] buffer;
  logic [31:0]       src_reg;
  logic [31:0]       done_cnt;
  net_msg_t          hold;           // the core request being served

  logic     nresp_val;
  net_msg_t nresp;

  // ---- security checkers
  logic net_ok_val, net_chk_rdy, net_rej;
  logic dbg_ok_val, dbg_chk_rdy, dbg_rej;
  logic net_take, dbg_take;   // which side is let in this cycle
  logic net_pass_rdy, dbg_pass_rdy;

  sec_checker u_chk_net (
    .in_val(net_in_val && net_take), .in_rdy(net_chk_rdy), .in_ns(net_in_msg.ns),
    .level(domain), .pass_val(net_ok_val), .pass_rdy(net_pass_rdy), .reject(net_rej)
  );
  sec_checker u_chk_dbg (
    .in_val(dbg_cmd_val && dbg_take), .in_rdy(dbg_chk_rdy), .in_ns(dbg_cmd.ns),
    .level(domain), .pass_val(dbg_ok_val), .pass_rdy(dbg_pass_rdy), .reject(dbg_rej)
  );

  // ---- arbiter: only in idle, with no response pending on either side
  logic idle;
  assign idle = (st == E_IDLE) && !nresp_val && !dbg_resp_val;
  always_comb begin
    net_take = 1'b0;
    dbg_take = 1'b0;
    if (idle) begin
      if (net_in_val && dbg_cmd_val) begin
        net_take = last_dbg;
        dbg_take = !last_dbg;
      end else begin
        net_take = net_in_val;
        dbg_take = dbg_cmd_val;
      end
    end
  end
  assign net_pass_rdy = 1'b1;
  assign dbg_pass_rdy = 1'b1;
  assign net_in_rdy   = net_take && net_chk_rdy;
  assign dbg_cmd_rdy  = dbg_take && dbg_chk_rdy;

  logic [31:0] w_in;
  assign w_in = line_word(net_in_msg.data, net_in_msg.addr);

  function automatic net_msg_t make_resp(input net_msg_t rq, input logic [31:0] word);
    net_msg_t m;
    m         = rq;
    m.dest    = rq.opaque[OPQ_W-1 -: NODE_W];
    m.is_resp = 1'b1;
    m.strb    = '0;
    m.data    = {4{word}};
    return m;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      st            <= E_IDLE;
      cmd           <= '0;
      owner_dbg     <= 1'b0;
      last_dbg      <= 1'b0;
      buffer        <= '0;
      src_reg       <= '0;
      done_cnt      <= '0;
      hold          <= '0;
      domain        <= DOMAIN_RESET;
      nresp_val     <= 1'b0;
      nresp         <= '0;
      dbg_resp_val  <= 1'b0;
      dbg_resp_data <= '0;
      dbg_resp_err  <= 1'b0;
    end else begin
      if (nresp_val && net_out_rdy) nresp_val <= 1'b0;
      if (dbg_resp_val && dbg_resp_rdy) dbg_resp_val <= 1'b0;

      // network side
      if (net_rej) begin
        nresp_val <= 1'b1;
        nresp     <= make_resp(net_in_msg, 32'd0);
      end else if (net_ok_val) begin
        last_dbg <= 1'b0;
        nresp_val <= 1'b1;
        case (net_in_msg.addr[7:2])
          ADDR_DMA_DOMAIN[7:2]: begin
            if (net_in_msg.typ == MT_WR && net_in_msg.ns) begin
              domain <= w_in[0];
              nresp  <= make_resp(net_in_msg, {31'd0, w_in[0]});
            end else
              nresp  <= make_resp(net_in_msg, {31'd0, domain});
          end
          ADDR_DMA_STATUS[7:2]: nresp <= make_resp(net_in_msg, done_cnt);
          ADDR_DMA_SRC[7:2]: begin
            if (net_in_msg.typ == MT_WR) src_reg <= w_in;
            nresp <= make_resp(net_in_msg, (net_in_msg.typ == MT_WR) ? w_in : src_reg);
          end
          ADDR_DMA_DST[7:2]: begin
            if (net_in_msg.typ == MT_WR) begin
              nresp_val <= 1'b0;          // acknowledged when the copy is done
              hold      <= net_in_msg;
              cmd       <= '{is_read: 1'b0, src: src_reg, dst: w_in, ns: domain};
              owner_dbg <= 1'b0;
              st        <= E_RD;
            end else
              nresp <= make_resp(net_in_msg, 32'd0);
          end
          default: nresp <= make_resp(net_in_msg, 32'd0);
        endcase
      end

      // debug side
      if (dbg_rej) begin
        dbg_resp_val  <= 1'b1;
        dbg_resp_data <= '0;
        dbg_resp_err  <= 1'b1;
      end else if (dbg_ok_val) begin
        last_dbg  <= 1'b1;
        cmd       <= '{is_read: dbg_cmd.is_read, src: dbg_cmd.src, dst: dbg_cmd.dst, ns: domain};
        owner_dbg <= 1'b1;
        st        <= E_RD;
      end

      // engine
      case (st)
        E_RD:      if (mreq_rdy) st <= E_RD_WAIT;
        E_RD_WAIT: if (mresp_val) begin
          buffer <= mresp.data;
          st     <= cmd.is_read ? E_DONE : E_WR;
        end
        E_WR:      if (mreq_rdy) st <= E_WR_WAIT;
        E_WR_WAIT: if (mresp_val) st <= E_DONE;
        E_DONE: begin
          done_cnt <= done_cnt + 32'd1;
          if (owner_dbg) begin
            dbg_resp_val  <= 1'b1;
            dbg_resp_data <= line_word(buffer, cmd.src);
            dbg_resp_err  <= 1'b0;
          end else begin
            nresp_val <= 1'b1;
            nresp     <= make_resp(hold, cmd.dst);
          end
          st <= E_IDLE;
        end
        default: ;
      endcase
    end
  end

  assign net_out_val = nresp_val;
  assign net_out_msg = nresp;

  always_comb begin
    mreq_val    = (st == E_RD) || (st == E_WR);
    mreq.typ    = (st == E_WR) ? MT_WR : MT_RD;
    mreq.opaque = '0;
    mreq.ns     = cmd.ns;
    mreq.addr   = (st == E_WR) ? {cmd.dst[31:4], 4'h0} : {cmd.src[31:4], 4'h0};
    mreq.strb   = (st == E_WR) ? '1 : '0;
    mreq.data   = buffer;
  end
  assign mresp_rdy  = (st == E_RD_WAIT) || (st == E_WR_WAIT);
  assign reject_evt = net_rej || dbg_rej;
  assign done_evt   = (st == E_DONE);

endmodule
