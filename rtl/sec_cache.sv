// sec_cache: two-way set-associative write-back cache with a security tag
// (NS-bit) on every line. The same module serves as each core's L1
// instruction cache, L1 data cache and, with IS_L2 set, as the shared L2.
//
// Security tag. A line's tag bit holds the security domain of the memory
// location it caches (as returned by the memory access control module), not
// that of the request that brought it in, so one location never appears as two
// lines. The address tag and the security tag are checked in parallel: a line
// hits only if the address tag matches and the requester's NS-bit is at least
// the line's. A security-tag mismatch is handled as a miss: the line is
// refilled from memory, where the access check rejects a normal-world access
// to secure memory; such a response (its NS-bit above the requester's) is not
// installed and the requester gets zeros. Lines of both worlds share the cache
// without any flush, and a line of one world may evict a line of the other.
//
// Operation. One request at a time (blocking). A request is accepted in
// S_IDLE, looked up in S_LOOKUP; a hit answers in the next cycle (2 cycles
// from acceptance to response). A miss writes back a dirty victim, then
// refills the line. Replacement is LRU (one bit per set). Control-space
// addresses (below CTRL_LIMIT) are never cached: they pass through unchanged.
//
// L2 only (IS_L2=1): the cacheable-control register at ADDR_L2CTRL. While it
// is 0, addresses in secure memory (at or above `partition`) are uncacheable
// and pass straight through to memory; while it is 1 they are cached like any
// other. Anyone may read the register; only a secure request may write it.
//
// Interfaces: creq/cresp towards the processor side, mreq/mresp towards
// memory, all valid/ready, with line-wide messages (tz_pkg::mreq_t).
//
// Following the reference design: two ways, the per-line NS tag checked with
// the address tag, the tag taken from the memory location, the cacheable
// control register and its reset value 0 (uncacheable secure memory). This
// design's choices: SETS, 16-byte lines, write-back with write-allocate, LRU,
// and "at least the line's level" as the hit condition (an exact match would
// make every secure-world access to a normal line miss and refetch).
module sec_cache
  import tz_pkg::*;
#(
  parameter int unsigned SETS  = 16,
  parameter bit          IS_L2 = 1'b0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         creq_val,
  output logic         creq_rdy,
  input  mreq_t        creq,
  output logic         cresp_val,
  input  logic         cresp_rdy,
  output mresp_t       cresp,
  output logic         mreq_val,
  input  logic         mreq_rdy,
  output mreq_t        mreq,
  input  logic         mresp_val,
  output logic         mresp_rdy,
  input  mresp_t       mresp,
  input  logic [31:0]  partition,
  // one-cycle event pulses, for statistics
  output logic         hit_evt,
  output logic         miss_evt,
  output logic         wb_evt,
  output logic         bypass_evt,
  output logic         deny_evt
);
  localparam int unsigned IDX_W = $clog2(SETS);
  localparam int unsigned TAG_W = 32 - 4 - IDX_W;

  typedef enum logic [3:0] {
    S_IDLE, S_LOOKUP, S_WB, S_WB_WAIT, S_FILL, S_FILL_WAIT, S_FWD, S_FWD_WAIT, S_RESP
  } state_e;

  logic [TAG_W-1:0]  tag_a   [2][SETS];
  logic [LINE_W-1:0] data_a  [2][SETS];
  logic              valid_a [2][SETS];
  logic              dirty_a [2][SETS];
  logic              ns_a    [2][SETS];
  logic              lru_a   [SETS];      // way to replace next
  logic              l2ctrl;

  state_e            state;
  mreq_t             r;
  logic              victim;
  logic [LINE_W-1:0] rdata;
  logic              rns;

  logic [IDX_W-1:0]  idx;
  logic [TAG_W-1:0]  tag;
  assign idx = r.addr[4 +: IDX_W];
  assign tag = r.addr[31 -: TAG_W];

  // Lookup
  logic [1:0] tmatch, hit;
  always_comb begin
    for (int w = 0; w < 2; w++) begin
      tmatch[w] = valid_a[w][idx] && (tag_a[w][idx] == tag);
      hit[w]    = tmatch[w] && (r.ns >= ns_a[w][idx]);
    end
  end

  logic is_l2reg, uncached;
  assign is_l2reg = IS_L2 && (r.addr[31:2] == ADDR_L2CTRL[31:2]);
  assign uncached = is_ctrl_addr(r.addr) ||
                    (IS_L2 && !l2ctrl && (r.addr >= partition));

  logic hit_way;
  assign hit_way = hit[1];

  logic pick_victim;
  always_comb begin
    if (tmatch[0])           pick_victim = 1'b0;
    else if (tmatch[1])      pick_victim = 1'b1;
    else if (!valid_a[0][idx]) pick_victim = 1'b0;
    else if (!valid_a[1][idx]) pick_victim = 1'b1;
    else                     pick_victim = lru_a[idx];
  end

  logic [LINE_W-1:0] merged_hit, merged_fill;
  assign merged_hit  = merge_line(data_a[hit_way][idx], r.data, r.strb);
  assign merged_fill = merge_line(mresp.data, r.data, r.strb);

  assign creq_rdy = (state == S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      r      <= '0;
      victim <= 1'b0;
      rdata  <= '0;
      rns    <= 1'b0;
      l2ctrl <= 1'b0;
      for (int w = 0; w < 2; w++)
        for (int s = 0; s < SETS; s++) begin
          valid_a[w][s] <= 1'b0;
          dirty_a[w][s] <= 1'b0;
        end
      for (int s = 0; s < SETS; s++) lru_a[s] <= 1'b0;
    end else begin
      case (state)
        S_IDLE: if (creq_val) begin
          r     <= creq;
          state <= S_LOOKUP;
        end
        S_LOOKUP: begin
          if (is_l2reg) begin
            if (r.typ == MT_WR && r.ns) l2ctrl <= r.data[r.addr[3:2]*32];
            rdata <= {4{31'd0, (r.typ == MT_WR && r.ns) ? r.data[r.addr[3:2]*32] : l2ctrl}};
            rns   <= 1'b0;
            state <= S_RESP;
          end else if (uncached) begin
            state <= S_FWD;
          end else if (|hit) begin
            rdata <= data_a[hit_way][idx];
            rns   <= ns_a[hit_way][idx];
            if (r.typ == MT_WR) begin
              data_a[hit_way][idx]  <= merged_hit;
              dirty_a[hit_way][idx] <= 1'b1;
            end
            lru_a[idx] <= ~hit_way;
            state <= S_RESP;
          end else begin
            victim <= pick_victim;
            state  <= (valid_a[pick_victim][idx] && dirty_a[pick_victim][idx]) ? S_WB : S_FILL;
          end
        end
        S_WB:      if (mreq_rdy) state <= S_WB_WAIT;
        S_WB_WAIT: if (mresp_val) begin
          valid_a[victim][idx] <= 1'b0;
          dirty_a[victim][idx] <= 1'b0;
          state <= S_FILL;
        end
        S_FILL:    if (mreq_rdy) state <= S_FILL_WAIT;
        S_FILL_WAIT: if (mresp_val) begin
          if (mresp.ns > r.ns) begin
            // the memory access check refused this requester: nothing cached
            rdata <= '0;
            rns   <= r.ns;
          end else begin
            tag_a[victim][idx]   <= tag;
            ns_a[victim][idx]    <= mresp.ns;
            valid_a[victim][idx] <= 1'b1;
            data_a[victim][idx]  <= (r.typ == MT_WR) ? merged_fill : mresp.data;
            dirty_a[victim][idx] <= (r.typ == MT_WR);
            lru_a[idx]           <= ~victim;
            rdata <= mresp.data;
            rns   <= mresp.ns;
          end
          state <= S_RESP;
        end
        S_FWD:      if (mreq_rdy) state <= S_FWD_WAIT;
        S_FWD_WAIT: if (mresp_val) begin
          rdata <= mresp.data;
          rns   <= mresp.ns;
          state <= S_RESP;
        end
        S_RESP: if (cresp_rdy) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    mreq_val = 1'b0;
    mreq     = r;
    case (state)
      S_WB: begin
        mreq_val    = 1'b1;
        mreq.typ    = MT_WR;
        mreq.addr   = {tag_a[victim][idx], idx, 4'h0};
        mreq.strb   = '1;
        mreq.data   = data_a[victim][idx];
        mreq.ns     = ns_a[victim][idx];
      end
      S_FILL: begin
        mreq_val    = 1'b1;
        mreq.typ    = MT_RD;
        mreq.addr   = {r.addr[31:4], 4'h0};
        mreq.strb   = '0;
      end
      S_FWD: mreq_val = 1'b1;
      default: ;
    endcase
  end
  assign mresp_rdy = (state == S_WB_WAIT) || (state == S_FILL_WAIT) || (state == S_FWD_WAIT);

  assign cresp_val    = (state == S_RESP);
  assign cresp.typ    = r.typ;
  assign cresp.opaque = r.opaque;
  assign cresp.ns     = rns;
  assign cresp.data   = rdata;

  assign hit_evt    = (state == S_LOOKUP) && !is_l2reg && !uncached && (|hit);
  assign miss_evt   = (state == S_LOOKUP) && !is_l2reg && !uncached && !(|hit);
  assign wb_evt     = (state == S_WB) && mreq_rdy;
  assign bypass_evt = (state == S_LOOKUP) && !is_l2reg && uncached;
  assign deny_evt   = (state == S_FILL_WAIT) && mresp_val && (mresp.ns > r.ns);

endmodule
