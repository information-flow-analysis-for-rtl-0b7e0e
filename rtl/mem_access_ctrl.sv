// mem_access_ctrl: memory access control module in front of main memory.
//
// It holds the partition register, the boundary between normal memory (below)
// and secure memory (at or above it). Every request is checked: its address
// gives the location's security domain, its NS-bit the requester's. A secure
// request may access both parts; a normal request may access only normal
// memory. A rejected request never reaches the memory: a read gets a response
// with zeroed data and a write is dropped, and the response still comes back,
// so that no requester hangs. Responses carry the NS-bit of the location, which
// the caches use as the line's security tag.
//
// The partition register is mapped at ADDR_PARTITION in the control space. Any
// world may read it; only a secure request may write it (the write data is in
// the word lane of that address). Other control-space addresses read as zero.
//
// One request is handled at a time. Accepting a request takes one cycle; a
// rejected or control-space request is answered in the next cycle, an allowed
// one when the memory answers. `partition` is the register's current value,
// which the L2 cache uses to tell uncacheable (secure) addresses.
//
// The check, the fake zero response and the register follow the reference
// design; which side of the boundary is secure and the reset value of the
// register are this design's choices.
module mem_access_ctrl
  import tz_pkg::*;
#(
  parameter logic [31:0] PARTITION_RESET = 32'h0000_8000
) (
  input  logic         clk,
  input  logic         rst,
  // from the memory request arbiter
  input  logic         req_val,
  output logic         req_rdy,
  input  mreq_t        req,
  output logic         resp_val,
  input  logic         resp_rdy,
  output mresp_t       resp,
  // to main memory
  output logic         mem_req_val,
  input  logic         mem_req_rdy,
  output mreq_t        mem_req,
  input  logic         mem_resp_val,
  output logic         mem_resp_rdy,
  input  mresp_t       mem_resp,
  output logic [31:0]  partition,
  output logic         reject_evt      // one cycle per rejected request
);
  typedef enum logic [1:0] {S_IDLE, S_FWD, S_WAIT, S_LOCAL} state_e;
  state_e      state;
  mreq_t       r;
  logic        loc_ns;
  logic [31:0] local_word;

  logic in_ctrl, in_secure, allowed;
  assign in_ctrl   = is_ctrl_addr(req.addr);
  assign in_secure = (req.addr >= partition);
  assign allowed   = !in_secure || req.ns;

  assign req_rdy = (state == S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      partition  <= PARTITION_RESET;
      r          <= '0;
      loc_ns     <= 1'b0;
      local_word <= '0;
      reject_evt <= 1'b0;
    end else begin
      reject_evt <= 1'b0;
      case (state)
        S_IDLE: if (req_val) begin
          r <= req;
          if (in_ctrl) begin
            loc_ns <= 1'b0;
            if (req.addr[31:2] == ADDR_PARTITION[31:2]) begin
              if (req.typ == MT_WR && req.ns) begin
                partition  <= line_word(req.data, req.addr);
                local_word <= line_word(req.data, req.addr);
              end else begin
                local_word <= partition;
                reject_evt <= (req.typ == MT_WR);
              end
            end else begin
              local_word <= '0;
            end
            state <= S_LOCAL;
          end else if (allowed) begin
            loc_ns <= in_secure;
            state  <= S_FWD;
          end else begin
            loc_ns     <= 1'b1;
            local_word <= '0;
            reject_evt <= 1'b1;
            state      <= S_LOCAL;
          end
        end
        S_FWD:   if (mem_req_rdy) state <= S_WAIT;
        S_WAIT:  if (mem_resp_val && resp_rdy) state <= S_IDLE;
        S_LOCAL: if (resp_rdy) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign mem_req_val  = (state == S_FWD);
  assign mem_req      = r;
  assign mem_resp_rdy = (state == S_WAIT) && resp_rdy;

  always_comb begin
    resp_val    = 1'b0;
    resp.typ    = r.typ;
    resp.opaque = r.opaque;
    resp.ns     = loc_ns;
    resp.data   = '0;
    if (state == S_WAIT) begin
      resp_val  = mem_resp_val;
      resp.data = mem_resp.data;
    end else if (state == S_LOCAL) begin
      resp_val  = 1'b1;
      resp.data = {4{local_word}};
    end
  end

endmodule
