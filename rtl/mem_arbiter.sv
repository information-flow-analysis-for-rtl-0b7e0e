// mem_arbiter: memory request arbiter between the shared L2 cache (port 0)
// and the DMA controller (port 1).
//
// The main memory serves one request at a time, so the arbiter grants one
// request, passes it on, and waits for its response before granting another.
// Arbitration is privilege based, like the network's: a secure request
// (NS=1) wins over a normal one; between requests of the same level the L2
// cache wins. The response goes back to the port that was granted.
//
// The arbiter's place in the system is the reference design's; its policy and
// handshake are this design's choices.
module mem_arbiter
  import tz_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic [1:0]   in_req_val,
  output logic [1:0]   in_req_rdy,
  input  mreq_t        in_req [2],
  output logic [1:0]   in_resp_val,
  input  logic [1:0]   in_resp_rdy,
  output mresp_t       in_resp,
  output logic         out_req_val,
  input  logic         out_req_rdy,
  output mreq_t        out_req,
  input  logic         out_resp_val,
  output logic         out_resp_rdy,
  input  mresp_t       out_resp,
  output logic         conflict_evt   // both ports asked in the same cycle
);
  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT} state_e;
  state_e state;
  logic   owner;
  logic   pick;

  always_comb begin
    if (in_req_val[0] && in_req_val[1])
      pick = (in_req[1].ns && !in_req[0].ns) ? 1'b1 : 1'b0;
    else
      pick = in_req_val[1] && !in_req_val[0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      owner <= 1'b0;
    end else begin
      case (state)
        S_IDLE: if (|in_req_val) begin
          owner <= pick;
          state <= S_REQ;
        end
        S_REQ:  if (out_req_val && out_req_rdy) state <= S_WAIT;
        S_WAIT: if (out_resp_val && out_resp_rdy) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign conflict_evt = (state == S_IDLE) && (&in_req_val);

  assign out_req_val = (state == S_REQ) && in_req_val[owner];
  assign out_req     = in_req[owner];
  always_comb begin
    in_req_rdy        = '0;
    in_req_rdy[owner] = (state == S_REQ) && out_req_rdy;
    in_resp_val        = '0;
    in_resp_val[owner] = (state == S_WAIT) && out_resp_val;
  end
  assign in_resp      = out_resp;
  assign out_resp_rdy = (state == S_WAIT) && in_resp_rdy[owner];

endmodule
