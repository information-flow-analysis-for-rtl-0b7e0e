// main_memory: the simulated main memory of the system.
//
// One request port, blocking: a request is accepted only when no earlier
// request is in progress, and its response appears LATENCY cycles later.
// Instructions and data share the one address space. The array holds
// MEM_BYTES bytes as 128-bit lines; a write merges the request's data into the
// line under its byte strobe, a read returns the whole line. Addresses wrap
// modulo MEM_BYTES.
//
// A second, word-wide load port (init_*) writes the array directly; it stands
// in for whatever loads a program image before the cores leave reset.
//
// The single blocking port follows the reference design; the size, latency and
// load port are this design's choices.
module main_memory
  import tz_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 65536,
  parameter int unsigned LATENCY   = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         req_val,
  output logic         req_rdy,
  input  mreq_t        req,
  output logic         resp_val,
  input  logic         resp_rdy,
  output mresp_t       resp,
  input  logic         init_we,
  input  logic [31:0]  init_addr,   // byte address of a 32-bit word
  input  logic [31:0]  init_data
);
  localparam int unsigned LINES = MEM_BYTES / 16;
  localparam int unsigned LIDX_W = $clog2(LINES);

  logic [LINE_W-1:0] mem [LINES];

  typedef enum logic [1:0] {S_IDLE, S_BUSY, S_RESP} state_e;
  state_e            state;
  logic [7:0]        cnt;
  mreq_t             r;
  logic [LIDX_W-1:0] lidx;

  assign lidx    = r.addr[4 +: LIDX_W];
  assign req_rdy = (state == S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      cnt   <= '0;
      r     <= '0;
    end else begin
      case (state)
        S_IDLE: if (req_val) begin
          r     <= req;
          cnt   <= 8'(LATENCY > 1 ? LATENCY - 1 : 0);
          state <= (LATENCY > 1) ? S_BUSY : S_RESP;
        end
        S_BUSY: begin
          if (cnt <= 8'd1) state <= S_RESP;
          cnt <= cnt - 8'd1;
        end
        S_RESP: if (resp_rdy) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Write the line when the response is handed over.
  always_ff @(posedge clk) begin
    if (state == S_RESP && resp_rdy && r.typ == MT_WR)
      mem[lidx] <= merge_line(mem[lidx], r.data, r.strb);
    else if (init_we)
      mem[init_addr[4 +: LIDX_W]] <= merge_line(mem[init_addr[4 +: LIDX_W]], {4{init_data}},
                                                16'h000F << {init_addr[3:2], 2'b00});
  end

  assign resp_val    = (state == S_RESP);
  assign resp.typ    = r.typ;
  assign resp.opaque = r.opaque;
  assign resp.ns     = r.ns;
  assign resp.data   = (r.typ == MT_RD) ? mem[lidx] : '0;

endmodule
