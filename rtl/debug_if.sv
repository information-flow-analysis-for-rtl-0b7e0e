// debug_if: a simple debug port that drives the DMA controller.
//
// An external debugger issues two kinds of command: a DMA copy (source and
// destination line addresses) and a memory read (the word at the source
// address, used to check that a copy worked). The interface tags each command
// with its own NS-bit, taken from two debug-enable inputs: with secure debug
// enabled the commands are secure (NS=1); with only normal-world debug
// enabled they are normal (NS=0); with neither, the command is refused here
// and answered with err set. The NS-bit then decides at the DMA controller's
// checker what the debugger may reach.
//
// One command at a time: a command is accepted when none is outstanding, held
// in a register until the DMA controller takes it, and its response is passed
// back (registered) to the debugger.
//
// That the debug interface feeds the DMA controller, issues copy and read
// commands and carries an NS-bit follows the reference design. Deriving the
// NS-bit from secure and normal debug enables is this design's choice, modelled
// on the separate secure and normal-world debug permissions of TrustZone.
module debug_if
  import tz_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         sec_dbg_en,     // secure-world debug enabled
  input  logic         ns_dbg_en,      // normal-world debug enabled
  // debugger side
  input  logic         req_val,
  output logic         req_rdy,
  input  logic         req_read,       // 1: read word at src, 0: copy src->dst
  input  logic [31:0]  req_src,
  input  logic [31:0]  req_dst,
  output logic         resp_val,
  output logic [31:0]  resp_data,
  output logic         resp_err,
  // DMA controller side
  output logic         cmd_val,
  input  logic         cmd_rdy,
  output dma_cmd_t     cmd,
  input  logic         dma_resp_val,
  output logic         dma_resp_rdy,
  input  logic [31:0]  dma_resp_data,
  input  logic         dma_resp_err
);
  typedef enum logic [1:0] {S_IDLE, S_CMD, S_WAIT} state_e;
  state_e state;

  assign req_rdy = (state == S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      cmd       <= '0;
      resp_val  <= 1'b0;
      resp_data <= '0;
      resp_err  <= 1'b0;
    end else begin
      resp_val <= 1'b0;
      case (state)
        S_IDLE: if (req_val) begin
          if (sec_dbg_en || ns_dbg_en) begin
            cmd   <= '{is_read: req_read, src: req_src, dst: req_dst, ns: sec_dbg_en};
            state <= S_CMD;
          end else begin
            resp_val  <= 1'b1;
            resp_data <= '0;
            resp_err  <= 1'b1;
          end
        end
        S_CMD: if (cmd_rdy) state <= S_WAIT;
        S_WAIT: if (dma_resp_val) begin
          resp_val  <= 1'b1;
          resp_data <= dma_resp_data;
          resp_err  <= dma_resp_err;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign cmd_val      = (state == S_CMD);
  assign dma_resp_rdy = (state == S_WAIT);

endmodule
