// tb_debug_if: checks the debug port in front of the DMA controller.
//
// A small model of the DMA controller's debug side accepts a command after a
// random wait, answers after a few cycles with a word derived from the command
// and refuses (err) commands whose NS-bit is below its level. Checked: the
// NS-bit attached to each command follows the debug enables; with both enables
// off the command is answered with err and never reaches the DMA side; the
// command fields are passed unchanged; responses and errors come back to the
// debugger.
module tb_debug_if;
  import tz_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic        sec_dbg_en = 0, ns_dbg_en = 0;
  logic        req_val = 0, req_rdy, req_read = 0, resp_val, resp_err;
  logic [31:0] req_src = 0, req_dst = 0, resp_data;
  logic        cmd_val, cmd_rdy, dma_resp_val, dma_resp_rdy, dma_resp_err;
  dma_cmd_t    cmd;
  logic [31:0] dma_resp_data;

  debug_if dut (.*);

  // DMA side model
  logic     level = 1;       // the DMA controller's domain
  int       n_cmd = 0, wait_c = 0, dly = 0;
  logic     busy = 0;
  dma_cmd_t got;
  assign cmd_rdy       = !busy && wait_c == 0;
  assign dma_resp_val  = busy && dly == 0;
  assign dma_resp_data = (got.ns >= level) ? (got.src ^ got.dst ^ {31'b0, got.is_read}) : '0;
  assign dma_resp_err  = !(got.ns >= level);
  always @(posedge clk) begin
    if (rst) begin
      busy <= 0; wait_c <= 2; got <= '0;
    end else if (!busy && cmd_val && cmd_rdy) begin
      busy <= 1; dly <= 3; got <= cmd; n_cmd++;
    end else if (!busy && cmd_val) wait_c <= wait_c - 1;
    else if (busy && dly != 0) dly <= dly - 1;
    else if (dma_resp_val && dma_resp_rdy) begin busy <= 0; wait_c <= $urandom_range(0, 2); end
  end

  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got_v, logic [31:0] exp);
    checks++;
    if (got_v !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got_v, exp);
    end
  endtask

  task automatic op(logic rd, logic [31:0] s, logic [31:0] d, output logic [31:0] data,
                    output logic err);
    @(negedge clk);
    req_val = 1; req_read = rd; req_src = s; req_dst = d;
    do @(posedge clk); while (!req_rdy);
    @(negedge clk) req_val = 0;
    while (!resp_val) @(posedge clk);
    data = resp_data; err = resp_err;
  endtask

  initial begin
    logic [31:0] d;
    logic        e;
    int          c0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    for (int k = 0; k < 40; k++) begin
      logic [31:0] s, t;
      logic rd;
      s  = $urandom; t = $urandom; rd = 1'($urandom);
      sec_dbg_en = 1'($urandom);
      ns_dbg_en  = 1'($urandom);
      level      = 1'($urandom);
      c0 = n_cmd;
      op(rd, s, t, d, e);
      if (!sec_dbg_en && !ns_dbg_en) begin
        check("disabled: err", {31'b0, e}, 32'd1);
        check("disabled: no command", 32'(n_cmd - c0), 32'd0);
      end else begin
        check("one command", 32'(n_cmd - c0), 32'd1);
        check("command NS-bit", {31'b0, got.ns}, {31'b0, sec_dbg_en});
        check("command src", got.src, s);
        check("command dst", got.dst, t);
        check("command kind", {31'b0, got.is_read}, {31'b0, rd});
        check("err passed back", {31'b0, e}, {31'b0, !(sec_dbg_en >= level)});
        check("data passed back", d, (sec_dbg_en >= level) ? (s ^ t ^ {31'b0, rd}) : 32'd0);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
