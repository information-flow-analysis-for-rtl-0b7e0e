// tb_main_memory: checks the line memory behind the memory controller.
//
// Lines are written through the load port and through strobed write requests,
// read back and compared with a reference array kept in the testbench. The
// number of cycles between a request being accepted and its response is
// checked against LATENCY, and the port must refuse a second request while
// one is in progress.
module tb_main_memory;
  import tz_pkg::*;

  localparam int unsigned MEM_BYTES = 4096;
  localparam int unsigned LATENCY   = 4;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic   req_val = 0, req_rdy, resp_val, resp_rdy = 0;
  mreq_t  req = '0;
  mresp_t resp;
  logic        init_we = 0;
  logic [31:0] init_addr = 0, init_data = 0;

  main_memory #(.MEM_BYTES(MEM_BYTES), .LATENCY(LATENCY)) dut (.*);

  int checks = 0, failures = 0;
  logic [LINE_W-1:0] ref_mem [MEM_BYTES / 16];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // One request; returns the response and the latency in cycles.
  task automatic access(mtype_e t, logic [31:0] a, logic [127:0] d, logic [15:0] s,
                        logic [3:0] opq, output mresp_t rsp, output int lat);
    int t0;
    @(negedge clk);
    req_val = 1; req.typ = t; req.addr = a; req.data = d; req.strb = s;
    req.opaque = opq; req.ns = a[12];
    do @(posedge clk); while (!req_rdy);
    t0 = $time;
    @(negedge clk);
    req_val = 0;
    // the port must refuse a new request while busy
    checks++;
    if (req_rdy) begin failures++; $display("FAIL accepted a request while busy"); end
    resp_rdy = 1;
    do @(posedge clk); while (!resp_val);
    lat = int'(($time - t0) / 10);
    rsp = resp;
    @(negedge clk);
    resp_rdy = 0;
  endtask

  initial begin
    mresp_t rsp;
    int lat;
    logic [127:0] d;
    logic [15:0]  s;
    logic [31:0]  a;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // fill the first 64 lines through the load port
    for (int l = 0; l < 64; l++)
      for (int w = 0; w < 4; w++) begin
        @(negedge clk);
        init_we = 1; init_addr = 32'(l * 16 + w * 4); init_data = $urandom;
        ref_mem[l][w*32 +: 32] = init_data;
      end
    @(negedge clk) init_we = 0;
    for (int l = 0; l < 64; l += 7) begin
      access(MT_RD, 32'(l * 16 + 4), '0, '0, 4'(l), rsp, lat);
      check("load-port read", rsp.data, ref_mem[l]);
      check("latency", 128'(lat), 128'(LATENCY));
      check("opaque echoed", {124'b0, rsp.opaque}, {124'b0, l[3:0]});
    end
    // strobed writes and read-back
    for (int n = 0; n < 40; n++) begin
      a = 32'($urandom_range(0, 63) * 16);
      d = {$urandom, $urandom, $urandom, $urandom};
      s = 16'($urandom);
      access(MT_WR, a, d, s, 4'h3, rsp, lat);
      check("write latency", 128'(lat), 128'(LATENCY));
      ref_mem[a[11:4]] = merge_line(ref_mem[a[11:4]], d, s);
      a = 32'($urandom_range(0, 63) * 16);
      access(MT_RD, a, '0, '0, 4'h5, rsp, lat);
      check("read after write", rsp.data, ref_mem[a[11:4]]);
      check("ns echoed", 128'(rsp.ns), 128'(a[12]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
