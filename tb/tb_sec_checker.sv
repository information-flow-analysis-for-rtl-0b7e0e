// tb_sec_checker: exhaustive test of the security-level checker.
//
// Every combination of request valid, request NS-bit, checker level and
// downstream ready is applied. A request passes when its NS-bit is at least the
// level; otherwise it is rejected and consumed (in_rdy high) so that it cannot
// block the requester.
module tb_sec_checker;
  logic in_val, in_rdy, in_ns, level, pass_val, pass_rdy, reject;
  int checks = 0, failures = 0;

  sec_checker dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic ok;
      {in_val, in_ns, level, pass_rdy} = 4'(v);
      #1;
      ok = in_ns || !level;
      checks += 3;
      if (pass_val !== (in_val && ok)) begin
        failures++; $display("FAIL pass_val v=%b", 4'(v));
      end
      if (reject !== (in_val && !ok)) begin
        failures++; $display("FAIL reject v=%b", 4'(v));
      end
      if (in_rdy !== (ok ? pass_rdy : 1'b1)) begin
        failures++; $display("FAIL in_rdy v=%b", 4'(v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
