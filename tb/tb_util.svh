// Helpers shared by the unit testbenches. The including module declares clk, checks, failures,
// and, when it uses a memory subsystem, host_req/host_rsp: a user port the testbench owns.

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
