// Shared scoreboard for the self-checking test benches: a check counter,
// a failure counter, and a watchdog that ends the run after WATCHDOG cycles.
int checks = 0, failures = 0;
task automatic check(input bit ok, input string what);
  checks++;
  if (!ok) begin
    failures++;
    if (failures < 20) $display("FAIL %s", what);
  end
endtask
task automatic finish_tb();
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
endtask
