// Shared testbench bookkeeping: included inside a testbench module.
// Provides the check counters, a check task and the final report.
int checks = 0;
int failures = 0;

task automatic check(input bit ok, input string what);
  checks++;
  if (!ok) begin
    failures++;
    $display("FAIL: %s", what);
  end
endtask

task automatic report_and_finish();
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
endtask
