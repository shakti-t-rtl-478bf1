// Check counters and the pass/fail report shared by the testbenches.
int checks = 0;
int failures = 0;
task automatic check(bit ok, string what);
  checks++;
  if (!ok) begin
    failures++;
    $display("FAIL: %s", what);
  end
endtask
task automatic report();
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
endtask
