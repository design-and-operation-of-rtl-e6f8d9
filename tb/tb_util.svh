// Shared testbench helpers: the check and failure counters and the
// closing result line.
int checks = 0;
int failures = 0;

task automatic check(input bit cond, input string msg);
  checks++;
  if (!cond) begin
    failures++;
    $display("FAIL: %s", msg);
  end
endtask

task automatic finish_tb();
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
endtask

