// Shared testbench scaffolding: clock, reset, check counters, watchdog and
// the closing TB_RESULT line.  The including module defines WATCHDOG_NS.
logic clk = 1'b0, rst = 1'b1, ce = 1'b1;
always #5 clk = ~clk;
int checks = 0, failures = 0;

task automatic check(input bit ok, input string msg);
  checks++;
  if (!ok) begin
    failures++;
    if (failures <= 10) $display("FAIL @%0t: %s", $time, msg);
  end
endtask

task automatic finish_tb();
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
endtask

task automatic reset_dut();
  rst = 1'b1;
  repeat (3) @(posedge clk);
  @(negedge clk) rst = 1'b0;
endtask

initial begin
  #(WATCHDOG_NS);
  $display("watchdog expired");
  failures++;
  finish_tb();
end
