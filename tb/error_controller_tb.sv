// error_controller_tb: ROLLBACK follows an error by one edge, lasts one
// cycle, is never back to back even for a held error, and is not raised
// while the accelerator is inactive.
module error_controller_tb;
  logic clk = 1'b0, rst_n = 1'b0, active = 1'b0, error = 1'b0;
  logic rollback;
  int checks = 0, failures = 0;

  error_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("%t %s: got %b exp %b", $time, what, got, exp); end
  endtask

  initial begin
    @(negedge clk); @(negedge clk); rst_n = 1;
    @(negedge clk); chk(rollback, 0, "after reset");
    error = 1;
    @(negedge clk); chk(rollback, 0, "inactive: no rollback");
    active = 1; error = 0;
    @(negedge clk); chk(rollback, 0, "no error");
    error = 1;
    @(negedge clk); chk(rollback, 1, "error -> rollback");
    @(negedge clk); chk(rollback, 0, "held error: not back to back");
    @(negedge clk); chk(rollback, 1, "held error: again after a gap");
    error = 0;
    @(negedge clk); chk(rollback, 0, "low after error gone");
    @(negedge clk); chk(rollback, 0, "stays low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
