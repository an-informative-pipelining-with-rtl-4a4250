// error_or_tree_tb: any single flag (and several at once) shows on error
// exactly two rising edges later; no flag, no error; clear empties the
// synchroniser at the next edge.
module error_or_tree_tb;
  localparam int N = 21;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic [N-1:0] flags = '0;
  logic error;
  int checks = 0, failures = 0;

  error_or_tree #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
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
    @(negedge clk); @(negedge clk); chk(error, 0, "idle");
    for (int b = 0; b < N; b++) begin
      flags = '0; flags[b] = 1'b1;
      @(negedge clk); chk(error, 0, "after one edge");
      flags = '0;
      @(negedge clk); chk(error, 1, "after two edges");
      @(negedge clk); chk(error, 0, "pulse of one cycle");
      @(negedge clk); chk(error, 0, "stays low");
    end
    // several flags, held; clear drops both stages
    flags = 21'h100401;
    @(negedge clk); @(negedge clk); chk(error, 1, "multiple flags");
    flags = '0; clear = 1;
    @(negedge clk); clear = 0; chk(error, 0, "clear");
    @(negedge clk); chk(error, 0, "first stage cleared too");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
