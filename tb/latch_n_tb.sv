// latch_n_tb: the negative-phase latch is transparent while clk is low and
// holds its value through the whole high phase.
module latch_n_tb;
  logic clk = 1'b0;
  logic [7:0] d = '0, q;
  int checks = 0, failures = 0;

  latch_n #(.WIDTH(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] held;
    for (int i = 0; i < 50; i++) begin
      @(negedge clk); #1;
      d = 8'($urandom); #1;
      checks++; if (q !== d) begin failures++; $display("not transparent in low phase"); end
      d = 8'($urandom); #1;
      checks++; if (q !== d) begin failures++; $display("not following in low phase"); end
      held = d;
      @(posedge clk); #1;
      d = 8'($urandom); #1;
      checks++; if (q !== held) begin failures++; $display("not holding in high phase"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
