// rff_tb: checks the Razor flip-flop model.
// D changing in the low phase is captured at the rising edge with no error;
// a transition during the high phase passes to Q (latch open) and raises a
// sticky error; the error survives until a rising edge with rollback high;
// a glitch that returns to the old value during the high phase is flagged;
// Q holds during the low phase; the detector pulse width (0.2 ns) sets a
// small window before the rising edge that is also flagged.
module rff_tb;
  timeunit 1ns;
  timeprecision 1ps;
  logic clk = 1'b0, rst_n = 1'b0, d = 1'b0, rollback = 1'b0;
  logic q, err;
  int checks = 0, failures = 0;

  rff dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000;
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
    @(negedge clk);
    chk(err, 0, "err after reset");
    // timely data: change in low phase
    d = 1; #1; chk(q, 0, "q holds in low phase");
    @(posedge clk); #1; chk(q, 1, "q after edge"); chk(err, 0, "no error for timely d");
    @(negedge clk); d = 0; #1; chk(q, 1, "q holds while low");
    @(posedge clk); #1; chk(q, 0, "q after second edge"); chk(err, 0, "still no error");
    // late transition in the high phase
    #1 d = 1; #1; chk(q, 1, "late value reaches q"); chk(err, 1, "late transition flagged");
    @(negedge clk); #1; chk(err, 1, "error sticky in low phase");
    @(posedge clk); #1; chk(err, 1, "error sticky without rollback");
    // rollback clears at the next rising edge
    @(negedge clk); rollback = 1;
    @(posedge clk); #1; rollback = 0; chk(err, 0, "rollback clears error");
    // glitch returning to old value within the high phase
    @(negedge clk); @(posedge clk); #1 d = ~d; #1 d = ~d; #1;
    chk(err, 1, "glitch flagged");
    @(negedge clk); rollback = 1; @(posedge clk); #1 rollback = 0;
    chk(err, 0, "cleared again");
    // low-phase glitch is not an error
    @(negedge clk); #1 d = ~d; #1 d = ~d;
    @(posedge clk); #1; chk(err, 0, "low-phase glitch not flagged");
    // a transition just before the rising edge, inside the pulse width, is
    // flagged; one well before it is not
    @(negedge clk); #4.9 d = ~d;
    @(posedge clk); #1; chk(err, 1, "transition within pulse width of the edge flagged");
    @(negedge clk); rollback = 1; @(posedge clk); #1 rollback = 0;
    chk(err, 0, "cleared a third time");
    @(negedge clk); #4.5 d = ~d;
    @(posedge clk); #1; chk(err, 0, "transition 0.5 ns before the edge not flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
