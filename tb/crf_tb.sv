// crf_tb: reset values, writes to each register, and that a write to one
// register leaves the others alone.
module crf_tb;
  import rzla_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [1:0] addr = '0;
  logic [CRF_W-1:0] wdata = '0;
  crf_t cfg;
  int checks = 0, failures = 0;

  crf dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    int ex, ey, et;
    @(negedge clk); @(negedge clk); rst_n = 1;
    chk(cfg.x_dim, 64, "reset x"); chk(cfg.y_dim, 64, "reset y"); chk(cfg.threshold, 128, "reset thr");
    ex = 64; ey = 64; et = 128;
    for (int i = 0; i < 40; i++) begin
      int a, v;
      a = int'($urandom % 3); v = int'($urandom % 65536);
      @(negedge clk); we = 1; addr = 2'(a); wdata = 16'(v);
      @(negedge clk); we = 0;
      case (a) 0: ex = v; 1: ey = v; default: et = v; endcase
      chk(cfg.x_dim, ex, "x"); chk(cfg.y_dim, ey, "y"); chk(cfg.threshold, et, "thr");
    end
    // unmapped address 3 changes nothing
    @(negedge clk); we = 1; addr = 2'd3; wdata = 16'h1234;
    @(negedge clk); we = 0;
    chk(cfg.x_dim, ex, "x after addr 3"); chk(cfg.y_dim, ey, "y after addr 3"); chk(cfg.threshold, et, "thr after addr 3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
