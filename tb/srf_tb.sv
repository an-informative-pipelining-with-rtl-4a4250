// srf_tb: pushes a random pixel stream into a small SRF (MAX_X = 8, R = 4)
// and checks every window against the stream for two row lengths, including
// the windows seen just after the write pointer wraps.
module srf_tb;
  import rzla_pkg::*;
  localparam int MAX_X = 8;
  localparam int R     = 4;
  localparam int DEPTH = 2*MAX_X + 3 + R;
  localparam int AW    = $clog2(DEPTH);

  logic clk = 1'b0, we = 1'b0;
  logic [AW-1:0] waddr = '0, head = '0;
  pix_t wdata = '0;
  logic [CRF_W-1:0] x_dim = 16'd8;
  pix_t win [3][3];
  int checks = 0, failures = 0;

  srf #(.MAX_X(MAX_X), .R(R)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pix_t stream [$];

  task automatic run(input int xd, input int n);
    int slot;
    stream.delete();
    x_dim = 16'(xd);
    slot = 0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(slot); wdata = 8'($urandom);
      stream.push_back(wdata);
      @(negedge clk);
      we = 0; head = AW'(slot);
      slot = (slot + 1) % DEPTH;
      #1;
      if (i >= 2*xd + 2) begin
        for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) begin
          pix_t exp;
          exp = stream[i - (2-r)*xd - (2-c)];
          checks++;
          if (win[r][c] !== exp) begin
            failures++;
            $display("x=%0d push %0d win[%0d][%0d] got %h exp %h", xd, i, r, c, win[r][c], exp);
          end
        end
      end
    end
  endtask

  initial begin
    run(8, 80);
    run(5, 60);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
