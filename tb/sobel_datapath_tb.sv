// sobel_datapath_tb: feeds a new random window after every rising edge (as
// the SRF flip-flops do) and checks that the edge byte for the window set
// at edge k is present at edge k+3, against a Sobel reference computed here.
// Also checks that no RFF flags an error in normal operation (the
// negative-phase latches keep D still in the high phase), that a forced
// late transition is flagged and corrupts the result, and that rollback
// clears the flags.
module sobel_datapath_tb;
  import rzla_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, rollback = 1'b0;
  pix_t win [3][3];
  logic [CRF_W-1:0] threshold = 16'd300;
  pix_t edge_pix;
  logic [20:0] err_flags;
  int checks = 0, failures = 0;

  sobel_datapath dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pix_t ref_edge(input pix_t w [3][3], input int thr);
    int gx, gy, mag;
    gx = (int'(w[0][2]) + 2*int'(w[1][2]) + int'(w[2][2])) - (int'(w[0][0]) + 2*int'(w[1][0]) + int'(w[2][0]));
    gy = (int'(w[2][0]) + 2*int'(w[2][1]) + int'(w[2][2])) - (int'(w[0][0]) + 2*int'(w[0][1]) + int'(w[0][2]));
    mag = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
    return (mag > thr) ? 8'hFF : 8'h00;
  endfunction

  pix_t expq [$];
  int n_edge = 0, n_flat = 0;

  initial begin
    for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) win[r][c] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 600; t++) begin
      pix_t w [3][3];
      @(posedge clk);
      // result of the window set three edges ago
      if (expq.size() == 3) begin
        pix_t e;
        e = expq.pop_front();
        checks++;
        if (edge_pix !== e) begin failures++; $display("t=%0d edge got %h exp %h", t, edge_pix, e); end
        if (e == 8'hFF) n_edge++; else n_flat++;
      end
      checks++;
      if (err_flags !== '0) begin failures++; $display("t=%0d spurious RFF error %h", t, err_flags); end
      // new window, as from flip-flops
      for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) begin
        w[r][c] = ($urandom % 2) ? 8'($urandom) : 8'(r * 60 + c * 30);
        win[r][c] <= w[r][c];
      end
      expq.push_back(ref_edge(w, int'(threshold)));
    end
    checks++; if (n_edge == 0 || n_flat == 0) begin failures++; $display("edge/flat not both seen"); end
    // late transition on the stage-2 RFF
    @(posedge clk); #2 force sobel_datapath_tb.dut.u_rff2.d = ~sobel_datapath_tb.dut.is_edge;
    #1;
    checks++; if (err_flags[20] !== 1'b1) begin failures++; $display("late transition not flagged"); end
    checks++; if (sobel_datapath_tb.dut.s2_q !== ~sobel_datapath_tb.dut.is_edge) begin failures++; $display("late value not through latch"); end
    @(negedge clk); #1 release sobel_datapath_tb.dut.u_rff2.d;
    @(posedge clk); #1;
    checks++; if (err_flags[20] !== 1'b1) begin failures++; $display("error not sticky"); end
    @(negedge clk); rollback = 1;
    @(posedge clk); #1 rollback = 0;
    checks++; if (err_flags !== '0) begin failures++; $display("rollback did not clear"); end
    $display("edges=%0d flat=%0d", n_edge, n_flat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
