// loop_controller_tb: a small controller (MAX_X = MAX_Y = 8, R = 8) runs
// 8 x 6 and 5 x 5 images with random rollbacks. Checked against a model
// built here: reads are issued in pixel order and each read pixel is pushed
// one cycle later into slot pixel mod SRF depth; on rollback the next read
// restarts at the pixel of R pushes before (or at the last restore point);
// out_valid/out_addr appear in the third cycle after each push (PIPE_LAT) with valid =
// (col >= 2 && row >= 2) and address NPIX + pixel - X - 1; every pixel is
// pushed; done pulses once when the work is finished.
module loop_controller_tb;
  import rzla_pkg::*;
  localparam int MAX_X = 8, MAX_Y = 8, R = 8;
  localparam int NPIX = MAX_X * MAX_Y;
  localparam int AW = $clog2(2 * NPIX);
  localparam int SRF_D = 2*MAX_X + 3 + R;
  localparam int SW = $clog2(SRF_D);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, rollback = 1'b0, queue_empty = 1'b1;
  logic [CRF_W-1:0] x_dim = '0, y_dim = '0;
  logic busy, done, mem_re, srf_we, out_valid;
  logic [AW-1:0] mem_raddr, out_addr;
  logic [SW-1:0] srf_waddr, srf_head;
  int checks = 0, failures = 0;

  loop_controller #(.MAX_X(MAX_X), .MAX_Y(MAX_Y), .R(R)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("%t %s", $time, what); end
  endtask

  int n_rb = 0;

  task automatic run(input int X, input int Y, input int rb_every);
    int hist [R];
    int next_rd, rd_inflight, next_push, max_pushed, dones;
    int meta_v [3], meta_a [3];
    bit pushed_all;
    x_dim = 16'(X); y_dim = 16'(Y);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    for (int i = 0; i < R; i++) hist[i] = 0;
    next_rd = 0; rd_inflight = -1; next_push = 0; max_pushed = -1; dones = 0;
    meta_v = '{0, 0, 0};
    for (int t = 0; t < 20 * X * Y && busy; t++) begin
      #1;
      rollback = (rb_every > 0) && ($urandom % rb_every == 0) && t > 2;
      #1;
      // outputs in this cycle
      chk(mem_re == (!rollback && next_rd < X*Y), "mem_re");
      if (mem_re) chk(int'(mem_raddr) == next_rd, "read address");
      chk(srf_we == (!rollback && rd_inflight >= 0), "srf_we");
      if (srf_we) begin
        chk(rd_inflight == next_push, "pushed pixel is the one read");
        chk(int'(srf_waddr) == next_push % SRF_D, "srf slot");
      end
      chk(out_valid == bit'(meta_v[2]), "out_valid");
      if (out_valid) chk(int'(out_addr) == meta_a[2], "out_addr");
      // model update at the edge
      @(posedge clk);
      if (rollback) begin
        n_rb++;
        next_push = hist[R-1];
        for (int i = 0; i < R; i++) hist[i] = next_push;
        next_rd = next_push; rd_inflight = -1;
        meta_v = '{0, 0, 0};
      end else begin
        meta_v[2] = meta_v[1]; meta_a[2] = meta_a[1];
        meta_v[1] = meta_v[0]; meta_a[1] = meta_a[0];
        meta_v[0] = 0;
        if (srf_we) begin
          for (int i = R-1; i > 0; i--) hist[i] = hist[i-1];
          hist[0] = next_push;
          meta_v[0] = int'((next_push % X) >= 2 && (next_push / X) >= 2);
          meta_a[0] = NPIX + next_push - X - 1;
          if (next_push > max_pushed) max_pushed = next_push;
          next_push++;
        end
        if (mem_re) begin rd_inflight = next_rd; next_rd++; end
        else rd_inflight = -1;
      end
      @(negedge clk);
      rollback = 0;
      if (done) dones++;
    end
    chk(!busy, "run finished");
    chk(max_pushed == X*Y - 1, "all pixels pushed");
    chk(dones == 1, "one done pulse");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(8, 6, 0);
    run(5, 5, 9);
    run(8, 8, 6);
    chk(n_rb > 0, "rollback exercised");
    $display("rollbacks=%0d", n_rb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
