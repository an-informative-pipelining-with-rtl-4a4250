// rzla_top_full_tb: one complete run of the accelerator at its default size
// (64 x 64 image, R = 8). Loads a random image with vertical steps, runs it
// with two timing errors emulated by late transitions forced onto RFF
// inputs, and compares the whole edge map with a Sobel reference computed
// here; border pixels must keep their preset value.
module rzla_top_full_tb;
  import rzla_pkg::*;

  localparam int X = 64;
  localparam int Y = 64;
  localparam int NPIX = X * Y;
  localparam int AW = $clog2(2 * NPIX);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic busy, done, error, rollback;
  logic crf_we = 1'b0;
  logic [1:0] crf_addr = '0;
  logic [CRF_W-1:0] crf_wdata = '0;
  logic [AW-1:0] host_addr = '0;
  logic host_we = 1'b0;
  pix_t host_wdata = '0;
  pix_t host_rdata;

  rzla_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_rollback = 0;
  always @(posedge clk) if (rst_n && rollback) n_rollback++;

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pix_t img [Y][X];

  function automatic pix_t sobel_ref(input int r, input int c, input int thr);
    int p [3][3];
    int gx, gy, mag;
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) p[i][j] = int'(img[r-1+i][c-1+j]);
    gx = (p[0][2] + 2*p[1][2] + p[2][2]) - (p[0][0] + 2*p[1][0] + p[2][0]);
    gy = (p[2][0] + 2*p[2][1] + p[2][2]) - (p[0][0] + 2*p[0][1] + p[0][2]);
    mag = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
    return (mag > thr) ? 8'hFF : 8'h00;
  endfunction

  initial begin
    int thr, errs, n_edges;
    pix_t v, exp;
    thr = 180; errs = 0; n_edges = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < Y; r++) for (int c = 0; c < X; c++) begin
      img[r][c] = ($urandom % 8 == 0) ? 8'($urandom) : 8'(((c / 8) * 37 + (r / 16) * 20) % 256);
      @(negedge clk); host_we = 1; host_addr = AW'(r*X + c); host_wdata = img[r][c];
      @(negedge clk); host_addr = AW'(NPIX + r*X + c); host_wdata = 8'h5A;
    end
    @(negedge clk); host_we = 0;
    @(negedge clk); crf_we = 1; crf_addr = 2'(CRF_THRESH); crf_wdata = 16'(thr);
    @(negedge clk); crf_we = 0;   // X and Y keep their reset values, 64 x 64
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    // two late transitions, one on each RFF stage
    repeat (1000) @(posedge clk);
    #2 force dut.u_dp.u_rff2.d = ~dut.u_dp.is_edge;
    @(negedge clk); #1 release dut.u_dp.u_rff2.d;
    repeat (2000) @(posedge clk);
    #2 force dut.u_dp.g_rff1[7].u_rff.d = ~dut.u_dp.ax[7];
    @(negedge clk); #1 release dut.u_dp.g_rff1[7].u_rff.d;
    while (!done) @(posedge clk);
    checks++;
    if (n_rollback != 2) begin failures++; $display("expected 2 rollbacks, saw %0d", n_rollback); end
    for (int r = 0; r < Y; r++) for (int c = 0; c < X; c++) begin
      @(negedge clk); host_addr = AW'(NPIX + r*X + c);
      @(negedge clk); v = host_rdata;
      exp = (r == 0 || c == 0 || r == Y-1 || c == X-1) ? 8'h5A : sobel_ref(r, c, thr);
      if (exp == 8'hFF) n_edges++;
      checks++;
      if (v !== exp) begin
        failures++; errs++;
        if (errs < 5) $display("r=%0d c=%0d got %02h exp %02h", r, c, v, exp);
      end
    end
    checks++;
    if (n_edges == 0) begin failures++; $display("image has no edges"); end
    $display("64x64 run: %0d edge pixels, %0d rollbacks, %0d mismatches", n_edges, n_rollback, errs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
