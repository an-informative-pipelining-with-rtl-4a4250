// rzla_top_tb: end-to-end test of the Razor loop accelerator.
//
// Runs several images (random pixels, several sizes and thresholds) through
// a reduced-size accelerator (MAX_X = MAX_Y = 16) and compares the edge map
// in local memory with a Sobel reference computed here. Timing errors are
// emulated by forcing a late transition onto an RFF input during the clock
// high phase: the wrong value really reaches the pipeline, so the run only
// passes if detection, ROLLBACK, the flush and the replay all work. Errors
// are placed early (fewer than R pushes done), mid-run, back to back and
// during the drain. Counts each mechanism and fails if one never happened:
// late transition, composite error, rollback, a corrupted result discarded,
// a run without errors at the expected latency X*Y + R + 2.
module rzla_top_tb;
  import rzla_pkg::*;

  localparam int MAX_X = 16;
  localparam int MAX_Y = 16;
  localparam int R     = 8;
  localparam int NPIX  = MAX_X * MAX_Y;
  localparam int AW    = $clog2(2 * NPIX);

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

  rzla_top #(.MAX_X(MAX_X), .MAX_Y(MAX_Y), .R(R)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_late = 0, n_error = 0, n_rollback = 0, n_clean_latency = 0, n_bad_discarded = 0;
  int n_early_rb = 0, n_drain_rb = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n && rollback) n_rollback++;
  always @(posedge clk) if (rst_n && error) n_error++;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pix_t img [MAX_Y][MAX_X];

  task automatic crf_write(input int a, input int v);
    @(negedge clk); crf_we = 1; crf_addr = 2'(a); crf_wdata = 16'(v);
    @(negedge clk); crf_we = 0;
  endtask

  task automatic mem_write(input int a, input int v);
    @(negedge clk); host_we = 1; host_addr = AW'(a); host_wdata = 8'(v);
    @(negedge clk); host_we = 0;
  endtask

  task automatic mem_read(input int a, output pix_t v);
    @(negedge clk); host_addr = AW'(a);
    @(negedge clk); v = host_rdata;
  endtask

  function automatic pix_t sobel_ref(input int r, input int c, input int thr);
    int p [3][3];
    int gx, gy, mag;
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) p[i][j] = int'(img[r-1+i][c-1+j]);
    gx = (p[0][2] + 2*p[1][2] + p[2][2]) - (p[0][0] + 2*p[1][0] + p[2][0]);
    gy = (p[2][0] + 2*p[2][1] + p[2][2]) - (p[0][0] + 2*p[0][1] + p[0][2]);
    mag = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
    return (mag > thr) ? 8'hFF : 8'h00;
  endfunction

  // Emulate a late-arriving transition on an RFF input: invert D during the
  // clock high phase, release it in the low phase.
  task automatic inject(input int which);
    @(posedge clk); #2;
    case (which)
      0: force dut.u_dp.u_rff2.d = ~dut.u_dp.is_edge;
      default: force dut.u_dp.g_rff1[3].u_rff.d = ~dut.u_dp.ax[3];
    endcase
    n_late++;
    @(negedge clk); #1;
    case (which)
      0: release dut.u_dp.u_rff2.d;
      default: release dut.u_dp.g_rff1[3].u_rff.d;
    endcase
  endtask

  // inj_times: cycles after start at which to inject (-1 = none).
  task automatic run_image(input int X, input int Y, input int thr, input int seed,
                           input int inj [4], input int which);
    int s, errs;
    longint t0, t1;
    pix_t v;
    int rb_before;
    s = seed;
    for (int r = 0; r < Y; r++) for (int c = 0; c < X; c++) begin
      // smooth areas with a few steps, plus noise, so both edge and non-edge occur
      img[r][c] = 8'((($urandom(s + r*97 + c) % 4) == 0) ? $urandom % 256 : ((c / 4) * 40) % 256);
    end
    for (int r = 0; r < Y; r++) for (int c = 0; c < X; c++) begin
      mem_write(r*X + c, int'(img[r][c]));
      mem_write(NPIX + r*X + c, 32'h5A);
    end
    crf_write(int'(CRF_XDIM), X);
    crf_write(int'(CRF_YDIM), Y);
    crf_write(int'(CRF_THRESH), thr);
    cur_x = X; cur_thr = thr;
    rb_before = n_rollback;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    t0 = cyc;
    fork
      begin
        for (int k = 0; k < 4; k++) begin
          if (inj[k] >= 0) begin
            while (cyc < t0 + longint'(inj[k])) @(posedge clk);
            if (inj[k] < R) n_early_rb++;
            if (inj[k] > X*Y) n_drain_rb++;
            inject(which);
          end
        end
      end
      begin
        while (!done) @(posedge clk);
        t1 = cyc;
      end
    join
    if (n_rollback == rb_before) begin
      checks++;
      if (t1 - t0 != longint'(X*Y + R + 2)) begin
        failures++;
        $display("latency %0d expected %0d", t1 - t0, X*Y + R + 2);
      end else n_clean_latency++;
    end
    errs = 0;
    for (int r = 0; r < Y; r++) for (int c = 0; c < X; c++) begin
      pix_t exp;
      mem_read(NPIX + r*X + c, v);
      exp = (r == 0 || c == 0 || r == Y-1 || c == X-1) ? 8'h5A : sobel_ref(r, c, thr);
      checks++;
      if (v !== exp) begin
        failures++; errs++;
        if (errs < 5) $display("X=%0d Y=%0d r=%0d c=%0d got %02h exp %02h", X, Y, r, c, v, exp);
      end
    end
    $display("image %0dx%0d thr=%0d: %0d mismatches, rollbacks so far %0d", X, Y, thr, errs, n_rollback);
  endtask

  // Every result entering the store queue is compared with the reference:
  // a wrong one (from an injected error) must never be committed.
  int cur_x = 1, cur_thr = 0;
  always @(posedge clk) begin
    if (rst_n && dut.res_valid) begin
      int idx;
      idx = int'(dut.res_addr) - NPIX;
      if (dut.edge_pix != sobel_ref(idx / cur_x, idx % cur_x, cur_thr)) n_bad_discarded++;
    end
    if (rst_n && dut.wr_en) begin
      int idx;
      idx = int'(dut.wr_addr) - NPIX;
      checks++;
      if (dut.wr_data != sobel_ref(idx / cur_x, idx % cur_x, cur_thr)) begin
        failures++;
        $display("wrong result committed at %0d", idx);
      end
    end
  end

  initial begin
    static int none [4] = '{-1, -1, -1, -1};
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_image(16, 16, 200, 1, none, 0);
    run_image(10, 7, 150, 2, none, 0);
    run_image(16, 16, 200, 3, '{40, 100, 103, -1}, 0);
    run_image(16, 16, 200, 4, '{3, 120, -1, -1}, 1);
    run_image(12, 9, 120, 5, '{110, 115, -1, -1}, 0);   // 108 pixels: both in the drain
    run_image(16, 16, 250, 6, '{60, 61, 200, -1}, 1);
    checks++; if (n_late == 0)     begin failures++; $display("no late transition injected"); end
    checks++; if (n_error == 0)    begin failures++; $display("composite error never seen"); end
    checks++; if (n_rollback == 0) begin failures++; $display("no rollback"); end
    checks++; if (n_early_rb == 0) begin failures++; $display("no rollback before R pushes"); end
    checks++; if (n_drain_rb == 0) begin failures++; $display("no rollback during drain"); end
    checks++; if (n_clean_latency == 0) begin failures++; $display("no clean run timed"); end
    checks++; if (n_bad_discarded == 0) begin failures++; $display("no corrupted result discarded"); end
    $display("late=%0d error_cycles=%0d rollbacks=%0d early=%0d drain=%0d clean=%0d discarded=%0d",
             n_late, n_error, n_rollback, n_early_rb, n_drain_rb, n_clean_latency, n_bad_discarded);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
