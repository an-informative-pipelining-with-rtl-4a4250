// loop_controller: statically scheduled controller of the Sobel loop, with
// check-pointing and rollback.
//
// The loop is modulo scheduled with an initiation interval of one: every
// cycle one pixel read is issued to local memory (raster order, address =
// pixel index), and the pixel that arrives one cycle later is pushed into
// the SRF. For each push the controller knows the raster position (col,
// row) of the newest pixel and sends a valid bit and output address down a
// PIPE_LAT-deep shift register alongside the datapath; a window is valid
// when col >= 2 and row >= 2, and its result is the edge value of the
// window centre, stored at OUT_BASE + pixel - x_dim - 1.
//
// Check-pointing: the controller's own state (next pixel index, col, row,
// SRF slot) is kept in an R-deep history, one entry per push. On ROLLBACK
// it restores the state of R pushes ago, discards the read in flight and
// the valid bits in the pipeline, and re-fills the history with the
// restored state. Reverting R pushes covers the 3 pipeline stages plus the
// store queue (R-3 entries), so every result not yet in memory is
// recomputed; re-writing results that were already correct is harmless.
//
// start (one cycle, while idle) latches the pixel count x_dim*y_dim; done
// pulses for one cycle when every pixel is pushed and the pipeline and
// store queue are empty. The initiation interval and the history-based
// check-point are this design's choices; reverting to the state "R cycles
// earlier" follows the accelerator's recovery scheme.
module loop_controller
  import rzla_pkg::*;
#(
  parameter int MAX_X = 64,
  parameter int MAX_Y = 64,
  parameter int R     = 8,
  localparam int NPIX     = MAX_X * MAX_Y,
  localparam int AW       = $clog2(2 * NPIX),
  localparam int SRF_D    = 2*MAX_X + 3 + R,
  localparam int SW       = $clog2(SRF_D),
  localparam int PW       = $clog2(NPIX + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [CRF_W-1:0] x_dim,
  input  logic [CRF_W-1:0] y_dim,
  input  logic             rollback,
  input  logic             queue_empty,
  output logic             busy,
  output logic             done,
  // local memory read
  output logic             mem_re,
  output logic [AW-1:0]    mem_raddr,
  // SRF
  output logic             srf_we,
  output logic [SW-1:0]    srf_waddr,
  output logic [SW-1:0]    srf_head,
  // result stream into the store queue
  output logic             out_valid,
  output logic [AW-1:0]    out_addr
);
  localparam logic [AW-1:0] OUT_BASE = AW'(NPIX);

  typedef struct packed {
    logic [PW-1:0]    pix;   // index of the next pixel to push
    logic [CRF_W-1:0] col;   // its column
    logic [CRF_W-1:0] row;   // its row
    logic [SW-1:0]    slot;  // SRF slot it goes to
  } lc_state_t;

  typedef struct packed {
    logic          valid;
    logic [AW-1:0] addr;
  } meta_t;

  lc_state_t        s;
  lc_state_t        hist [R];
  logic [PW-1:0]    rd_idx;
  logic             rd_vld;
  logic [PW-1:0]    npix;
  meta_t            meta [PIPE_LAT];
  logic             pipe_empty;

  localparam lc_state_t S_INIT = '0;

  assign mem_re    = busy && !rollback && (rd_idx < npix);
  assign mem_raddr = AW'(rd_idx);
  assign srf_we    = busy && !rollback && rd_vld;
  assign srf_waddr = s.slot;

  always_comb begin
    pipe_empty = 1'b1;
    for (int i = 0; i < PIPE_LAT; i++) if (meta[i].valid) pipe_empty = 1'b0;
  end

  // newest pixel is in the slot before s.slot
  assign srf_head = (s.slot == '0) ? SW'(SRF_D - 1) : s.slot - SW'(1);

  assign out_valid = meta[PIPE_LAT-1].valid;
  assign out_addr  = meta[PIPE_LAT-1].addr;

  function automatic lc_state_t advance(input lc_state_t st, input logic [CRF_W-1:0] xd);
    lc_state_t n;
    n.pix  = st.pix + PW'(1);
    n.slot = (st.slot == SW'(SRF_D - 1)) ? '0 : st.slot + SW'(1);
    if (st.col == xd - 16'd1) begin
      n.col = '0;
      n.row = st.row + 16'd1;
    end else begin
      n.col = st.col + 16'd1;
      n.row = st.row;
    end
    return n;
  endfunction

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (!rst_n) begin
      busy   <= 1'b0;
      rd_vld <= 1'b0;
      s      <= S_INIT;
      rd_idx <= '0;
      npix   <= '0;
      for (int i = 0; i < PIPE_LAT; i++) meta[i].valid <= 1'b0;
    end else if (!busy) begin
      if (start) begin
        busy   <= 1'b1;
        s      <= S_INIT;
        rd_idx <= '0;
        rd_vld <= 1'b0;
        npix   <= PW'(x_dim * y_dim);
        for (int i = 0; i < R; i++) hist[i] <= S_INIT;
      end
    end else if (rollback) begin
      // revert to the state R pushes earlier and flush work in flight
      s      <= hist[R-1];
      rd_idx <= hist[R-1].pix;
      rd_vld <= 1'b0;
      for (int i = 0; i < R; i++) hist[i] <= hist[R-1];
      for (int i = 0; i < PIPE_LAT; i++) meta[i].valid <= 1'b0;
    end else begin
      // read issue
      rd_vld <= mem_re;
      if (mem_re) rd_idx <= rd_idx + PW'(1);
      // push and check-point
      meta[0].valid <= 1'b0;
      if (srf_we) begin
        s       <= advance(s, x_dim);
        hist[0] <= s;
        for (int i = 1; i < R; i++) hist[i] <= hist[i-1];
        meta[0].valid <= (s.col >= 16'd2) && (s.row >= 16'd2);
        meta[0].addr  <= OUT_BASE + AW'(s.pix) - AW'(x_dim) - AW'(1);
      end
      for (int i = 1; i < PIPE_LAT; i++) meta[i] <= meta[i-1];
      // completion
      if (s.pix == npix && !rd_vld && pipe_empty && queue_empty) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end
endmodule
