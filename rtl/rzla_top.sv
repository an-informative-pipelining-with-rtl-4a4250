// rzla_top: Razor-protected hardware loop accelerator for Sobel edge
// detection.
//
// The host writes the image (8-bit pixels, raster order) into local memory
// from address 0, writes X, Y and the threshold into the CRF and pulses
// start. The loop controller streams one pixel per cycle from memory into
// the shift-register file (SRF); the SRF feeds the 3x3 window by wires to
// the Sobel datapath, whose two stages end in Razor flip-flops (RFF) and are
// split by negative-phase latches. Results go through the store queue and
// are committed to memory at MAX_X*MAX_Y + centre pixel index as 0xFF (edge)
// or 0x00. The outer row and column of the edge map are not written.
//
// Recovery: all RFF error flags are ORed and double-flopped (error_or_tree);
// the error controller then pulses ROLLBACK, which clears the RFF error
// states, flushes the store queue and makes the loop controller and the SRF
// revert R pushes and replay. Latency from a late transition at an RFF to
// ROLLBACK is three rising edges; the store queue (R-3 deep) keeps every
// result that could be affected until then. In the absence of errors an
// X x Y image takes X*Y + R + 2 cycles from start to done.
//
// Host access to local memory (host_addr/we/wdata, host_rdata one cycle
// later) is only honoured while busy is low. error and rollback are brought
// out for the off-chip control and measurement set-up.
// Circuit warnings: the latches in the datapath are intended (pulsed-latch
// Razor flip-flops and negative-phase latches).
module rzla_top
  import rzla_pkg::*;
#(
  parameter int MAX_X = 64,
  parameter int MAX_Y = 64,
  parameter int R     = 8,
  localparam int NPIX = MAX_X * MAX_Y,
  localparam int AW   = $clog2(2 * NPIX),
  localparam int SW   = $clog2(2*MAX_X + 3 + R)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             busy,
  output logic             done,
  input  logic             crf_we,
  input  logic [1:0]       crf_addr,
  input  logic [CRF_W-1:0] crf_wdata,
  input  logic [AW-1:0]    host_addr,
  input  logic             host_we,
  input  pix_t             host_wdata,
  output pix_t             host_rdata,
  output logic             error,
  output logic             rollback
);
  localparam int N_RFF = 21;

  crf_t          cfg;
  logic          mem_re;
  logic [AW-1:0] mem_raddr;
  pix_t          mem_rdata;
  logic          srf_we;
  logic [SW-1:0] srf_waddr, srf_head;
  pix_t          win [3][3];
  pix_t          edge_pix;
  logic [N_RFF-1:0] err_flags;
  logic          res_valid;
  logic [AW-1:0] res_addr;
  logic          q_empty;
  logic          wr_en;
  logic [AW-1:0] wr_addr;
  pix_t          wr_data;

  crf u_crf (
    .clk, .rst_n, .we(crf_we && !busy), .addr(crf_addr), .wdata(crf_wdata), .cfg
  );

  loop_controller #(.MAX_X(MAX_X), .MAX_Y(MAX_Y), .R(R)) u_ctrl (
    .clk, .rst_n, .start, .x_dim(cfg.x_dim), .y_dim(cfg.y_dim), .rollback,
    .queue_empty(q_empty), .busy, .done, .mem_re, .mem_raddr,
    .srf_we, .srf_waddr, .srf_head, .out_valid(res_valid), .out_addr(res_addr)
  );

  local_mem #(.DEPTH(2 * NPIX), .DATA_W(PIX_W)) u_mem (
    .clk,
    .a_re   (busy ? mem_re : 1'b1),
    .a_addr (busy ? mem_raddr : host_addr),
    .a_we   (!busy && host_we),
    .a_wdata(host_wdata),
    .a_rdata(mem_rdata),
    .b_addr (wr_addr),
    .b_we   (wr_en),
    .b_wdata(wr_data)
  );
  assign host_rdata = mem_rdata;

  srf #(.MAX_X(MAX_X), .R(R)) u_srf (
    .clk, .we(srf_we), .waddr(srf_waddr), .wdata(mem_rdata), .head(srf_head),
    .x_dim(cfg.x_dim), .win
  );

  sobel_datapath u_dp (
    .clk, .rst_n, .win, .threshold(cfg.threshold), .rollback, .edge_pix, .err_flags
  );

  store_queue #(.DEPTH(R - PIPE_LAT), .ADDR_W(AW), .DATA_W(PIX_W)) u_sq (
    .clk, .rst_n, .flush(rollback), .in_valid(res_valid), .in_addr(res_addr),
    .in_data(edge_pix), .wr_en, .wr_addr, .wr_data, .empty(q_empty)
  );

  error_or_tree #(.N(N_RFF)) u_err (
    .clk, .rst_n, .flags(err_flags), .clear(rollback), .error
  );

  error_controller u_ectl (
    .clk, .rst_n, .active(busy), .error, .rollback
  );
endmodule
