// sobel_datapath: the speculative Sobel functional units of the accelerator.
//
// Two pipeline stages, each ending in Razor flip-flops (rff) and each split
// in the middle by a negative-phase latch (latch_n):
//   stage 1: window -> weighted row/column sums | latch | two differences,
//            absolute values -> RFF (|Gx|, |Gy|, 10 bits each)
//   stage 2: |Gx| + |Gy| | latch | compare with threshold -> RFF (edge bit)
// A last negative-phase latch isolates the stage-2 RFF from the store
// queue's rising-edge flip-flops. A window presented in the cycle after
// rising edge k has its edge bit on 'edge' during the low phase of cycle
// k+2, to be sampled at edge k+3 (PIPE_LAT = 3).
// Gx = [-1 0 1; -2 0 2; -1 0 1], Gy = [-1 -2 -1; 0 0 0; 1 2 1] and the
// magnitude |Gx|+|Gy| are the standard Sobel operator; the stage split, the
// latch positions and "edge when magnitude > threshold" are this design's
// choices. err_flags carries the error flag of every RFF bit (N_RFF = 21).
// Circuit warnings: the latches (in rff and latch_n) are intended.
module sobel_datapath
  import rzla_pkg::*;
#(
  localparam int N_RFF = 21
) (
  input  logic             clk,
  input  logic             rst_n,
  input  pix_t             win [3][3],
  input  logic [CRF_W-1:0] threshold,
  input  logic             rollback,
  output pix_t             edge_pix,
  output logic [N_RFF-1:0] err_flags
);
  // ---------------- stage 1 ----------------
  logic [9:0] gx_pos, gx_neg, gy_pos, gy_neg;
  always_comb begin
    gx_pos = 10'(win[0][2]) + {1'b0, win[1][2], 1'b0} + 10'(win[2][2]);
    gx_neg = 10'(win[0][0]) + {1'b0, win[1][0], 1'b0} + 10'(win[2][0]);
    gy_pos = 10'(win[2][0]) + {1'b0, win[2][1], 1'b0} + 10'(win[2][2]);
    gy_neg = 10'(win[0][0]) + {1'b0, win[0][1], 1'b0} + 10'(win[0][2]);
  end

  logic [39:0] s1_mid;
  latch_n #(.WIDTH(40)) u_l1 (.clk, .d({gx_pos, gx_neg, gy_pos, gy_neg}), .q(s1_mid));

  logic [9:0] ax, ay;
  always_comb begin
    logic [9:0] xp, xn, yp, yn;
    {xp, xn, yp, yn} = s1_mid;
    ax = (xp >= xn) ? xp - xn : xn - xp;
    ay = (yp >= yn) ? yp - yn : yn - yp;
  end

  logic [19:0] s1_q;
  for (genvar i = 0; i < 20; i++) begin : g_rff1
    rff u_rff (.clk, .rst_n, .d({ax, ay}[i]), .rollback, .q(s1_q[i]), .err(err_flags[i]));
  end

  // ---------------- stage 2 ----------------
  logic [10:0] mag;
  assign mag = 11'(s1_q[19:10]) + 11'(s1_q[9:0]);

  logic [10:0] s2_mid;
  latch_n #(.WIDTH(11)) u_l2 (.clk, .d(mag), .q(s2_mid));

  logic is_edge, s2_q, s2_out;
  assign is_edge = (16'(s2_mid) > threshold);

  rff u_rff2 (.clk, .rst_n, .d(is_edge), .rollback, .q(s2_q), .err(err_flags[20]));

  latch_n #(.WIDTH(1)) u_l3 (.clk, .d(s2_q), .q(s2_out));

  assign edge_pix = s2_out ? EDGE_ON : EDGE_OFF;
endmodule
