// srf: pixel shift-register file with check-point depth.
//
// Keeps the most recent 2*MAX_X+3 pixels of the raster stream, enough for a
// 3x3 window over rows of up to MAX_X pixels, plus R extra entries. The extra
// entries are the check-point: after the controller reverts R pushes, the
// window for the replayed pixel is still intact. The register file is a
// circular buffer; the slot pointer (owned and check-pointed by the loop
// controller) plays the role of the shift, so reverting the shift is
// restoring the pointer.
//
// Interface: push writes wdata to slot waddr at the rising edge. win is
// combinational from the array: win[r][c] is the pixel r rows above and c
// columns left of the newest pixel at slot head, mirrored so that win[2][2]
// is the newest (bottom-right) and win[0][0] the oldest (top-left), using
// the run-time row length x_dim (<= MAX_X).
module srf
  import rzla_pkg::*;
#(
  parameter int MAX_X = 64,
  parameter int R     = 8,
  localparam int DEPTH = 2*MAX_X + 3 + R,
  localparam int AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  pix_t             wdata,
  input  logic [AW-1:0]    head,
  input  logic [CRF_W-1:0] x_dim,
  output pix_t             win [3][3]
);
  pix_t regs [DEPTH];

  always_ff @(posedge clk) begin
    if (we) regs[waddr] <= wdata;
  end

  // slot of the pixel 'back' pushes before the newest one
  function automatic logic [AW-1:0] slot(input logic [AW-1:0] h, input logic [AW:0] back);
    logic [AW:0] s;
    s = {1'b0, h} + ((back > {1'b0, h}) ? (AW+1)'(DEPTH) : '0) - back;
    return s[AW-1:0];
  endfunction

  logic [AW:0] xd;
  assign xd = (AW+1)'(x_dim);

  always_comb begin
    for (int r = 0; r < 3; r++) begin
      for (int c = 0; c < 3; c++) begin
        win[r][c] = regs[slot(head, (AW+1)'((2-r)) * xd + (AW+1)'(2-c))];
      end
    end
  end
endmodule
