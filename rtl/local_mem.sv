// local_mem: the accelerator's local data memory.
//
// Holds the input image and the output edge map. Port A reads and writes
// (read data one cycle after an address with a_re high, held otherwise); port B only writes and carries
// the committed results of the store queue. A write on both ports to the
// same address in one cycle leaves port B's value. Size and the two-port
// arrangement are this design's choices.
module local_mem #(
  parameter int DEPTH  = 8192,
  parameter int DATA_W = 8,
  localparam int AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              a_re,
  input  logic [AW-1:0]     a_addr,
  input  logic              a_we,
  input  logic [DATA_W-1:0] a_wdata,
  output logic [DATA_W-1:0] a_rdata,
  input  logic [AW-1:0]     b_addr,
  input  logic              b_we,
  input  logic [DATA_W-1:0] b_wdata
);
  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    if (b_we) mem[b_addr] <= b_wdata;
    if (a_re) a_rdata <= mem[a_addr];
  end
endmodule
