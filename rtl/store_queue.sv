// store_queue: speculative result queue in front of local memory.
//
// Every result the pipeline produces enters at the tail and is written to
// memory DEPTH cycles later, when it leaves the head. By then any timing
// error in its computation has already raised ROLLBACK, which discards the
// whole queue (flush) and blocks the write at the head in that cycle. The
// queue is thus the storage that holds speculative state until Razor has
// validated it. One entry moves per cycle; invalid entries are bubbles.
// DEPTH = R - 3 in the top: the loop controller reverts R pushes, covering
// the three pipeline cycles and everything in the queue.
module store_queue #(
  parameter int DEPTH  = 5,
  parameter int ADDR_W = 13,
  parameter int DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              flush,
  input  logic              in_valid,
  input  logic [ADDR_W-1:0] in_addr,
  input  logic [DATA_W-1:0] in_data,
  output logic              wr_en,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [DATA_W-1:0] wr_data,
  output logic              empty
);
  typedef struct packed {
    logic              valid;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] data;
  } entry_t;

  entry_t q [DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      for (int i = 0; i < DEPTH; i++) q[i].valid <= 1'b0;
    end else begin
      q[0] <= '{valid: in_valid, addr: in_addr, data: in_data};
      for (int i = 1; i < DEPTH; i++) q[i] <= q[i-1];
    end
  end

  assign wr_en   = q[DEPTH-1].valid && !flush;
  assign wr_addr = q[DEPTH-1].addr;
  assign wr_data = q[DEPTH-1].data;

  always_comb begin
    empty = 1'b1;
    for (int i = 0; i < DEPTH; i++) if (q[i].valid) empty = 1'b0;
  end
endmodule
