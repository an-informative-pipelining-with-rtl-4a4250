// error_or_tree: composite timing-error signal.
//
// ORs the error flags of all N Razor flip-flops into one signal and passes
// it through two rising-edge flip-flops, because the flags are raised
// asynchronously within the clock high phase and may be metastable when
// sampled. The composite error therefore appears two rising edges after the
// flag. clear (driven by ROLLBACK) empties both stages at the next rising
// edge so one error causes one recovery; the clear is this design's choice.
module error_or_tree #(
  parameter int N = 30
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] flags,
  input  logic         clear,
  output logic         error
);
  logic any_flag;
  logic sync1;

  assign any_flag = |flags;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      sync1 <= 1'b0;
      error <= 1'b0;
    end else begin
      sync1 <= any_flag;
      error <= sync1;
    end
  end
endmodule
