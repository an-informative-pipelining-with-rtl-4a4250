// error_controller: raises ROLLBACK on a timing error.
//
// While the accelerator is active, a composite error seen at a rising edge
// produces a one-cycle ROLLBACK pulse in the following cycle. ROLLBACK
// clears the error state of every Razor flip-flop and of the error
// synchroniser, and makes the loop controller revert. Two pulses are never
// back to back: the error still visible in the pulse's own cycle is the one
// being handled. Pulse length and the no-back-to-back rule are this
// design's choices.
module error_controller (
  input  logic clk,
  input  logic rst_n,
  input  logic active,
  input  logic error,
  output logic rollback
);
  always_ff @(posedge clk) begin
    if (!rst_n) rollback <= 1'b0;
    else        rollback <= active && error && !rollback;
  end

  // ROLLBACK is a single-cycle pulse
  assert property (@(posedge clk) disable iff (!rst_n) rollback |=> !rollback);
endmodule
