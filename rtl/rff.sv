// rff: behavioural model of the Razor flip-flop (RFF). kind: behavioural model.
//
// The real cell is a pulsed latch: a latch transparent while the clock is
// high, plus a transition detector. Two pulse generators in the detector
// turn every rising edge on D into a wide pulse dpr and every falling edge
// into a wide pulse dpf. If a pulse coincides with the high phase of the
// clock, the transition arrived too late for the rising edge, and the sticky
// error flag is set. Rising-edge flip-flop behaviour is thus enforced: Q
// takes D at the rising edge, and a late transition still reaches Q (the
// latch is open) but is reported. Because the pulses are PULSE_W wide, a
// transition less than PULSE_W before the rising edge is also flagged.
// The error state is cleared at a rising edge while ROLLBACK is high, and by
// reset.
//
// Model details (this design's): the pulse width is a parameter in ns, the
// pulses are ideal, and metastability is not modelled. Each flagged event
// increments late_cnt. err is high while late_cnt differs from its value at
// the last clear. D must only move while clk is low, and not within PULSE_W
// of the rising edge, in a correct design. The negative-phase latches in
// front of every RFF guarantee that.
// Interface: clk, rst_n, d, rollback -> q, err. One bit per instance.
// Circuit warnings: q is a latch by intent (Verilator's lint reports NOLATCH
// for that block; it is a latch in simulation and in synthesis). Synthesis
// ignores the pulse delays, so a synthesized copy of this model has a
// constant err; only the real cell has a working detector.
module rff #(
  parameter realtime PULSE_W = 0.2   // detector pulse width, ns
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  input  logic rollback,
  output logic q,
  output logic err
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [7:0] late_cnt;  // late transitions seen
  logic [7:0] ack_cnt;   // value of late_cnt at the last clear
  logic       dpr, dpf;  // pulse-generator outputs

  // positive-phase transparent latch
  always_latch begin
    if (clk) q = d;
  end

  // pulse generators: a wide pulse for each rising / falling transition
  initial begin
    dpr = 1'b0;
    dpf = 1'b0;
  end
  always @(posedge d) begin
    dpr <= 1'b1;
    dpr <= #(PULSE_W) 1'b0;
  end
  always @(negedge d) begin
    dpf <= 1'b1;
    dpf <= #(PULSE_W) 1'b0;
  end

  // error latch: a pulse overlapping the clock high phase
  logic hit;
  assign hit = clk && (dpr || dpf);
  initial late_cnt = '0;
  always @(posedge hit) late_cnt <= late_cnt + 8'd1;

  always_ff @(posedge clk) begin
    if (!rst_n || rollback) ack_cnt <= late_cnt;
  end

  assign err = (late_cnt != ack_cnt);
endmodule
