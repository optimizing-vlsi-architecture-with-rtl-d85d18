// Clock gate for one pipeline stage of the inexact speculative adder.
//
// The adder saves power by clocking a stage's registers only in cycles in
// which that stage has an operation to take; that stages are clock-gated is
// taken from the published design, the cell itself is this design's choice.
// It is the usual latch-based integrated clock gate: a level-sensitive latch
// is transparent while clk is low and holds the enable while clk is high, and
// the gated clock is clk AND the held enable. Because the enable can only
// change while clk is low, gclk never carries a glitch or a shortened pulse,
// even when en changes right after a rising edge.
//
// Interface: clk (free-running), en (enable for the next rising edge, must
// settle before it), gclk (gated clock, in phase with clk).
// Timing: a high en seen during the low phase before a rising edge of clk
// lets that edge (and only that one) through.
//
// The latch that tools report here is intended: it is the gate's storage
// element.
`timescale 1ns/1ps
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_held;

  always_latch begin
    if (!clk) en_held <= en;
  end

  assign gclk = clk & en_held;

endmodule
