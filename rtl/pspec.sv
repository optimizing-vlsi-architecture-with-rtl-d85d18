// Pipelined speculator (PSPEC) of the inexact speculative adder.
//
// It guesses the carry out of an X-bit block from that block's two most
// significant operand bit pairs only, as the published speculator does: with
// G = A&B and P = A^B, the guess is C_so = G_msb | P_msb & G_msb-1, i.e. the
// carry-look-ahead recurrence C(i+1) = P(i)C(i) + G(i) run over the top two
// bits with the carry into them taken as 0. The guess can therefore only be
// too low, never too high; the compensator relies on that.
// The guess is registered, so it meets the block's propagate/generate terms
// in the same pipeline rank; that register is this design's pipeline cut.
//
// Interface: a_hi/b_hi = {bit msb, bit msb-1} of the block's operands,
// c_so = speculated carry into the next block.
// Timing: one clock (the stage-1 gated clock) from a_hi/b_hi to c_so.
`timescale 1ns/1ps
module pspec (
  input  logic       clk,
  input  logic [1:0] a_hi,
  input  logic [1:0] b_hi,
  output logic       c_so
);

  logic [1:0] g;
  logic       p_msb;
  logic       c_spec;

  assign g      = a_hi & b_hi;
  assign p_msb  = a_hi[1] ^ b_hi[1];
  assign c_spec = g[1] | (p_msb & g[0]);

  always_ff @(posedge clk) c_so <= c_spec;

endmodule
