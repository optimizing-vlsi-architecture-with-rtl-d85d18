// Shared constants of the pipelined inexact speculative adder (ISA).
//
// The adder splits an N-bit addition into blocks of X bits. The carry into
// every block except the lowest is guessed by a speculator that looks only at
// the two most significant operand bit pairs of the block below it, and a
// compensator repairs or shrinks the error when the guess was wrong. The
// defaults (32-bit adder, 4-bit blocks, 2-bit speculation window (fixed in the speculator and compensator), five
// pipeline stages between six register ranks) follow the published
// architecture; nothing here is clocked.
`timescale 1ns/1ps
package isa_pkg;

  // Adder width and block width of the main configuration.
  localparam int unsigned ISA_N = 32;
  localparam int unsigned ISA_X = 4;

  // Five pipeline stages separated by six register ranks: R0 (operands),
  // R1 (propagate/generate and speculated carries), R2 (look-ahead carries),
  // R3 (block sums and carry-outs), R4 (error detect and increment),
  // R5 (compensated result).
  localparam int unsigned PIPE_STAGES = 5;
  localparam int unsigned REG_RANKS   = PIPE_STAGES + 1;

endpackage
