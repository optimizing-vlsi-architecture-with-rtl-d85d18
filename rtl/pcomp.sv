// Pipelined compensator (PCOMP) of the inexact speculative adder.
//
// One compensator sits on each boundary between block i and block i+1. It
// compares the real carry-out of block i (c_o) with the carry that was
// speculated for block i+1 (c_so); if they differ, block i+1 was summed with
// a carry-in that was one too low. The repair follows the published
// compensator: a 1-bit incrementer adds (1)2 to the least significant sum
// bit of block i+1. If that bit is 0 the increment is exact and the bit is
// simply set (correction). If it is 1 the increment would ripple further, so
// instead the two most significant sum bits of block i are forced to (11)2
// (balancing). Whenever the guess is wrong those two bits are 00, so
// balancing cuts the error of that boundary from 2^(X*(i+1)) to exactly
// 2^(X*(i+1)-2). A de-multiplexer driven by the incrementer's carry chooses
// between the two, and two multiplexers pick the corrected or the original
// bits. The speculator never guesses too high, so c_so = 1 with c_o = 0
// does not occur inside the adder; the XOR detector would treat it the same
// way.
// Two stages, cut where the published compensator diagram draws its dashed
// line: error detection and incrementer (rank R4, clk_d), then
// de-multiplexer and multiplexers (rank R5, clk_m).
//
// Interface: c_o, c_so, s_lsb_next (bit 0 of block i+1's sum), s_msb_pair
// ({msb, msb-1} of block i's sum); outputs s_lsb_out, s_msb_out and the
// flags corrected / balanced.
// Timing: two rising edges from inputs to outputs.
`timescale 1ns/1ps
module pcomp (
  input  logic       clk_d,
  input  logic       clk_m,
  input  logic       c_o,
  input  logic       c_so,
  input  logic       s_lsb_next,
  input  logic [1:0] s_msb_pair,
  output logic       s_lsb_out,
  output logic [1:0] s_msb_out,
  output logic       corrected,
  output logic       balanced
);

  // Stage 1: error detection and 1-bit incrementer (adds (1)2).
  logic       err_r, inc_sum_r, inc_carry_r, lsb_r;
  logic [1:0] msb_r;

  always_ff @(posedge clk_d) begin
    err_r       <= c_o ^ c_so;
    inc_sum_r   <= s_lsb_next ^ 1'b1;
    inc_carry_r <= s_lsb_next & 1'b1;
    lsb_r       <= s_lsb_next;
    msb_r       <= s_msb_pair;
  end

  // Stage 2: de-multiplex the error to correction or balancing, then select.
  logic do_correct, do_balance;

  assign do_correct = err_r & ~inc_carry_r;
  assign do_balance = err_r &  inc_carry_r;

  always_ff @(posedge clk_m) begin
    s_lsb_out <= do_correct ? inc_sum_r : lsb_r;
    s_msb_out <= do_balance ? 2'b11     : msb_r;
    corrected <= do_correct;
    balanced  <= do_balance;
  end

endmodule
