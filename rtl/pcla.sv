// Pipelined carry look-ahead adder block (PCLA) of the inexact speculative adder.
//
// Adds two X-bit operand slices and a carry-in with the textbook carry
// look-ahead equations that the design is built on:
//   G(i) = A(i) & B(i),  P(i) = A(i) ^ B(i),
//   C(i+1) = G(i) | P(i) & C(i),  S(i) = P(i) ^ C(i).
// The recurrence is not rippled: every carry is flattened into its
// two-level sum-of-products form (C2 = G1 | P1 C1, C3 = G2 | P2 G1 | P2 P1 C1,
// and so on), as in the published look-ahead logic diagram.
// The block is cut into three stages so that only a few gates lie between
// registers; where the cuts go is this design's choice:
//   stage 1: P and G from the operands           -> rank R1 (clk_pg)
//   stage 2: look-ahead carries from P, G and cin -> rank R2 (clk_c)
//   stage 3: sums and block carry-out             -> rank R3 (clk_s)
// The carry-in is consumed in stage 2, so it must arrive one clock after the
// operands; in the adder it is the speculated carry of the block below.
//
// Interface: a, b (X bits, stage-1 inputs), cin (stage-2 input),
// s (X-bit sum), cout (block carry-out). Each rank has its own (gated) clock.
// Timing: a and b reach s/cout after three rising edges, one per rank.
`timescale 1ns/1ps
module pcla #(
  parameter int unsigned X = 4
) (
  input  logic         clk_pg,
  input  logic         clk_c,
  input  logic         clk_s,
  input  logic [X-1:0] a,
  input  logic [X-1:0] b,
  input  logic         cin,
  output logic [X-1:0] s,
  output logic         cout
);

  // Stage 1: propagate and generate.
  logic [X-1:0] p_r1, g_r1;

  always_ff @(posedge clk_pg) begin
    p_r1 <= a ^ b;
    g_r1 <= a & b;
  end

  // Stage 2: flattened look-ahead carries. c[i] is the carry into bit i.
  logic [X:0] c;

  always_comb begin
    c[0] = cin;
    for (int unsigned i = 0; i < X; i++) begin
      logic term;
      logic sop;
      // Carry-in term: all propagates from bit 0 up to bit i.
      term = cin;
      for (int unsigned k = 0; k <= i; k++) term = term & p_r1[k];
      sop = term;
      // Generate terms: G(j) propagated through bits j+1..i.
      for (int unsigned j = 0; j <= i; j++) begin
        term = g_r1[j];
        for (int unsigned k = j + 1; k <= i; k++) term = term & p_r1[k];
        sop = sop | term;
      end
      c[i+1] = sop;
    end
  end

  logic [X-1:0] p_r2;
  logic [X:0]   c_r2;

  always_ff @(posedge clk_c) begin
    p_r2 <= p_r1;
    c_r2 <= c;
  end

  // Stage 3: sum bits and carry-out.
  always_ff @(posedge clk_s) begin
    s    <= p_r2 ^ c_r2[X-1:0];
    cout <= c_r2[X];
  end

endmodule
