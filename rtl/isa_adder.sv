// Pipelined, clock-gated inexact speculative adder (ISA) built from carry
// look-ahead blocks.
//
// An N-bit addition is split into N/X blocks of X bits. Block 0 takes the
// external carry-in; every other block takes, instead of the real carry of
// the block below, a carry guessed by a speculator (pspec) from the two top
// operand bit pairs of that block. The carry chain is thereby cut into short
// independent pieces. A compensator (pcomp) per block boundary compares the
// real block carry-out with the guess and, when the guess was too low,
// either sets the next block's sum LSB (exact correction) or, if that bit is
// already 1, forces the two top sum bits of the lower block to 11
// (balancing, leaving an error of 2^(X*(i+1)-2) for boundary i).
// The structure, block width, speculation window and compensation rules
// follow the published architecture; the exact placement of the pipeline
// cuts, the valid chain and the status outputs are this design's choices.
//
// Pipeline: five stages between six register ranks, one operation per clock.
//   R0 operands                          (gclk[0], enabled by in_valid)
//   R1 P/G per bit, speculated carries   (gclk[1])
//   R2 look-ahead carries                (gclk[2])
//   R3 block sums and carry-outs         (gclk[3])
//   R4 error detect, LSB incrementer     (gclk[4])
//   R5 compensated sum, cout, flags      (gclk[5])
// Clock gating: each rank has its own clock_gate, enabled only when the rank
// before it holds a valid operation, so ranks with nothing to take get no
// clock edge. A small valid shift register on the free-running clock (the
// only state that is reset) drives the enables and out_valid.
//
// Interface: in_valid, a, b, cin are sampled on a rising edge of clk; the
// result appears on sum/cout with out_valid five rising edges later (on the
// sixth edge counting the sampling one). corrected[i] / balanced[i] tell
// which repair the compensator between blocks i and i+1 made. Data outputs
// hold their last value while out_valid is low.
// N must be a multiple of X, with at least two blocks and X >= 3.
`timescale 1ns/1ps
module isa_adder
  import isa_pkg::*;
#(
  parameter int unsigned N = ISA_N,
  parameter int unsigned X = ISA_X
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [N-1:0]       a,
  input  logic [N-1:0]       b,
  input  logic               cin,
  output logic               out_valid,
  output logic [N-1:0]       sum,
  output logic               cout,
  output logic [N/X-2:0]     corrected,
  output logic [N/X-2:0]     balanced
);

  localparam int unsigned NBLK = N / X;

  if ((N % X) != 0 || NBLK < 2 || X < 3) begin : g_bad_params
    $error("isa_adder: N must be a multiple of X with N/X >= 2 and X >= 3");
  end

  // ---------------------------------------------------------------------------
  // Valid chain and per-rank clock gates.
  // ---------------------------------------------------------------------------
  logic [REG_RANKS-1:0] v;
  logic [REG_RANKS-1:0] gate_en;
  logic [REG_RANKS-1:0] gclk;

  always_ff @(posedge clk) begin
    if (!rst_n) v <= '0;
    else        v <= {v[REG_RANKS-2:0], in_valid};
  end

  assign gate_en = {v[REG_RANKS-2:0], in_valid};

  for (genvar k = 0; k < REG_RANKS; k++) begin : g_gate
    clock_gate u_cg (.clk(clk), .en(gate_en[k]), .gclk(gclk[k]));
  end

  assign out_valid = v[REG_RANKS-1];

  // ---------------------------------------------------------------------------
  // R0: operand registers.
  // ---------------------------------------------------------------------------
  logic [N-1:0] a_r0, b_r0;
  logic         cin_r0, cin_r1;

  always_ff @(posedge gclk[0]) begin
    a_r0   <= a;
    b_r0   <= b;
    cin_r0 <= cin;
  end

  always_ff @(posedge gclk[1]) cin_r1 <= cin_r0;

  // ---------------------------------------------------------------------------
  // Speculators (R1) and their delay to the compensators (R3).
  // c_so_r1[i] is the guessed carry out of block i, i.e. into block i+1.
  // ---------------------------------------------------------------------------
  logic [NBLK-2:0] c_so_r1, c_so_r2, c_so_r3;

  for (genvar i = 0; i < NBLK - 1; i++) begin : g_spec
    pspec u_spec (
      .clk  (gclk[1]),
      .a_hi (a_r0[X*i+X-1 -: 2]),
      .b_hi (b_r0[X*i+X-1 -: 2]),
      .c_so (c_so_r1[i])
    );
  end

  always_ff @(posedge gclk[2]) c_so_r2 <= c_so_r1;
  always_ff @(posedge gclk[3]) c_so_r3 <= c_so_r2;

  // ---------------------------------------------------------------------------
  // Carry look-ahead blocks (R1..R3).
  // ---------------------------------------------------------------------------
  logic [N-1:0]    s_r3;
  logic [NBLK-1:0] c_o_r3;

  for (genvar i = 0; i < NBLK; i++) begin : g_cla
    logic blk_cin;
    if (i == 0) begin : g_first
      assign blk_cin = cin_r1;
    end else begin : g_rest
      assign blk_cin = c_so_r1[i-1];
    end
    pcla #(.X(X)) u_cla (
      .clk_pg (gclk[1]),
      .clk_c  (gclk[2]),
      .clk_s  (gclk[3]),
      .a      (a_r0[X*i +: X]),
      .b      (b_r0[X*i +: X]),
      .cin    (blk_cin),
      .s      (s_r3[X*i +: X]),
      .cout   (c_o_r3[i])
    );
  end

  // ---------------------------------------------------------------------------
  // Compensators (R4..R5), one per block boundary.
  // ---------------------------------------------------------------------------
  logic [NBLK-2:0] lsb_fix;
  logic [1:0]      msb_fix [NBLK-1];

  for (genvar i = 0; i < NBLK - 1; i++) begin : g_comp
    pcomp u_comp (
      .clk_d      (gclk[4]),
      .clk_m      (gclk[5]),
      .c_o        (c_o_r3[i]),
      .c_so       (c_so_r3[i]),
      .s_lsb_next (s_r3[X*(i+1)]),
      .s_msb_pair (s_r3[X*i+X-1 -: 2]),
      .s_lsb_out  (lsb_fix[i]),
      .s_msb_out  (msb_fix[i]),
      .corrected  (corrected[i]),
      .balanced   (balanced[i])
    );
  end

  // Sum bits the compensators do not touch, and the top carry-out, are
  // carried through R4 and R5 unchanged.
  logic [N-1:0] s_r4, s_r5;
  logic         cout_r4;

  always_ff @(posedge gclk[4]) begin
    s_r4    <= s_r3;
    cout_r4 <= c_o_r3[NBLK-1];
  end

  always_ff @(posedge gclk[5]) begin
    s_r5 <= s_r4;
    cout <= cout_r4;
  end

  always_comb begin
    sum = s_r5;
    for (int unsigned i = 0; i < NBLK - 1; i++) begin
      sum[X*(i+1)]       = lsb_fix[i];
      sum[X*i+X-1 -: 2]  = msb_fix[i];
    end
  end

  // The speculator looks at a subset of the bits that produce the real
  // carry-out, with no carry into them, so its guess can never be too high.
  for (genvar i = 0; i < NBLK - 1; i++) begin : g_chk
    a_spec_not_high : assert property (@(posedge clk) disable iff (!rst_n)
      v[3] |-> !(c_so_r3[i] && !c_o_r3[i]));
  end

endmodule
