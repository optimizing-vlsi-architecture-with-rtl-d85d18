// Scoreboard for one isa_adder instance, used by tb_isa_adder.
//
// It watches the operands the adder accepts and the results it returns.
// For every accepted operation it computes the expected inexact result with
// a behavioural model written from the rules of the architecture (block sums
// with speculated carry-ins; speculation from the 2-bit sum of each block's
// top operand bits; correction of the next LSB, else balancing of the two
// MSBs), and independently checks the arithmetic identity the compensation
// guarantees: {cout, sum} equals the exact a + b + cin minus 2^(X*(i+1)-2)
// for each boundary i that was balanced, and equals it exactly otherwise.
// Each result must be registered at the outputs by the (LATENCY-1)-th rising
// edge after the one that sampled its operands (one edge per register rank), in order, with data outputs held while out_valid is low.
// It also counts how often each mechanism occurred.
`timescale 1ns/1ps
module isa_check #(
  parameter int unsigned N = 32,
  parameter int unsigned X = 4,
  parameter int unsigned LATENCY = 6
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic           cin,
  input  logic           out_valid,
  input  logic [N-1:0]   sum,
  input  logic           cout,
  input  logic [N/X-2:0] corrected,
  input  logic [N/X-2:0] balanced,
  output int             checks,
  output int             failures,
  output int             n_ops,
  output int             n_exact,
  output int             n_corrected,
  output int             n_balanced,
  output int             n_held
);

  localparam int unsigned NBLK = N / X;

  typedef struct {
    logic [N-1:0]  sum;
    logic          cout;
    logic [NBLK-2:0] corr;
    logic [NBLK-2:0] bal;
    logic [N:0]    exact;
    longint        issued;
  } exp_t;

  exp_t   q[$];
  longint cyc = 0;
  logic   seen_result = 1'b0;
  logic [N-1:0] last_sum;

  initial begin
    checks = 0; failures = 0; n_ops = 0; n_exact = 0;
    n_corrected = 0; n_balanced = 0; n_held = 0;
  end

  function automatic exp_t model(logic [N-1:0] av, logic [N-1:0] bv, logic ci);
    exp_t e;
    int unsigned s_blk [NBLK];
    int unsigned c_out [NBLK];
    int unsigned c_spec[NBLK];
    int unsigned fixed [NBLK];
    int unsigned mask, aj, bj, t, cj;
    mask = (1 << X) - 1;
    cj = 32'(ci);
    for (int j = 0; j < NBLK; j++) begin
      aj = 32'(av >> (X * j)) & mask;
      bj = 32'(bv >> (X * j)) & mask;
      if (j > 0) cj = c_spec[j-1];
      t = aj + bj + cj;
      s_blk[j]  = t & mask;
      c_out[j]  = t >> X;
      c_spec[j] = ((aj >> (X - 2)) + (bj >> (X - 2))) >> 2;
      fixed[j]  = s_blk[j];
    end
    e.corr = '0;
    e.bal  = '0;
    for (int i = 0; i < NBLK - 1; i++) begin
      if (c_out[i] != c_spec[i]) begin
        if ((s_blk[i+1] & 1) == 0) begin
          fixed[i+1] = fixed[i+1] + 1;
          e.corr[i] = 1'b1;
        end else begin
          fixed[i] = fixed[i] | (3 << (X - 2));
          e.bal[i] = 1'b1;
        end
      end
    end
    e.sum = '0;
    for (int j = 0; j < NBLK; j++) e.sum = e.sum | (N'(fixed[j]) << (X * j));
    e.cout  = c_out[NBLK-1][0];
    e.exact = (N+1)'(av) + (N+1)'(bv) + (N+1)'(ci);
    e.issued = cyc;
    return e;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && in_valid) begin
      q.push_back(model(a, b, cin));
      n_ops <= n_ops + 1;
    end
    if (rst_n && out_valid) begin
      // Outputs seen here are those registered by the previous edge.
      exp_t e;
      logic [N:0] approx;
      checks += 4;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL N=%0d: result with no operation outstanding", N);
      end else begin
        e = q.pop_front();
        // Sampled at edge E, registered at edge E+LATENCY-1, read here at
        // edge E+LATENCY.
        if (cyc - e.issued != longint'(LATENCY)) begin
          failures++;
          $display("FAIL N=%0d: read %0d edges after issue, expected %0d", N,
                   cyc - e.issued, LATENCY);
        end
        if (sum !== e.sum || cout !== e.cout) begin
          failures++;
          $display("FAIL N=%0d: sum %h cout %b expected %h %b", N, sum, cout, e.sum, e.cout);
        end
        if (corrected !== e.corr || balanced !== e.bal) begin
          failures++;
          $display("FAIL N=%0d: flags corr %b bal %b expected %b %b", N, corrected, balanced,
                   e.corr, e.bal);
        end
        approx = e.exact;
        for (int i = 0; i < NBLK - 1; i++)
          if (balanced[i]) approx = approx - ((N+1)'(1) << (X * (i + 1) - 2));
        if ({cout, sum} !== approx) begin
          failures++;
          $display("FAIL N=%0d: {cout,sum} %h is not exact %h less the balancing error",
                   N, {cout, sum}, e.exact);
        end
        if (corrected == '0 && balanced == '0) n_exact++;
        for (int i = 0; i < NBLK - 1; i++) begin
          if (corrected[i]) n_corrected++;
          if (balanced[i])  n_balanced++;
        end
      end
      seen_result <= 1'b1;
      last_sum <= sum;
    end else if (rst_n && seen_result) begin
      checks++;
      n_held++;
      if (sum !== last_sum) begin
        failures++;
        $display("FAIL N=%0d: sum changed while out_valid was low", N);
      end
    end
  end

  final begin
    if (q.size() != 0) $display("N=%0d: %0d operations still outstanding", N, q.size());
  end

endmodule
