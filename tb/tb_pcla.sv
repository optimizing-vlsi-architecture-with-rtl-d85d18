// Self-checking testbench for pcla, the pipelined carry look-ahead block.
//
// All 2^(2X+1) combinations of a, b and cin are streamed through the block,
// one per clock, with all three rank clocks tied to one free-running clock.
// The carry-in belongs to the operation one clock later than its operands
// (it is consumed in stage 2), so the bench delays it by one cycle. Expected
// sum and carry-out come from integer addition and must leave the block
// exactly three rising edges after the operands went in.
`timescale 1ns/1ps
module tb_pcla;

  localparam int unsigned X = 4;
  localparam int unsigned LATENCY = 3;

  logic         clk = 1'b0;
  logic [X-1:0] a = '0, b = '0;
  logic         cin = 1'b0;
  logic [X-1:0] s;
  logic         cout;
  int           checks = 0;
  int           failures = 0;
  int           carries = 0;

  pcla dut (
    .clk_pg(clk), .clk_c(clk), .clk_s(clk),
    .a(a), .b(b), .cin(cin), .s(s), .cout(cout)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int unsigned NOPS = 1 << (2 * X + 1);
  logic [X:0] expected [NOPS];
  logic       cin_of   [NOPS];

  initial begin
    for (int i = 0; i < NOPS; i++) begin
      logic [X-1:0] ai, bi;
      ai = X'(i >> (X + 1));
      bi = X'(i >> 1);
      cin_of[i]   = i[0];
      expected[i] = (X+1)'(32'(ai) + 32'(bi) + 32'(i[0]));
    end
    // Cycle k: operands of op k and the carry-in of op k-1.
    for (int k = 0; k < NOPS + LATENCY; k++) begin
      @(negedge clk);
      if (k < NOPS) begin
        a = X'(k >> (X + 1));
        b = X'(k >> 1);
      end
      if (k >= 1 && k - 1 < NOPS) cin = cin_of[k-1];
      // Result of op k-LATENCY+1 is on the outputs after the edge that
      // ended cycle k-1, i.e. now.
      if (k >= LATENCY) begin
        int op;
        op = k - LATENCY;
        checks++;
        if ({cout, s} !== expected[op]) begin
          failures++;
          $display("FAIL op %0d: got %0d expected %0d", op, {cout, s}, expected[op]);
        end
        if (cout) carries++;
      end
    end
    $display("operations %0d, with carry-out %0d", NOPS, carries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
