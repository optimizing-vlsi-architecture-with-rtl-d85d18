// Self-checking testbench for pspec, the carry speculator.
//
// All 16 combinations of the two top operand bit pairs are applied back to
// back, one per clock. The expected guess is the carry out of the 2-bit sum
// a_hi + b_hi with no carry in, worked out with integer addition; it must
// appear exactly one rising edge after the operands were applied.
`timescale 1ns/1ps
module tb_pspec;

  logic       clk = 1'b0;
  logic [1:0] a_hi = '0, b_hi = '0;
  logic       c_so;
  int         checks = 0;
  int         failures = 0;
  int         ones = 0;

  pspec dut (.clk(clk), .a_hi(a_hi), .b_hi(b_hi), .c_so(c_so));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expected;
    for (int rep = 0; rep < 3; rep++) begin
      for (int v = 0; v < 16; v++) begin
        @(negedge clk);
        a_hi = v[3:2];
        b_hi = v[1:0];
        expected = ((32'(a_hi) + 32'(b_hi)) >> 2) != 0;
        @(posedge clk);
        #1;
        checks++;
        if (c_so !== expected) begin
          failures++;
          $display("FAIL a_hi=%b b_hi=%b c_so=%b expected %b", a_hi, b_hi, c_so, expected);
        end
        if (expected) ones++;
      end
    end
    // The guess must be registered: a change of the operands between edges
    // must not show at the output until the next rising edge.
    @(negedge clk);
    a_hi = 2'b11; b_hi = 2'b11;
    @(posedge clk); #1;
    @(negedge clk);
    a_hi = 2'b00; b_hi = 2'b00;
    #1;
    checks++;
    if (c_so !== 1'b1) begin
      failures++;
      $display("FAIL c_so changed before the clock edge");
    end
    @(posedge clk); #1;
    checks++;
    if (c_so !== 1'b0) begin
      failures++;
      $display("FAIL c_so did not follow the new operands");
    end
    $display("speculated carries = 1: %0d of 48", ones);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
