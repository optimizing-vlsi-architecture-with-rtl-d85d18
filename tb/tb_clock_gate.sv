// Self-checking testbench for clock_gate.
//
// Every clock cycle the enable is set to a random value during the low phase
// of clk (the value the gate must honour at the next rising edge) and then
// changed again to a random value during the high phase (which the gate must
// ignore until the next low phase). gclk is sampled just after the rising
// edge, just after the mid-cycle enable change and just after the falling
// edge, and compared with what the low-phase enable calls for.
`timescale 1ns/1ps
module tb_clock_gate;

  logic clk = 1'b0;
  logic en  = 1'b0;
  logic gclk;
  int   checks = 0;
  int   failures = 0;
  int   pulses = 0;
  int   expected_pulses = 0;

  clock_gate dut (.clk(clk), .en(en), .gclk(gclk));

  always @(posedge gclk) pulses++;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: gclk=%0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic en_low, en_high;
    int   d1, d2;
    // clk low for 5.5 ns then high for 5 ns each cycle.
    for (int cyc = 0; cyc < 2000; cyc++) begin
      d1 = 1 + ($urandom % 3);
      d2 = 1 + ($urandom % 3);
      en_low  = ($urandom % 2) == 1;
      en_high = ($urandom % 2) == 1;
      // Low phase: settle the enable for the coming rising edge.
      #(d1);
      en = en_low;
      #(5 - d1);
      clk = 1'b1;
      #0.5;
      check(gclk, en_low, "after rising edge");
      if (en_low) expected_pulses++;
      // High phase: a late enable change must not reach gclk.
      #(d2 - 0.5);
      en = en_high;
      #0.5;
      check(gclk, en_low, "enable changed while clk high");
      #(5 - d2 - 0.5);
      clk = 1'b0;
      #0.5;
      check(gclk, 1'b0, "after falling edge");
    end
    checks++;
    if (pulses != expected_pulses) begin
      failures++;
      $display("FAIL pulse count %0d expected %0d", pulses, expected_pulses);
    end
    $display("gated pulses %0d of 2000 clock cycles", pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
