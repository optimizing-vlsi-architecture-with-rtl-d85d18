// End-to-end testbench for isa_adder, the pipelined clock-gated inexact
// speculative adder.
//
// The adder runs in its default configuration (32 bits, 4-bit blocks, no
// parameter override); tb_isa_widths repeats the run at 16 and 8 bits.
// Operands are random, mixed with
// directed patterns that force long carry chains (and so speculation
// errors); in_valid is driven with random gaps and with long idle stretches
// so that the per-stage clock gates are exercised. An isa_check scoreboard
// checks every result, its latency and the hold of the outputs.
// The bench also counts the clock pulses each register
// rank receives: each rank must be clocked exactly once per operation and
// not at all otherwise. Every mechanism (exact result, correction,
// balancing, carry-in, back-to-back operations, gated idle cycles) must
// occur at least once.
`timescale 1ns/1ps
module tb_isa_adder;
  import isa_pkg::*;

  localparam int unsigned NOPS = 20000;
  localparam int unsigned LAT  = REG_RANKS;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        in_valid = 1'b0;
  logic [31:0] a = '0, b = '0;
  logic        cin = 1'b0;

  always #5 clk = ~clk;

  // Default (full-size) adder.
  logic        ov32, co32;
  logic [31:0] s32;
  logic [6:0]  cr32, bl32;
  isa_adder u32 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b), .cin(cin),
    .out_valid(ov32), .sum(s32), .cout(co32), .corrected(cr32), .balanced(bl32)
  );

  int c32, f32, o32, e32, k32, b32, h32;

  isa_check #(.N(32), .LATENCY(LAT)) chk32 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b), .cin(cin),
    .out_valid(ov32), .sum(s32), .cout(co32), .corrected(cr32), .balanced(bl32),
    .checks(c32), .failures(f32), .n_ops(o32), .n_exact(e32), .n_corrected(k32),
    .n_balanced(b32), .n_held(h32)
  );

  // Clock pulses per register rank of the 32-bit adder, sampled just after
  // each rising edge of the free-running clock.
  int rank_pulses [LAT];
  int gated_cycles = 0;
  int back_to_back = 0;
  int with_cin = 0;
  logic prev_valid = 1'b0;

  initial for (int k = 0; k < LAT; k++) rank_pulses[k] = 0;

  always @(posedge clk) begin
    #1;
    if (rst_n) for (int k = 0; k < LAT; k++) if (u32.gclk[k]) rank_pulses[k]++;
    if (rst_n && u32.gclk == '0) gated_cycles++;
  end

  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      if (prev_valid) back_to_back++;
      if (cin) with_cin++;
    end
    prev_valid <= rst_n && in_valid;
  end

  int checks = 0;
  int failures = 0;

  task automatic finish_run();
    int own_checks;
    own_checks = 0;
    checks   = c32;
    failures = failures + f32;
    $display("N=32: ops %0d exact %0d corrected %0d balanced %0d held %0d", o32, e32, k32, b32, h32);
    $display("N=32 rank pulses %p, fully gated cycles %0d", rank_pulses, gated_cycles);
    $display("back-to-back ops %0d, ops with carry-in %0d", back_to_back, with_cin);
    // Every result came back.
    own_checks += 3;
    if (o32 != NOPS) begin
      failures++;
      $display("FAIL accepted operation count");
    end
    if (c32 < 4 * NOPS) begin
      failures++;
      $display("FAIL not every result was returned");
    end
    if (ov32) begin
      failures++;
      $display("FAIL out_valid still high after the pipeline drained");
    end
    // Clock gating: each rank clocked once per operation, never otherwise.
    for (int k = 0; k < LAT; k++) begin
      own_checks++;
      if (rank_pulses[k] != NOPS) begin
        failures++;
        $display("FAIL rank %0d got %0d clock pulses for %0d operations", k, rank_pulses[k], NOPS);
      end
    end
    // Each mechanism happened.
    own_checks += 9;
    if (e32 == 0) begin failures++; $display("FAIL no exact result"); end
    if (k32 == 0) begin failures++; $display("FAIL no correction"); end
    if (b32 == 0) begin failures++; $display("FAIL no balancing"); end
    if (h32 == 0) begin failures++; $display("FAIL outputs never held"); end
    if (gated_cycles == 0) begin failures++; $display("FAIL no fully gated cycle"); end
    if (back_to_back == 0) begin failures++; $display("FAIL no back-to-back operations"); end
    if (with_cin == 0) begin failures++; $display("FAIL carry-in never set"); end
    if (c32 == 0) begin failures++; $display("FAIL no checks"); end
    if (rank_pulses[0] == 0) begin failures++; $display("FAIL no clock pulses"); end
    checks = checks + own_checks;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin : watchdog
    repeat (10 * NOPS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    checks = c32;
    failures = failures + f32;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sent;
    sent = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (sent < NOPS) begin
      @(negedge clk);
      if ((sent % 2000) == 1000 && !in_valid) begin
        // Long idle stretch: the whole pipeline drains and stays gated.
        in_valid = 1'b0;
        repeat (20) @(negedge clk);
      end
      if (($urandom % 8) < 6) begin
        in_valid = 1'b1;
        cin = ($urandom % 4) == 0;
        case ($urandom % 6)
          0: begin a = '1; b = 32'($urandom % 4); end      // carry ripples everywhere
          1: begin a = 32'h5555_5555 ^ $urandom; b = ~a; end // all propagate
          default: begin a = $urandom; b = $urandom; end
        endcase
        sent++;
      end else begin
        in_valid = 1'b0;
        a = $urandom;                                     // must be ignored
        b = $urandom;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + 4) @(negedge clk);
    finish_run();
  end

endmodule
