// End-to-end testbench for isa_adder at the two smaller widths the
// architecture was evaluated at: 16 bits (four 4-bit blocks) and 8 bits
// (two blocks). Both adders take the same stimulus: random operands mixed
// with patterns that force long carry chains, random gaps in in_valid and
// long idle stretches. An isa_check scoreboard per adder checks every
// result, its latency and the hold of the outputs; correction, balancing and
// exact results must each occur at both widths.
`timescale 1ns/1ps
module tb_isa_widths;
  import isa_pkg::*;

  localparam int unsigned NOPS = 20000;
  localparam int unsigned LAT  = REG_RANKS;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        in_valid = 1'b0;
  logic [15:0] a = '0, b = '0;
  logic        cin = 1'b0;

  always #5 clk = ~clk;

  logic        ov16, co16;
  logic [15:0] s16;
  logic [2:0]  cr16, bl16;
  isa_adder #(.N(16)) u16 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b), .cin(cin),
    .out_valid(ov16), .sum(s16), .cout(co16), .corrected(cr16), .balanced(bl16)
  );

  logic        ov8, co8;
  logic [7:0]  s8;
  logic [0:0]  cr8, bl8;
  isa_adder #(.N(8)) u8 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a[7:0]), .b(b[7:0]), .cin(cin),
    .out_valid(ov8), .sum(s8), .cout(co8), .corrected(cr8), .balanced(bl8)
  );

  int c16, f16, o16, e16, k16, b16, h16;
  int c8,  f8,  o8,  e8,  k8,  b8,  h8;

  isa_check #(.N(16), .LATENCY(LAT)) chk16 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b), .cin(cin),
    .out_valid(ov16), .sum(s16), .cout(co16), .corrected(cr16), .balanced(bl16),
    .checks(c16), .failures(f16), .n_ops(o16), .n_exact(e16), .n_corrected(k16),
    .n_balanced(b16), .n_held(h16)
  );
  isa_check #(.N(8), .LATENCY(LAT)) chk8 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a[7:0]), .b(b[7:0]), .cin(cin),
    .out_valid(ov8), .sum(s8), .cout(co8), .corrected(cr8), .balanced(bl8),
    .checks(c8), .failures(f8), .n_ops(o8), .n_exact(e8), .n_corrected(k8),
    .n_balanced(b8), .n_held(h8)
  );

  int checks = 0;
  int failures = 0;

  initial begin : watchdog
    repeat (10 * NOPS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c16 + c8, failures + f16 + f8);
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
        in_valid = 1'b0;
        repeat (20) @(negedge clk);
      end
      if (($urandom % 8) < 6) begin
        in_valid = 1'b1;
        cin = ($urandom % 4) == 0;
        case ($urandom % 6)
          0: begin a = '1; b = 16'($urandom % 4); end
          1: begin a = 16'h5555 ^ 16'($urandom); b = ~a; end
          default: begin a = 16'($urandom); b = 16'($urandom); end
        endcase
        sent++;
      end else begin
        in_valid = 1'b0;
        a = 16'($urandom);
        b = 16'($urandom);
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + 4) @(negedge clk);
    $display("N=16: ops %0d exact %0d corrected %0d balanced %0d held %0d", o16, e16, k16, b16, h16);
    $display("N=8 : ops %0d exact %0d corrected %0d balanced %0d held %0d", o8, e8, k8, b8, h8);
    checks = c16 + c8 + 5;
    failures = failures + f16 + f8;
    if (o16 != NOPS || o8 != NOPS) begin failures++; $display("FAIL accepted operation count"); end
    if (c16 < 4 * NOPS || c8 < 4 * NOPS) begin failures++; $display("FAIL results missing"); end
    if (e16 == 0 || e8 == 0) begin failures++; $display("FAIL no exact result"); end
    if (k16 == 0 || k8 == 0) begin failures++; $display("FAIL no correction"); end
    if (b16 == 0 || b8 == 0) begin failures++; $display("FAIL no balancing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
