// Self-checking testbench for pcomp, the pipelined compensator.
//
// All 32 combinations of c_o, c_so, the next block's sum LSB and the lower
// block's two sum MSBs are streamed through, one per clock, with both rank
// clocks tied to one clock. The expected action is worked out arithmetically:
// a mismatch of c_o and c_so means the next block is short by one; adding one
// to its LSB is exact when that bit is 0 (correction), otherwise the lower
// block's two MSBs become 11 (balancing). Results must appear two rising
// edges after the inputs.
`timescale 1ns/1ps
module tb_pcomp;

  localparam int unsigned LATENCY = 2;

  logic       clk = 1'b0;
  logic       c_o = 1'b0, c_so = 1'b0, s_lsb_next = 1'b0;
  logic [1:0] s_msb_pair = '0;
  logic       s_lsb_out, corrected, balanced;
  logic [1:0] s_msb_out;
  int         checks = 0;
  int         failures = 0;
  int         n_corr = 0, n_bal = 0;

  pcomp dut (
    .clk_d(clk), .clk_m(clk),
    .c_o(c_o), .c_so(c_so), .s_lsb_next(s_lsb_next), .s_msb_pair(s_msb_pair),
    .s_lsb_out(s_lsb_out), .s_msb_out(s_msb_out),
    .corrected(corrected), .balanced(balanced)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NOPS = 64;
  logic [4:0] exp_out [NOPS];   // {corrected, balanced, lsb, msb[1:0]}

  initial begin
    for (int i = 0; i < NOPS; i++) begin
      int v, next_blk, lo_msbs;
      logic err;
      v = i % 32;
      err      = v[4] != v[3];
      next_blk = v[2];             // LSB of the next block
      lo_msbs  = v[1:0];
      if (err && next_blk + 1 < 2) exp_out[i] = {1'b1, 1'b0, 1'(next_blk + 1), 2'(lo_msbs)};
      else if (err)                exp_out[i] = {1'b0, 1'b1, 1'(next_blk), 2'b11};
      else                         exp_out[i] = {1'b0, 1'b0, 1'(next_blk), 2'(lo_msbs)};
    end
    for (int k = 0; k < NOPS + LATENCY; k++) begin
      @(negedge clk);
      if (k >= LATENCY) begin
        int op;
        op = k - LATENCY;
        checks++;
        if ({corrected, balanced, s_lsb_out, s_msb_out} !== exp_out[op]) begin
          failures++;
          $display("FAIL op %0d: got %b expected %b", op,
                   {corrected, balanced, s_lsb_out, s_msb_out}, exp_out[op]);
        end
        if (corrected) n_corr++;
        if (balanced)  n_bal++;
      end
      if (k < NOPS) begin
        {c_o, c_so, s_lsb_next, s_msb_pair} = 5'(k % 32);
      end
    end
    checks++;
    if (n_corr == 0 || n_bal == 0) begin
      failures++;
      $display("FAIL correction or balancing never happened");
    end
    $display("corrections %0d, balancings %0d", n_corr, n_bal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
