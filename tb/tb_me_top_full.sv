// tb_me_top_full: full-size test of the motion estimation processor with
// every parameter at its default (N = 16, search range -15..+16, one active
// block, ALPHA = 2, pre-fetch layer built). It runs two macroblocks back to
// back (reference blocks copied from the window at random offsets), stops,
// and runs a third (a noise reference block), checking each vector against
// a brute-force search over all 32 x 32 candidates and the back-to-back
// spacing of 32*32*2 = 2048 clocks per macroblock.
module tb_me_top_full;
  import me_pkg::*;

  localparam int N         = 16;
  localparam int P         = 16;
  localparam int C         = 1;
  localparam int ALPHA     = min_alpha(N, P, C);
  localparam bit PREFETCH  = 1'b1;
  localparam bit NEED_HOLD = 1'b0;
  localparam int RUN1      = 2;
  localparam int RUN2      = 1;
  localparam int SEED      = 5;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic finished;
  int   checks, failures;

`define ME_TOP_INST me_top dut (.*);
`include "me_top_check.svh"
`undef ME_TOP_INST

  initial begin
    fork
      wait (finished);
      begin
        repeat (100000) @(posedge clk);
        failures = failures + 1;
        $display("watchdog: full-size test did not finish");
      end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
