// tb_me_top_proc_b: full-size run of the two-core processor (processor type
// B: two active blocks of 16 x 16 PEs, search range -15..+16) with the
// pre-fetch layer. Each core covers 16 candidate rows per search column, so
// a macroblock takes 2P*Q = 32*16 = 512 processing cycles, and the clock
// ratio rises to ALPHA = ceil(2 + 18/16) = 4. The processor runs two
// macroblocks back to back, stops, and runs one more; every vector is
// checked against a brute-force search over all 32 x 32 candidates, and the
// back-to-back spacing against 512*4 clocks (see me_top_harness).
module tb_me_top_proc_b;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic finished;
  int   checks, failures;

  me_top_harness #(.N(16), .P(16), .C(2), .PREFETCH(1'b1), .NEED_HOLD(1'b0), .RUN1(2), .RUN2(1), .SEED(7))
    u_b (.clk(clk), .finished(finished), .checks(checks), .failures(failures));

  initial begin
    int res_c, res_f;
    fork
      begin
        wait (finished);
        res_c = checks;
        res_f = failures;
      end
      begin
        repeat (100000) @(posedge clk);
        res_c = checks;
        res_f = failures + 1;
        $display("watchdog: processor B test did not finish");
      end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", res_c, res_f);
    $finish;
  end
endmodule
