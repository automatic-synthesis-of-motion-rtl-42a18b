// tb_me_top: end-to-end test of the motion estimation processor at reduced
// sizes. Five processors run side by side:
//   u_a  N=4, P=4, C=1 (single active block, processor type A), ALPHA from
//        the clock-ratio rule: no hold after the first column of a run;
//   u_b  N=4, P=4, C=2 (two active blocks, processor type B);
//   u_s  N=4, P=4, C=1 with ALPHA=1, a processing clock too fast for the
//        search input buffer, so the control must hold the array before
//        every column load;
//   u_p  N=4, P=4, C=1 with the pre-fetch layer: macroblocks follow each
//        other every 2P*Q processing cycles;
//   u_q  N=4, P=4, C=2 with the pre-fetch layer.
// Each runs 3 macroblocks back to back, stops, and runs 2 more; every
// vector is checked against a brute-force full search (see me_top_harness).
module tb_me_top;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic fa, fb, fs, fp, fq;
  int   ca, cb, cs, cp, cq, xa, xb, xs, xp, xq;
  int   checks, failures;

  me_top_harness #(.N(4), .P(4), .C(1), .NEED_HOLD(1'b0), .SEED(1))
    u_a (.clk(clk), .finished(fa), .checks(ca), .failures(xa));
  me_top_harness #(.N(4), .P(4), .C(2), .NEED_HOLD(1'b0), .SEED(2))
    u_b (.clk(clk), .finished(fb), .checks(cb), .failures(xb));
  me_top_harness #(.N(4), .P(4), .C(1), .ALPHA(1), .NEED_HOLD(1'b1), .SEED(3))
    u_s (.clk(clk), .finished(fs), .checks(cs), .failures(xs));
  me_top_harness #(.N(4), .P(4), .C(1), .PREFETCH(1'b1), .NEED_HOLD(1'b0), .SEED(4))
    u_p (.clk(clk), .finished(fp), .checks(cp), .failures(xp));
  me_top_harness #(.N(4), .P(4), .C(2), .PREFETCH(1'b1), .NEED_HOLD(1'b0), .SEED(5))
    u_q (.clk(clk), .finished(fq), .checks(cq), .failures(xq));

  initial begin
    fork
      begin
        wait (fa && fb && fs && fp && fq);
        checks   = ca + cb + cs + cp + cq;
        failures = xa + xb + xs + xp + xq;
      end
      begin
        repeat (200000) @(posedge clk);
        checks   = ca + cb + cs + cp + cq;
        failures = xa + xb + xs + xp + xq + 1;
        $display("watchdog: end-to-end test did not finish");
      end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
