// tb_ccu: runs the central control unit in both schedules side by side:
// without the pre-fetch layer (every window is filled through N-1 ordinary
// column loads) and with it (the first N-1 columns arrive from the layer at
// the first load of each macroblock). See ccu_harness for the checks.
module tb_ccu;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic f0, f1;
  int   c0, c1, x0, x1;

  ccu_harness #(.PREFETCH(1'b0)) u_plain (.clk(clk), .finished(f0), .checks(c0), .failures(x0));
  ccu_harness #(.PREFETCH(1'b1)) u_pf    (.clk(clk), .finished(f1), .checks(c1), .failures(x1));

  initial begin
    int rc, rf;
    fork
      begin
        wait (f0 && f1);
        rc = c0 + c1; rf = x0 + x1;
      end
      begin
        repeat (200000) @(posedge clk);
        rc = c0 + c1; rf = x0 + x1 + 1;
        $display("watchdog: ccu test did not finish");
      end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", rc, rf);
    $finish;
  end
endmodule
