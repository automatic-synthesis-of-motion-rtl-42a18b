// tb_clock_gen: checks that proc_en is high in exactly one of every ALPHA
// clocks (ALPHA = 1, 2, 3) starting with the first clock after reset, and
// that reset restarts the phase.
module tb_clock_gen;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n;
  logic en1, en2, en3;

  clock_gen #(.ALPHA(1)) u1 (.clk(clk), .rst_n(rst_n), .proc_en(en1));
  clock_gen #(.ALPHA(2)) u2 (.clk(clk), .rst_n(rst_n), .proc_en(en2));
  clock_gen #(.ALPHA(3)) u3 (.clk(clk), .rst_n(rst_n), .proc_en(en3));

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic check_run(input int n);
    for (int t = 0; t < n; t++) begin
      checks += 3;
      if (en1 !== 1'b1)              begin failures++; $display("t=%0d ALPHA=1 en=%b", t, en1); end
      if (en2 !== (t % 2 == 0))      begin failures++; $display("t=%0d ALPHA=2 en=%b", t, en2); end
      if (en3 !== (t % 3 == 0))      begin failures++; $display("t=%0d ALPHA=3 en=%b", t, en3); end
      @(negedge clk);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check_run(50);
    @(negedge clk);  // phase now arbitrary; reset again
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    check_run(31);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
