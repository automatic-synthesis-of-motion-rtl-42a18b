// tb_ref_input_buffer: shifts random reference columns (N = 16) into the
// reference input register, with idle cycles, and checks that position i
// holds row i after N shifts and that the register holds its contents while
// `shift` is low.
module tb_ref_input_buffer;
  import me_pkg::*;
  localparam int N = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic   shift;
  pixel_t sin;
  pixel_t q [N];
  pixel_t col [N];

  ref_input_buffer #(.N(N)) dut (.clk(clk), .shift(shift), .sin(sin), .q(q));

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    shift = 1'b0; sin = '0;
    @(negedge clk);
    for (int n = 0; n < 8; n++) begin
      for (int i = 0; i < N; i++) col[i] = pixel_t'($urandom);
      for (int i = 0; i < N; i++) begin
        while ($urandom % 3 == 0) begin
          shift = 1'b0; sin = pixel_t'($urandom); @(negedge clk);
        end
        shift = 1'b1; sin = col[i];
        @(negedge clk);
      end
      shift = 1'b0; sin = pixel_t'($urandom);
      repeat (2) @(negedge clk);
      for (int i = 0; i < N; i++) begin
        checks++;
        if (q[i] !== col[i]) begin
          failures++; $display("column %0d row %0d: %h expected %h", n, i, q[i], col[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
