// tb_sa_input_buffer: shifts random search columns into two input buffers
// (N=16, P=16, C=1: L = 47, and N=4, P=4, C=2: L = 11) in both alignment
// modes, with idle cycles between shifts, and checks that position k holds
// row k (dir = 0) or row (k + Q - 1) mod L (dir = 1) after L shifts.
module tb_sa_input_buffer;
  import me_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int done_cnt = 0;

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  for (genvar gi = 0; gi < 2; gi++) begin : g_cfg
    localparam int N = (gi == 0) ? 16 : 4;
    localparam int P = (gi == 0) ? 16 : 4;
    localparam int C = gi + 1;
    localparam int Q = (2 * P) / C;
    localparam int L = C * Q + N - 1;

    logic   shift, dir;
    pixel_t sin;
    pixel_t q [L];
    pixel_t col [L];

    sa_input_buffer #(.N(N), .P(P), .C(C)) dut (.clk(clk), .shift(shift), .dir(dir), .sin(sin), .q(q));

    initial begin
      shift = 1'b0; dir = 1'b0; sin = '0;
      @(negedge clk);
      for (int n = 0; n < 6; n++) begin
        dir = n[0];
        for (int y = 0; y < L; y++) col[y] = pixel_t'($urandom);
        for (int y = 0; y < L; y++) begin
          while ($urandom % 4 == 0) begin
            shift = 1'b0; @(negedge clk);
          end
          shift = 1'b1; sin = col[y];
          @(negedge clk);
        end
        shift = 1'b0;
        @(negedge clk);
        for (int k = 0; k < L; k++) begin
          int row;
          row = dir ? (k + Q - 1) % L : k;
          checks++;
          if (q[k] !== col[row]) begin
            failures++;
            $display("L=%0d dir=%0d pos %0d: %h expected row %0d = %h", L, dir, k, q[k], row, col[row]);
          end
        end
      end
      done_cnt++;
    end
  end

  initial begin
    wait (done_cnt == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
