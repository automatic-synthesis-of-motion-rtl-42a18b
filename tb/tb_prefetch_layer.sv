// tb_prefetch_layer: runs the pre-fetch layer (N=4, P=4, C=1: L = 11, three
// columns) against a model of its search input controller that answers each
// fetch after a random delay with a column whose pixels encode (column,
// row, alignment, bank). For six sequences with random alignment and bank it
// checks: the layer fetches columns 0, 1, 2 in order with the alignment and
// bank given at `start`, one fetch at a time; `full` rises exactly when the
// third column is in and not before; the layer then holds columns 0 .. 2 in
// cols[0] .. cols[2]; `full` stays high until `xfer` and drops after it.
module tb_prefetch_layer;
  import me_pkg::*;
  localparam int N = 4, P = 4, C = 1;
  localparam int L  = C * ((2 * P) / C) + N - 1;
  localparam int NC = N - 1;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic               rst_n, start, start_dir, start_bank, xfer, full;
  logic               fetch, fetch_dir, fetch_bank, consume, ready;
  logic [COORD_W-1:0] fetch_col;
  pixel_t             col_in [L];
  pixel_t             cols [NC][L];

  prefetch_layer #(.N(N), .P(P), .C(C)) dut (.*);

  function automatic pixel_t px(input int x, input int r, input bit d, input bit b);
    return pixel_t'(x * 53 + r * 7 + (d ? 29 : 0) + (b ? 128 : 0));
  endfunction

  // controller model: one outstanding fetch, ready after a random delay
  int  delay, n_fetch;
  bit  busy_m, exp_dir, exp_bank;
  always @(posedge clk) begin
    if (!rst_n) begin
      ready <= 1'b0; busy_m <= 1'b0; n_fetch <= 0;
    end else begin
      if (consume) ready <= 1'b0;
      if (fetch) begin
        checks++;
        if (busy_m || ready) begin
          failures++; $display("fetch while the previous column is outstanding");
        end
        if (int'(fetch_col) != n_fetch % NC || fetch_dir != exp_dir || fetch_bank != exp_bank) begin
          failures++;
          $display("fetch %0d: col %0d dir %0d bank %0d, expected col %0d dir %0d bank %0d",
                   n_fetch, fetch_col, fetch_dir, fetch_bank, n_fetch % NC, exp_dir, exp_bank);
        end
        for (int r = 0; r < L; r++) col_in[r] <= px(int'(fetch_col), r, fetch_dir, fetch_bank);
        n_fetch <= n_fetch + 1;
        busy_m  <= 1'b1;
        delay   <= 2 + ($urandom % 12);
      end else if (busy_m) begin
        if (delay == 0) begin
          ready  <= 1'b1;
          busy_m <= 1'b0;
        end else delay <= delay - 1;
      end
    end
  end

  // `full` must not rise before the last column is consumed
  int n_consume;
  always @(posedge clk) begin
    if (!rst_n) n_consume <= 0;
    else begin
      if (start) n_consume <= 0;
      else if (consume) n_consume <= n_consume + 1;
      if (full && !xfer && !start) begin
        checks++;
        if (n_consume < NC) begin
          failures++; $display("full with only %0d columns loaded", n_consume);
        end
      end
    end
  end

  initial begin
    rst_n = 1'b0; start = 1'b0; start_dir = 1'b0; start_bank = 1'b0; xfer = 1'b0;
    exp_dir = 1'b0; exp_bank = 1'b0;
    foreach (col_in[r]) col_in[r] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 6; n++) begin
      int t;
      exp_dir  = $urandom % 2;
      exp_bank = $urandom % 2;
      start = 1'b1; start_dir = exp_dir; start_bank = exp_bank;
      @(negedge clk);
      start = 1'b0;
      t = 0;
      while (!full && t < 500) begin @(negedge clk); t++; end
      checks++;
      if (!full) begin
        failures++; $display("sequence %0d: layer never full", n);
      end
      checks++;
      if (n_fetch != NC * (n + 1)) begin
        failures++; $display("sequence %0d: %0d fetches in total, expected %0d", n, n_fetch, NC * (n + 1));
      end
      for (int j = 0; j < NC; j++)
        for (int r = 0; r < L; r++) begin
          checks++;
          if (cols[j][r] != px(j, r, exp_dir, exp_bank)) begin
            failures++;
            $display("sequence %0d: cols[%0d][%0d] = %0d, expected %0d", n, j, r,
                     cols[j][r], px(j, r, exp_dir, exp_bank));
          end
        end
      // the layer waits, full, until the transfer
      repeat ($urandom % 20) @(negedge clk);
      checks++;
      if (!full) begin failures++; $display("sequence %0d: full dropped before xfer", n); end
      xfer = 1'b1;
      @(negedge clk);
      xfer = 1'b0;
      checks++;
      if (full) begin failures++; $display("sequence %0d: still full after xfer", n); end
      repeat ($urandom % 4) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: prefetch_layer test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
