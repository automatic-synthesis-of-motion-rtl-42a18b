// tb_ref_input_ctrl: the reference input controller (N = 4) loads a
// reference block through a real reference input register into a model of
// one row-chain of running-data registers per row. Checks: reads are
// column-major over the requested bank; `arr_shift` pulses once per column,
// when the input register holds that complete column; after N pulses the
// modelled running registers hold the block; `ready` rises N*N+3 clocks
// after the request and falls on `consume`.
module tb_ref_input_ctrl;
  import me_pkg::*;
  localparam int N = 4;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic               rst_n, fetch, fetch_bank, consume, ready;
  logic               rd_en, rd_bank, buf_shift, arr_shift;
  logic [COORD_W-1:0] rd_row, rd_col;
  pixel_t             rd_data, buf_sin;
  pixel_t             col [N];
  pixel_t             run [N][N];   // model of the running-data registers

  ref_input_ctrl #(.N(N)) dut (.*);
  ref_input_buffer #(.N(N)) u_buf (.clk(clk), .shift(buf_shift), .sin(buf_sin), .q(col));

  function automatic pixel_t mem(input logic b, input int i, input int j);
    return pixel_t'((i * 29 + j * 13 + (b ? 77 : 5)) ^ 8'hA3);
  endfunction

  always @(posedge clk) if (rd_en) rd_data <= mem(rd_bank, int'(rd_row), int'(rd_col));

  int nread, nshift;
  logic cur_bank;
  always @(posedge clk) if (rst_n) begin
    if (rd_en) begin
      checks++;
      if (int'(rd_row) != nread % N || int'(rd_col) != nread / N || rd_bank != cur_bank) begin
        failures++; $display("read %0d: row %0d col %0d bank %0d", nread, rd_row, rd_col, rd_bank);
      end
      nread++;
    end
    if (arr_shift) begin
      for (int i = 0; i < N; i++) begin
        for (int j = 0; j < N - 1; j++) run[i][j] <= run[i][j+1];
        run[i][N-1] <= col[i];
      end
      nshift++;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    rst_n = 1'b0; fetch = 0; fetch_bank = 0; consume = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4; n++) begin
      int t;
      cur_bank = n[0];
      nread = 0; nshift = 0;
      fetch = 1'b1; fetch_bank = cur_bank; consume = (n > 0);
      @(negedge clk);
      fetch = 1'b0; consume = 1'b0;
      t = 1;
      while (!ready && t < 200) begin
        @(negedge clk); t++;
      end
      checks += 3;
      if (t != N * N + 3) begin
        failures++; $display("block %0d: ready after %0d clocks, expected %0d", n, t, N * N + 3);
      end
      if (nshift != N) begin
        failures++; $display("block %0d: %0d column shifts, expected %0d", n, nshift, N);
      end
      begin
        int bad = 0;
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++)
            if (run[i][j] !== mem(cur_bank, i, j)) bad++;
        if (bad != 0) begin
          failures++; $display("block %0d: %0d running registers wrong", n, bad);
        end
      end
      repeat (3) @(negedge clk);
    end
    consume = 1'b1;
    @(negedge clk);
    consume = 1'b0;
    checks++;
    if (ready) begin
      failures++; $display("ready still high after consume");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
