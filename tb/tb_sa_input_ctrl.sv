// tb_sa_input_ctrl: requests search columns (N=4, P=4, C=1: L = 11) from
// the search input controller with random column, direction and bank, and
// checks: the reads address rows 0..L-1 of the requested column and bank in
// order; the pixels shifted into the buffer are those the memory returned,
// in order, with the latched direction; `ready` rises L+2 clocks after the
// request, stays high until `consume`, and a new request may arrive in the
// same cycle as `consume`.
module tb_sa_input_ctrl;
  import me_pkg::*;
  localparam int N = 4, P = 4, C = 1;
  localparam int L = C * ((2 * P) / C) + N - 1;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic               rst_n, fetch, fetch_dir, fetch_bank, consume, ready;
  logic [COORD_W-1:0] fetch_col;
  logic               rd_en, rd_bank, buf_shift, buf_dir;
  logic [COORD_W-1:0] rd_row, rd_col;
  pixel_t             rd_data, buf_sin;

  sa_input_ctrl #(.N(N), .P(P), .C(C)) dut (.*);

  function automatic pixel_t mem(input logic b, input int y, input int x);
    return pixel_t'((y * 37 + x * 11 + (b ? 101 : 3)) ^ 8'h5C);
  endfunction

  always @(posedge clk) if (rd_en) rd_data <= mem(rd_bank, int'(rd_row), int'(rd_col));

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // collected per request
  int     nshift, nread;
  pixel_t got [L];
  int     cur_col;
  logic   cur_bank, cur_dir;

  always @(posedge clk) if (rst_n) begin
    if (rd_en) begin
      checks++;
      if (int'(rd_row) != nread || int'(rd_col) != cur_col || rd_bank != cur_bank) begin
        failures++;
        $display("read %0d: row %0d col %0d bank %0d, expected row %0d col %0d bank %0d",
                 nread, rd_row, rd_col, rd_bank, nread, cur_col, cur_bank);
      end
      nread++;
    end
    if (buf_shift) begin
      checks++;
      if (buf_dir != cur_dir) begin
        failures++; $display("buffer direction %0d, expected %0d", buf_dir, cur_dir);
      end
      if (nshift < L) got[nshift] = buf_sin;
      nshift++;
    end
  end

  initial begin
    rst_n = 1'b0; fetch = 0; fetch_dir = 0; fetch_bank = 0; consume = 0; fetch_col = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 6; n++) begin
      int t;
      cur_col = $urandom % L; cur_bank = $urandom % 2; cur_dir = $urandom % 2;
      nshift = 0; nread = 0;
      fetch = 1'b1; fetch_col = COORD_W'(cur_col); fetch_dir = cur_dir; fetch_bank = cur_bank;
      consume = (n > 0);       // previous column taken in the same cycle
      @(negedge clk);
      fetch = 1'b0; consume = 1'b0;
      t = 1;
      while (!ready && t < 100) begin
        @(negedge clk); t++;
      end
      checks += 3;
      if (t != L + 2) begin
        failures++; $display("request %0d: ready after %0d clocks, expected %0d", n, t, L + 2);
      end
      if (nshift != L || nread != L) begin
        failures++; $display("request %0d: %0d reads %0d shifts, expected %0d", n, nread, nshift, L);
      end
      begin
        int bad = 0;
        for (int y = 0; y < L; y++) if (got[y] !== mem(cur_bank, y, cur_col)) bad++;
        if (bad != 0) begin
          failures++; $display("request %0d: %0d pixels wrong", n, bad);
        end
      end
      repeat ($urandom % 4) @(negedge clk);
      checks++;
      if (!ready) begin
        failures++; $display("request %0d: ready dropped before consume", n);
      end
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
