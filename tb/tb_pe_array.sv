// tb_pe_array: drives two processing arrays (N=4, P=4 with C=1 and C=2)
// through a complete zig-zag search of a random L x L window.
//
// The reference block is shifted in column by column and transferred to the
// standing-data registers. Each search column x is then loaded with the
// alignment of the ring's current offset (pixel of row (k+off) mod L at
// position k) and rotated Q-1 times, forward when loaded at offset 0 and
// backward when loaded at offset Q-1. Once N columns are in, after every
// op each core's row sums must equal
//   sum_j |R[i][j] - S[c*Q + i + off][x - (N-1) + j]|
// computed directly from the window. A hold cycle (en low) in the middle
// checks that nothing moves.
module tb_pe_array;
  import me_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  localparam int N = 4;
  localparam int P = 4;

  int done1 = 0, done2 = 0;

  for (genvar gi = 0; gi < 2; gi++) begin : g_cfg
    localparam int C = gi + 1;
    localparam int Q = (2 * P) / C;
    localparam int L = C * Q + N - 1;
    localparam int ROW_W = PIX_W + $clog2(N);

    logic             rst_n, en, ref_shift, ref_xfer;
    shift_op_e        op;
    pixel_t           col_in [L];
    pixel_t           ref_col [N];
    pixel_t           pf_cols [N-1][L];   // pre-fetch transfer not used here
    initial foreach (pf_cols[j, r]) pf_cols[j][r] = 8'(0);
    logic [ROW_W-1:0] row_sum [C][N];
    int               S [L][L];
    int               R [N][N];

    pe_array #(.N(N), .P(P), .C(C)) dut (
      .clk(clk), .rst_n(rst_n), .en(en), .op(op), .col_in(col_in), .ref_col(ref_col),
      .pf_xfer(1'b0), .pf_cols(pf_cols), .ref_shift(ref_shift), .ref_xfer(ref_xfer), .row_sum(row_sum));

    task automatic check_sums(input int x, input int off);
      for (int c = 0; c < C; c++)
        for (int i = 0; i < N; i++) begin
          int e = 0;
          for (int j = 0; j < N; j++) begin
            int d = R[i][j] - S[c*Q + i + off][x - (N - 1) + j];
            e += (d < 0) ? -d : d;
          end
          checks++;
          if (int'(row_sum[c][i]) != e) begin
            failures++;
            $display("C=%0d col %0d off %0d core %0d row %0d: sum %0d expected %0d",
                     C, x, off, c, i, row_sum[c][i], e);
          end
        end
    endtask

    initial begin
      int off;
      bit fwd;
      rst_n = 1'b0; en = 1'b0; op = SH_HOLD; ref_shift = 0; ref_xfer = 0;
      for (int k = 0; k < L; k++) col_in[k] = '0;
      for (int i = 0; i < N; i++) ref_col[i] = '0;
      for (int y = 0; y < L; y++) for (int x = 0; x < L; x++) S[y][x] = $urandom % 256;
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) R[i][j] = $urandom % 256;
      @(negedge clk); rst_n = 1'b1;
      // reference block: columns 0..N-1, then transfer
      for (int j = 0; j < N; j++) begin
        for (int i = 0; i < N; i++) ref_col[i] = pixel_t'(R[i][j]);
        ref_shift = 1'b1;
        @(negedge clk);
      end
      ref_shift = 1'b0; ref_xfer = 1'b1;
      @(negedge clk);
      ref_xfer = 1'b0;
      off = 0;
      en  = 1'b1;
      for (int x = 0; x < L; x++) begin
        fwd = (off == 0);
        for (int k = 0; k < L; k++) col_in[k] = pixel_t'(S[(k + off) % L][x]);
        op = SH_LEFT;
        @(negedge clk);
        if (x >= N - 1) check_sums(x, off);
        for (int t = 1; t < Q; t++) begin
          op  = fwd ? SH_FWD : SH_BWD;
          off = fwd ? off + 1 : off - 1;
          @(negedge clk);
          if (x >= N - 1) check_sums(x, off);
          if (x == N && t == 2) begin
            en = 1'b0;
            @(negedge clk);
            check_sums(x, off);
            en = 1'b1;
          end
        end
      end
      if (gi == 0) done1 = 1; else done2 = 1;
    end
  end

  initial begin
    wait (done1 == 1 && done2 == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
