// pe_array: the cylindrical processing array of C active blocks (cores).
//
// The array holds N columns of the search window, each column being a ring
// of L = C*Q + N - 1 search pixels (Q = floor(2P/C)). Along the ring, core c
// occupies the N consecutive positions c*Q .. c*Q+N-1 (active PEs); the
// positions between cores are passive PEs (m = Q - N per gap) and the last
// Q-1 positions form the last passive block, whose final N-1 rows are the
// connection block that closes the ring back onto core 0. Because the ring
// is closed, the zig-zag search needs only one passive block: after a column
// load the ring rotates one position per cycle, forward for one search
// column and backward for the next, so that in Q cycles core c sees the
// candidate rows c*Q .. c*Q+Q-1 of the current search column.
//
// Per cycle (`en` high) `op` applies to every search register:
//   SH_LEFT  columns move one step left, column N-1 takes `col_in` (L pixels
//            from the search input buffer, already aligned to the ring);
//   SH_FWD / SH_BWD  every column rotates its ring by one position.
// Each active row accumulates |ref - search| from right to left; the N row
// sums of every core leave on `row_sum` in the same cycle (combinational
// from the registers).
//
// With `pf_xfer` high during an SH_LEFT, columns 0 .. N-2 take the columns
// of the pre-fetch layer (`pf_cols[j]` into column j) instead of their right
// neighbours, so a whole new window is in place after one cycle.
//
// Reference pixels: `ref_col` carries one column of the reference block
// (N pixels, row i for core row i, shared by all cores). `ref_shift` moves
// the running-data registers one column left and inserts `ref_col` in column
// N-1; after N shifts the whole block is held, and `ref_xfer` copies it to
// the standing-data registers used in the computation.
//
// The ring geometry, block sizes and the three displacement directions are
// the architecture's; this design builds the configuration in which every
// active block covers the whole macroblock (h = l = N, one reference
// fraction), and it requires Q >= N.
module pe_array
  import me_pkg::*;
#(
  parameter int N = 16,
  parameter int P = 16,
  parameter int C = 1,
  localparam int NC    = (N > 1) ? N - 1 : 1,
  localparam int Q     = (2 * P) / C,
  localparam int L     = C * Q + N - 1,
  localparam int ROW_W = PIX_W + $clog2(N)
)(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  shift_op_e           op,
  input  pixel_t              col_in  [L],
  input  logic                pf_xfer,
  input  pixel_t              pf_cols [NC][L],
  input  pixel_t              ref_col [N],
  input  logic                ref_shift,
  input  logic                ref_xfer,
  output logic [ROW_W-1:0]    row_sum [C][N]
);

  initial begin
    assert (Q >= N)
      else $fatal(1, "pe_array: floor(2P/C) must be at least N");
  end

  // s[r][j]: search pixel at ring position r, array column j (0 = leftmost)
  pixel_t            s     [L][N];
  pixel_t            rout  [C][N][N];   // running-data chain, per core/row/column

  for (genvar r = 0; r < L; r++) begin : g_ring
    localparam int CORE = r / Q;
    localparam int ROW  = r % Q;
    localparam bit ACT  = (CORE < C) && (ROW < N);
    localparam int RN   = (r + 1) % L;
    localparam int RP   = (r + L - 1) % L;

    for (genvar j = 0; j < N; j++) begin : g_col
      pixel_t           right_px;
      logic [ROW_W-1:0] pin;   // partial row sum from the right neighbour
      logic [ROW_W-1:0] pout;  // partial row sum including this PE
      if (j == N - 1) begin : g_edge
        assign right_px = col_in[r];
      end else begin : g_inner
        assign right_px = pf_xfer ? pf_cols[j][r] : s[r][j+1];
      end

      if (ACT) begin : g_active
        pixel_t ref_right;
        if (j == N - 1) begin : g_redge
          assign ref_right = ref_col[ROW];
        end else begin : g_rinner
          assign ref_right = rout[CORE][ROW][j+1];
        end
        active_pe #(.SUM_W(ROW_W), .NFRAC(1)) u_pe (
          .clk       (clk),
          .rst_n     (rst_n),
          .en        (en),
          .op        (op),
          .from_right(right_px),
          .from_next (s[RN][j]),
          .from_prev (s[RP][j]),
          .s         (s[r][j]),
          .ref_in    (ref_right),
          .ref_shift (ref_shift),
          .ref_wsel  (1'b0),
          .ref_out   (rout[CORE][ROW][j]),
          .ref_xfer  (ref_xfer),
          .frac_sel  (1'b0),
          .psum_in   (pin),
          .psum_out  (pout)
        );
      end else begin : g_passive
        passive_pe u_pe (
          .clk       (clk),
          .en        (en),
          .op        (op),
          .from_right(right_px),
          .from_next (s[RN][j]),
          .from_prev (s[RP][j]),
          .s         (s[r][j])
        );
        assign pout = '0;
      end
    end

    // row accumulation runs from column N-1 to column 0
    for (genvar j = 0; j < N; j++) begin : g_acc
      if (j == N - 1) begin : g_first
        assign g_col[j].pin = '0;
      end else begin : g_chain
        assign g_col[j].pin = g_col[j+1].pout;
      end
    end
  end

  for (genvar c = 0; c < C; c++) begin : g_sum
    for (genvar i = 0; i < N; i++) begin : g_row
      assign row_sum[c][i] = g_ring[c*Q + i].g_col[0].pout;
    end
  end

endmodule
