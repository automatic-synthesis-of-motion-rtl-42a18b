// me_top: full-search block-matching motion estimation processor.
//
// For every N x N reference macroblock the processor evaluates the SAD of
// all C*Q x C*Q candidate positions (Q = floor(2P/C)) of an L x L search
// window (L = C*Q + N - 1, candidate displacements -(P-1) .. +P) and reports
// the displacement with the smallest SAD. It is built from:
//   - a cylindrical processing array (pe_array) with C active blocks of
//     N x N active PEs and the passive PEs that close the ring;
//   - one pipelined adder tree per active block and a comparator;
//   - a search-area SIPO input buffer with its alignment multiplexers and
//     controller, and a reference SIPO register with its controller;
//   - the central control unit (ccu) and the clock generator;
//   - the pre-fetch layer with its own input controller and buffer.
// Each processing cycle yields C SADs. With the pre-fetch layer
// (PREFETCH = 1, the default) the first N-1 columns of the next window are
// loaded into a transparent layer while the current macroblock is processed
// and enter the array in one cycle, so a macroblock takes C*Q*Q processing
// cycles ((2P)^2 = 1024 at the defaults for C = 1) and the array computes a
// candidate in every processing cycle. The layer reads the search memory
// through its own port (`pf_rd_*`). With PREFETCH = 0 the layer is not
// built, the second port is idle, and the first N-1 columns pass through the
// array, so a macroblock takes L*Q cycles. Macroblocks follow each other
// without gaps: the next reference block and the next window's first
// columns are fetched while the current block is processed.
//
// Clocking: one clock, `clk`, is the read clock of the input buffers; the
// processing clock is the enable generated every ALPHA clocks
// (ALPHA = ceil(C + (N+2)/Q) by default). A smaller ALPHA is legal: the
// control then holds the array (`wait_data`) until the next search column is
// in the buffer.
//
// External memories: the search window and the reference block are read
// through two ports (`sa_rd_*`, `ref_rd_*`) with one clock of read latency;
// `*_rd_bank` selects one of two window/block buffers, alternating per
// macroblock, so the host can write the next one while the current one is
// read. The motion vector (mv_x, mv_y, mv_sad) is valid for one clock with
// `mv_valid`, LAT + 2 processing cycles after `done` (LAT = ceil(log2 N)).
//
// What follows the architecture: the ring array, its zig-zag schedule, the
// input buffer alignment, the running/standing reference registers, the
// adder trees and comparator, the transparent pre-fetch layer and the clock
// ratio. This design's own choices: 8-bit pixels, one-clock memory ports
// with bank bits, a separate search port for the pre-fetch layer, the
// start/num_mb interface, pipelined adder trees, and the option of leaving
// the pre-fetch layer out.
module me_top
  import me_pkg::*;
#(
  parameter int N     = 16,
  parameter int P     = 16,
  parameter int C     = 1,
  parameter int ALPHA = min_alpha(N, P, C),
  parameter bit PREFETCH = 1'b1,
  localparam int Q     = (2 * P) / C,
  localparam int NC    = (N > 1) ? N - 1 : 1,
  localparam int L     = C * Q + N - 1,
  localparam int ROW_W = PIX_W + $clog2(N),
  localparam int LEV   = (N > 1) ? $clog2(N) : 1,
  localparam int SAD_W = ROW_W + LEV
)(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [15:0]               num_mb,
  output logic                      busy,
  output logic                      done,
  output logic                      wait_data,
  // search-area memory port
  output logic                      sa_rd_en,
  output logic [COORD_W-1:0]        sa_rd_row,
  output logic [COORD_W-1:0]        sa_rd_col,
  output logic                      sa_rd_bank,
  input  pixel_t                    sa_rd_data,
  // second search-area port, used by the pre-fetch layer (PREFETCH = 1)
  output logic                      pf_rd_en,
  output logic [COORD_W-1:0]        pf_rd_row,
  output logic [COORD_W-1:0]        pf_rd_col,
  output logic                      pf_rd_bank,
  input  pixel_t                    pf_rd_data,
  // reference memory port
  output logic                      ref_rd_en,
  output logic [COORD_W-1:0]        ref_rd_row,
  output logic [COORD_W-1:0]        ref_rd_col,
  output logic                      ref_rd_bank,
  input  pixel_t                    ref_rd_data,
  // motion vector
  output logic                      mv_valid,
  output logic signed [COORD_W-1:0] mv_x,
  output logic signed [COORD_W-1:0] mv_y,
  output logic [SAD_W-1:0]          mv_sad
);

  logic               proc_en;

  logic               sa_fetch, sa_fetch_dir, sa_fetch_bank, sa_consume, sa_ready;
  logic [COORD_W-1:0] sa_fetch_col;
  logic               ref_fetch, ref_fetch_bank, ref_xfer, ref_ready;
  shift_op_e          op;
  cand_tag_t          tag;

  logic               sab_shift, sab_dir;
  pixel_t             sab_sin;
  pixel_t             col_in [L];

  logic               rb_shift, ref_arr_shift;
  pixel_t             rb_sin;
  pixel_t             ref_col [N];

  logic [ROW_W-1:0]   row_sum [C][N];
  logic [SAD_W-1:0]   sad     [C];
  logic [TAG_W-1:0]   tree_tag [C];

  clock_gen #(.ALPHA(ALPHA)) u_clkgen (
    .clk    (clk),
    .rst_n  (rst_n),
    .proc_en(proc_en)
  );

  logic               pf_start, pf_dir, pf_bank, pf_xfer, pf_full;
  pixel_t             pf_cols [NC][L];

  ccu #(.N(N), .P(P), .C(C), .PREFETCH(PREFETCH)) u_ccu (
    .clk           (clk),
    .rst_n         (rst_n),
    .proc_en       (proc_en),
    .start         (start),
    .num_mb        (num_mb),
    .busy          (busy),
    .done          (done),
    .wait_data     (wait_data),
    .sa_fetch      (sa_fetch),
    .sa_fetch_col  (sa_fetch_col),
    .sa_fetch_dir  (sa_fetch_dir),
    .sa_fetch_bank (sa_fetch_bank),
    .sa_consume    (sa_consume),
    .sa_ready      (sa_ready),
    .ref_fetch     (ref_fetch),
    .ref_fetch_bank(ref_fetch_bank),
    .ref_xfer      (ref_xfer),
    .ref_ready     (ref_ready),
    .pf_start      (pf_start),
    .pf_dir        (pf_dir),
    .pf_bank       (pf_bank),
    .pf_xfer       (pf_xfer),
    .pf_full       (pf_full),
    .op            (op),
    .tag           (tag)
  );

  sa_input_ctrl #(.N(N), .P(P), .C(C)) u_sa_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .fetch     (sa_fetch),
    .fetch_col (sa_fetch_col),
    .fetch_dir (sa_fetch_dir),
    .fetch_bank(sa_fetch_bank),
    .consume   (sa_consume),
    .ready     (sa_ready),
    .rd_en     (sa_rd_en),
    .rd_row    (sa_rd_row),
    .rd_col    (sa_rd_col),
    .rd_bank   (sa_rd_bank),
    .rd_data   (sa_rd_data),
    .buf_shift (sab_shift),
    .buf_dir   (sab_dir),
    .buf_sin   (sab_sin)
  );

  sa_input_buffer #(.N(N), .P(P), .C(C)) u_sa_buf (
    .clk  (clk),
    .shift(sab_shift),
    .dir  (sab_dir),
    .sin  (sab_sin),
    .q    (col_in)
  );

  if (PREFETCH) begin : g_pf
    logic               f_fetch, f_dir, f_bank, f_consume, f_ready;
    logic [COORD_W-1:0] f_col;
    logic               b_shift, b_dir;
    pixel_t             b_sin;
    pixel_t             b_q [L];

    prefetch_layer #(.N(N), .P(P), .C(C)) u_pf (
      .clk       (clk),
      .rst_n     (rst_n),
      .start     (pf_start),
      .start_dir (pf_dir),
      .start_bank(pf_bank),
      .xfer      (pf_xfer),
      .full      (pf_full),
      .fetch     (f_fetch),
      .fetch_col (f_col),
      .fetch_dir (f_dir),
      .fetch_bank(f_bank),
      .consume   (f_consume),
      .ready     (f_ready),
      .col_in    (b_q),
      .cols      (pf_cols)
    );

    sa_input_ctrl #(.N(N), .P(P), .C(C)) u_pf_ctrl (
      .clk       (clk),
      .rst_n     (rst_n),
      .fetch     (f_fetch),
      .fetch_col (f_col),
      .fetch_dir (f_dir),
      .fetch_bank(f_bank),
      .consume   (f_consume),
      .ready     (f_ready),
      .rd_en     (pf_rd_en),
      .rd_row    (pf_rd_row),
      .rd_col    (pf_rd_col),
      .rd_bank   (pf_rd_bank),
      .rd_data   (pf_rd_data),
      .buf_shift (b_shift),
      .buf_dir   (b_dir),
      .buf_sin   (b_sin)
    );

    sa_input_buffer #(.N(N), .P(P), .C(C)) u_pf_buf (
      .clk  (clk),
      .shift(b_shift),
      .dir  (b_dir),
      .sin  (b_sin),
      .q    (b_q)
    );
  end else begin : g_no_pf
    // the second port is idle and the array never transfers
    assign pf_full    = 1'b0;
    assign pf_rd_en   = 1'b0;
    assign pf_rd_row  = '0;
    assign pf_rd_col  = '0;
    assign pf_rd_bank = 1'b0;
    for (genvar j = 0; j < NC; j++) begin : g_tie
      for (genvar r = 0; r < L; r++) begin : g_px
        assign pf_cols[j][r] = '0;
      end
    end
  end

  ref_input_ctrl #(.N(N)) u_ref_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .fetch     (ref_fetch),
    .fetch_bank(ref_fetch_bank),
    .consume   (ref_xfer),
    .ready     (ref_ready),
    .rd_en     (ref_rd_en),
    .rd_row    (ref_rd_row),
    .rd_col    (ref_rd_col),
    .rd_bank   (ref_rd_bank),
    .rd_data   (ref_rd_data),
    .buf_shift (rb_shift),
    .buf_sin   (rb_sin),
    .arr_shift (ref_arr_shift)
  );

  ref_input_buffer #(.N(N)) u_ref_buf (
    .clk  (clk),
    .shift(rb_shift),
    .sin  (rb_sin),
    .q    (ref_col)
  );

  pe_array #(.N(N), .P(P), .C(C)) u_array (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (proc_en),
    .op       (op),
    .col_in   (col_in),
    .pf_xfer  (pf_xfer),
    .pf_cols  (pf_cols),
    .ref_col  (ref_col),
    .ref_shift(ref_arr_shift),
    .ref_xfer (ref_xfer),
    .row_sum  (row_sum)
  );

  for (genvar c = 0; c < C; c++) begin : g_tree
    adder_tree #(.N(N), .IN_W(ROW_W), .TAG_W(TAG_W)) u_tree (
      .clk    (clk),
      .rst_n  (rst_n),
      .en     (proc_en),
      .in_sum (row_sum[c]),
      .tag_in (tag),
      .sad    (sad[c]),
      .tag_out(tree_tag[c])
    );
  end

  comparator #(.P(P), .C(C), .SAD_W(SAD_W)) u_cmp (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (proc_en),
    .sad     (sad),
    .tag     (cand_tag_t'(tree_tag[0])),
    .mv_valid(mv_valid),
    .mv_x    (mv_x),
    .mv_y    (mv_y),
    .mv_sad  (mv_sad)
  );

endmodule
