// ccu: central control unit of the motion estimation processor (main state
// machine, data-flow controller, and the column and line counters).
//
// A macroblock is processed as L search columns of Q processing cycles. The
// first cycle of a column is a load: the array shifts left and takes the
// next column from the search input buffer. The remaining Q-1 cycles rotate
// the ring, forward when the column was loaded with the ring at offset 0,
// backward when it was loaded at offset Q-1 (the zig-zag); the direction
// alternates from column to column and is carried over between macroblocks.
// Columns N-1 .. L-1 produce the C*Q candidates of candidate columns
// dx = 0 .. C*Q-1, one per core per cycle. Without the pre-fetch layer
// (PREFETCH = 0) the first N-1 columns are loaded the same way and only fill
// the array, so a macroblock takes L*Q processing cycles. With it
// (PREFETCH = 1, FIRST = N-1) the column counter runs N-1 .. L-1 only: at the
// load of column N-1 the array also takes columns 0 .. N-2 from the
// pre-fetch layer (`pf_xfer`), and a macroblock takes C*Q*Q cycles. The
// layer is started (`pf_start`, `pf_dir`, `pf_bank`) at the start of a run
// for the first window and at each macroblock's first load for the next
// one; `pf_dir` is the alignment of the next window's first load, which
// follows from the alternation over the L-FIRST loads of a macroblock.
//
// Data flow: at each load the controller consumes the buffered search column
// and asks the search input controller for the following one (column 0 of
// the next macroblock after column L-1), with the alignment the ring will
// have when it is loaded. At column 0 it copies the preloaded reference into
// the standing-data registers and asks the reference input controller for
// the next macroblock's reference. If a column (or the reference, or the
// pre-fetch layer at the first load) is not ready at a load cycle, the array holds for one processing cycle
// (`wait_data`); with ALPHA chosen by the clock-ratio rule this happens only
// while the first column of a run is fetched.
//
// Interface: `proc_en` marks processing cycles; `start` with `num_mb`
// (sampled in IDLE) begins a run of num_mb macroblocks; `done` pulses when
// the last column of the run has been processed. `tag` describes the
// candidate held by the array after this cycle's op and is registered on
// proc_en, so it arrives with that candidate's row sums.
//
// The column/cycle schedule, the zig-zag, the preloading and the
// transparent transfer follow the architecture; the stall on missing data, the start/num_mb interface and
// the bank toggling between macroblocks are this design's choices.
module ccu
  import me_pkg::*;
#(
  parameter int N = 16,
  parameter int P = 16,
  parameter int C = 1,
  parameter bit PREFETCH = 1'b1,
  localparam int Q = (2 * P) / C,
  localparam int L = C * Q + N - 1,
  localparam int FIRST = PREFETCH ? N - 1 : 0
)(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               proc_en,
  input  logic               start,
  input  logic [15:0]        num_mb,
  output logic               busy,
  output logic               done,
  output logic               wait_data,
  // search-area input controller
  output logic               sa_fetch,
  output logic [COORD_W-1:0] sa_fetch_col,
  output logic               sa_fetch_dir,
  output logic               sa_fetch_bank,
  output logic               sa_consume,
  input  logic               sa_ready,
  // reference input controller
  output logic               ref_fetch,
  output logic               ref_fetch_bank,
  output logic               ref_xfer,
  input  logic               ref_ready,
  // pre-fetch layer (unused when PREFETCH = 0)
  output logic               pf_start,
  output logic               pf_dir,
  output logic               pf_bank,
  output logic               pf_xfer,
  input  logic               pf_full,
  // processing array
  output shift_op_e          op,
  output cand_tag_t          tag
);

  typedef enum logic {S_IDLE, S_RUN} state_e;

  state_e             state;
  logic [15:0]        mb_left;
  logic [COORD_W-1:0] col;       // column counter, FIRST .. L-1
  logic [COORD_W-1:0] cnt;       // line counter inside a column, 0 .. Q-1
  logic               cur_dir;   // 1: current column rotates backward
  logic               next_dir;  // alignment of the next column to load
  logic               bank;      // bank of the macroblock being processed

  logic load_cyc, can_load, last_cyc;
  logic [COORD_W-1:0] off_now;

  always_comb begin
    load_cyc  = (state == S_RUN) && (cnt == '0);
    can_load  = sa_ready && ((col != COORD_W'(FIRST)) || (ref_ready && (pf_full || !PREFETCH)));
    last_cyc  = (col == COORD_W'(L - 1)) && (cnt == COORD_W'(Q - 1));
    // ring offset after this cycle's op
    if (load_cyc) off_now = next_dir ? COORD_W'(Q - 1) : '0;
    else          off_now = cur_dir ? COORD_W'(Q - 1) - cnt : cnt;

    op         = SH_HOLD;
    sa_consume = 1'b0;
    ref_xfer   = 1'b0;
    pf_xfer    = 1'b0;
    wait_data  = 1'b0;
    if (proc_en && state == S_RUN) begin
      if (load_cyc) begin
        if (can_load) begin
          op         = SH_LEFT;
          sa_consume = 1'b1;
          ref_xfer   = (col == COORD_W'(FIRST));
          pf_xfer    = PREFETCH && (col == COORD_W'(FIRST));
        end else begin
          wait_data  = 1'b1;
        end
      end else begin
        op = cur_dir ? SH_BWD : SH_FWD;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_IDLE;
      mb_left        <= '0;
      col            <= '0;
      cnt            <= '0;
      cur_dir        <= 1'b0;
      next_dir       <= 1'b0;
      bank           <= 1'b0;
      done           <= 1'b0;
      sa_fetch       <= 1'b0;
      sa_fetch_col   <= '0;
      sa_fetch_dir   <= 1'b0;
      sa_fetch_bank  <= 1'b0;
      ref_fetch      <= 1'b0;
      ref_fetch_bank <= 1'b0;
      pf_start       <= 1'b0;
      pf_dir         <= 1'b0;
      pf_bank        <= 1'b0;
      tag            <= '0;
    end else begin
      done      <= 1'b0;
      sa_fetch  <= 1'b0;
      ref_fetch <= 1'b0;
      pf_start  <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start && num_mb != '0) begin
            state          <= S_RUN;
            mb_left        <= num_mb;
            col            <= COORD_W'(FIRST);
            cnt            <= '0;
            sa_fetch       <= 1'b1;
            sa_fetch_col   <= COORD_W'(FIRST);
            sa_fetch_dir   <= next_dir;
            sa_fetch_bank  <= bank;
            ref_fetch      <= 1'b1;
            ref_fetch_bank <= bank;
            pf_start       <= PREFETCH;
            pf_dir         <= next_dir;
            pf_bank        <= bank;
          end
        end
        S_RUN: begin
          if (proc_en) begin
            tag.valid <= 1'b0;
            if (!load_cyc || can_load) begin
              tag.valid <= (col >= COORD_W'(N - 1));
              tag.first <= (col == COORD_W'(N - 1)) && load_cyc;
              tag.last  <= last_cyc;
              tag.dx    <= col - COORD_W'(N - 1);
              tag.off   <= off_now;
              if (load_cyc) begin
                cur_dir  <= next_dir;
                next_dir <= !next_dir;
                // ask for the column that follows this one
                if (col != COORD_W'(L - 1)) begin
                  sa_fetch      <= 1'b1;
                  sa_fetch_col  <= col + 1'b1;
                  sa_fetch_dir  <= !next_dir;
                  sa_fetch_bank <= bank;
                end else if (mb_left != 16'd1) begin
                  sa_fetch      <= 1'b1;
                  sa_fetch_col  <= COORD_W'(FIRST);
                  sa_fetch_dir  <= !next_dir;
                  sa_fetch_bank <= !bank;
                end
                if (col == COORD_W'(FIRST) && mb_left != 16'd1) begin
                  ref_fetch      <= 1'b1;
                  ref_fetch_bank <= !bank;
                  // the next window starts (L - FIRST) loads later
                  pf_start       <= PREFETCH;
                  pf_dir         <= next_dir ^ ((L - FIRST) % 2 == 1);
                  pf_bank        <= !bank;
                end
              end
              if (cnt == COORD_W'(Q - 1)) begin
                cnt <= '0;
                if (col == COORD_W'(L - 1)) begin
                  col     <= COORD_W'(FIRST);
                  bank    <= !bank;
                  mb_left <= mb_left - 1'b1;
                  if (mb_left == 16'd1) begin
                    state <= S_IDLE;
                    done  <= 1'b1;
                  end
                end else begin
                  col <= col + 1'b1;
                end
              end else begin
                cnt <= cnt + 1'b1;
              end
            end
          end
        end
        default: state <= S_IDLE;
      endcase
      if (state == S_IDLE && proc_en) tag.valid <= 1'b0;
    end
  end

  assign busy = (state == S_RUN);

endmodule
