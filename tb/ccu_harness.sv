// ccu_harness: runs one central control unit (N=4, P=4, C=1: Q = 8,
// L = 11), with or without the pre-fetch layer, against modelled input
// controllers (and a modelled pre-fetch layer) whose columns, reference
// blocks and layer fills become ready after random delays, with a
// processing enable every second clock. An independent model of the
// schedule checks, for every processing cycle: the array op (load when data
// is ready, otherwise hold with wait_data; then Q-1 rotations whose
// direction alternates per column and carries over between macroblocks and
// runs), the consume/transfer strobes, the candidate tag (valid, first,
// last, dx, ring offset), every search-column, reference and pre-fetch
// request (column, alignment, bank), and `done` after the last column of a
// run. With the pre-fetch layer the column counter starts at N-1 and the
// layer is transferred with the first load of every macroblock.
module ccu_harness
  import me_pkg::*;
#(
  parameter bit PREFETCH = 1'b0
)(
  input  logic clk,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int N = 4, P = 4, C = 1;
  localparam int Q = (2 * P) / C;
  localparam int L = C * Q + N - 1;
  localparam int FIRST = PREFETCH ? N - 1 : 0;

  logic               rst_n, proc_en, start, busy, done, wait_data;
  logic [15:0]        num_mb;
  logic               sa_fetch, sa_fetch_dir, sa_fetch_bank, sa_consume, sa_ready;
  logic [COORD_W-1:0] sa_fetch_col;
  logic               ref_fetch, ref_fetch_bank, ref_xfer, ref_ready;
  shift_op_e          op;
  cand_tag_t          tag;
  logic               pf_start, pf_dir, pf_bank, pf_xfer, pf_full;

  ccu #(.N(N), .P(P), .C(C), .PREFETCH(PREFETCH)) dut (.*);

  // processing enable every second clock
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) proc_en <= 1'b1; else proc_en <= !proc_en;

  // modelled input controllers
  int sa_cd, ref_cd, pf_cd;
  bit slow;
  always @(posedge clk) begin
    if (!rst_n) begin
      sa_ready <= 0; ref_ready <= 0; sa_cd <= 0; ref_cd <= 0; pf_full <= 0; pf_cd <= 0;
    end else begin
      if (sa_consume) sa_ready <= 1'b0;
      if (ref_xfer) ref_ready <= 1'b0;
      if (sa_fetch) sa_cd <= slow ? 1 + $urandom % 40 : 1 + $urandom % 12;
      else if (sa_cd > 1) sa_cd <= sa_cd - 1;
      else if (sa_cd == 1) begin sa_ready <= 1'b1; sa_cd <= 0; end
      if (ref_fetch) ref_cd <= 5 + $urandom % 60;
      else if (ref_cd > 1) ref_cd <= ref_cd - 1;
      else if (ref_cd == 1) begin ref_ready <= 1'b1; ref_cd <= 0; end
      if (pf_xfer) pf_full <= 1'b0;
      if (pf_start) pf_cd <= 5 + $urandom % 60;
      else if (pf_cd > 1) pf_cd <= pf_cd - 1;
      else if (pf_cd == 1) begin pf_full <= 1'b1; pf_cd <= 0; end
    end
  end

  // independent schedule model
  int  m_col, m_cnt, m_off, m_left, m_bank, holds, dones;
  bit  m_fwd, m_ring_top, m_run;
  bit  exp_sa_fetch, exp_ref_fetch, exp_pf_start, exp_pf_dir, exp_pf_bank;
  int  exp_sa_col; bit exp_sa_dir, exp_sa_bank, exp_ref_bank;
  cand_tag_t exp_tag;
  bit  tag_due;

  always @(posedge clk) if (rst_n) begin
    // requests are registered: they appear one clock after the decision
    checks++;
    if (sa_fetch != exp_sa_fetch ||
        (sa_fetch && (int'(sa_fetch_col) != exp_sa_col || sa_fetch_dir != exp_sa_dir || sa_fetch_bank != exp_sa_bank))) begin
      failures++;
      $display("%0t sa_fetch=%b col %0d dir %b bank %b, expected %b col %0d dir %b bank %b", $time,
               sa_fetch, sa_fetch_col, sa_fetch_dir, sa_fetch_bank, exp_sa_fetch, exp_sa_col, exp_sa_dir, exp_sa_bank);
    end
    checks++;
    if (ref_fetch != exp_ref_fetch || (ref_fetch && ref_fetch_bank != exp_ref_bank)) begin
      failures++; $display("%0t ref_fetch=%b bank %b expected %b bank %b", $time, ref_fetch, ref_fetch_bank, exp_ref_fetch, exp_ref_bank);
    end
    checks++;
    if (pf_start != exp_pf_start || (pf_start && (pf_dir != exp_pf_dir || pf_bank != exp_pf_bank))) begin
      failures++; $display("%0t pf_start=%b dir %b bank %b expected %b dir %b bank %b", $time,
                           pf_start, pf_dir, pf_bank, exp_pf_start, exp_pf_dir, exp_pf_bank);
    end
    if (tag_due) begin
      checks++;
      if (tag.valid != exp_tag.valid || (exp_tag.valid && tag != exp_tag)) begin
        failures++; $display("%0t tag %p expected %p", $time, tag, exp_tag);
      end
    end
    exp_sa_fetch = 0; exp_ref_fetch = 0; exp_pf_start = 0; tag_due = 0;

    if (start && !m_run && num_mb != 0) begin
      m_run = 1; m_left = num_mb; m_col = FIRST; m_cnt = 0;
      exp_sa_fetch = 1; exp_sa_col = FIRST; exp_sa_dir = m_ring_top; exp_sa_bank = m_bank[0];
      exp_ref_fetch = 1; exp_ref_bank = m_bank[0];
      exp_pf_start = PREFETCH; exp_pf_dir = m_ring_top; exp_pf_bank = m_bank[0];
    end else if (m_run && proc_en) begin
      tag_due = 1;
      exp_tag = '0;
      if (m_cnt == 0) begin
        if (sa_ready && (m_col != FIRST || (ref_ready && (pf_full || !PREFETCH)))) begin
          checks += 4;
          if (op != SH_LEFT || !sa_consume || wait_data) begin
            failures++; $display("%0t col %0d: expected a load, op %s", $time, m_col, op.name());
          end
          if (ref_xfer != (m_col == FIRST)) begin
            failures++; $display("%0t col %0d: ref_xfer %b", $time, m_col, ref_xfer);
          end
          if (pf_xfer != (PREFETCH && m_col == FIRST)) begin
            failures++; $display("%0t col %0d: pf_xfer %b", $time, m_col, pf_xfer);
          end
          // the next window's first load comes L-FIRST loads after this one
          if (m_col == FIRST && m_left > 1) begin
            exp_pf_start = PREFETCH; exp_pf_bank = !m_bank[0];
            exp_pf_dir = m_ring_top ^ ((L - FIRST) % 2 == 1);
          end
          m_fwd = !m_ring_top;
          m_off = m_ring_top ? Q - 1 : 0;
          m_ring_top = !m_ring_top;
          if (m_col != L - 1) begin
            exp_sa_fetch = 1; exp_sa_col = m_col + 1; exp_sa_dir = m_ring_top; exp_sa_bank = m_bank[0];
          end else if (m_left > 1) begin
            exp_sa_fetch = 1; exp_sa_col = FIRST; exp_sa_dir = m_ring_top; exp_sa_bank = !m_bank[0];
          end
          if (m_col == FIRST && m_left > 1) begin
            exp_ref_fetch = 1; exp_ref_bank = !m_bank[0];
          end
        end else begin
          checks++;
          if (op != SH_HOLD || !wait_data || sa_consume || ref_xfer || pf_xfer) begin
            failures++; $display("%0t col %0d: expected a hold, op %s", $time, m_col, op.name());
          end
          holds++;
          exp_tag.valid = 0;
          tag_due = 1;
        end
      end else begin
        checks++;
        if (op != (m_fwd ? SH_FWD : SH_BWD)) begin
          failures++; $display("%0t col %0d cnt %0d: op %s, expected %s", $time, m_col, m_cnt, op.name(), m_fwd ? "FWD" : "BWD");
        end
        m_off = m_fwd ? m_off + 1 : m_off - 1;
      end
      if (!(m_cnt == 0 && wait_data)) begin
        exp_tag.valid = (m_col >= N - 1);
        exp_tag.first = (m_col == N - 1 && m_cnt == 0);
        exp_tag.last  = (m_col == L - 1 && m_cnt == Q - 1);
        exp_tag.dx    = COORD_W'(m_col - (N - 1));
        exp_tag.off   = COORD_W'(m_off);
        if (m_cnt == Q - 1) begin
          m_cnt = 0;
          if (m_col == L - 1) begin
            m_col = FIRST; m_bank++; m_left--;
            if (m_left == 0) begin m_run = 0; dones++; end
          end else m_col++;
        end else m_cnt++;
      end
    end
  end

  int done_seen;
  always @(posedge clk) if (rst_n && done) done_seen++;

  task automatic do_run(input int n, input bit s);
    @(negedge clk);
    slow = s;
    num_mb = 16'(n); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (busy || m_run) @(negedge clk);
    repeat (3) @(negedge clk);
  endtask

  initial begin
    checks = 0; failures = 0; finished = 1'b0;
    rst_n = 1'b0; start = 0; num_mb = 0; slow = 0;
    m_ring_top = 0; m_run = 0; m_bank = 0; holds = 0; dones = 0; done_seen = 0; tag_due = 0;
    exp_sa_fetch = 0; exp_ref_fetch = 0; exp_pf_start = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    do_run(3, 0);
    do_run(2, 1);
    do_run(1, 0);
    checks += 2;
    if (done_seen != 3 || dones != 3) begin
      failures++; $display("done pulses %0d, runs %0d, expected 3", done_seen, dones);
    end
    if (holds == 0) begin
      failures++; $display("no hold cycle was exercised");
    end
    $display("[%m] PREFETCH=%0d holds=%0d", PREFETCH, holds);
    finished = 1'b1;
  end
endmodule
