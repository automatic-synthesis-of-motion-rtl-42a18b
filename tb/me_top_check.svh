// me_top_check.svh: body shared by the end-to-end testbenches of me_top.
//
// Included inside a testbench module that defines the parameters N, P, C,
// ALPHA, PREFETCH, NEED_HOLD, RUN1, RUN2 and SEED, the outputs `finished`, `checks`
// and `failures`, an input or variable `clk`, and the macro ME_TOP_INST that
// instantiates me_top as `dut` with implicit (.*) port connections.
//
// It models the two external memories (two banks each, one clock read
// latency; the search memory has a second read port for the pre-fetch
// layer). Pixel values are computed on the fly from a hash of the
// macroblock sequence number and the coordinates, so no data files are
// needed. The sequence number of a bank is taken when the processor starts
// reading a new window or reference block on it. Most
// reference blocks are exact copies of a window region at a random offset
// (so the expected vector is known); every third one is independent noise,
// where only the SAD minimum can be checked.
//
// Checks: the reported SAD equals the minimum over all candidates, the SAD
// recomputed at the reported vector equals it, the vector is in range, an
// exact-copy block yields its offset, and back-to-back macroblocks are
// (L-FIRST)*Q*ALPHA clocks apart (when NEED_HOLD is 0; FIRST = N-1 with
// the pre-fetch layer, 0 without). Mechanism counters
// (straight and rotated column loads, forward and backward ring rotations,
// reference preload during processing, back-to-back macroblocks, holds for
// missing data, and with PREFETCH the filling and transfer of the pre-fetch
// layer) must each be non-zero; NEED_HOLD selects whether holds must
// or must not occur after the first column of a run.

  localparam int Q     = (2 * P) / C;
  localparam int PH    = C * Q;
  localparam int L     = PH + N - 1;
  localparam int SAD_W = PIX_W + 2 * $clog2(N);

  logic                      rst_n, start;
  logic [15:0]               num_mb;
  logic                      busy, done, wait_data;
  logic                      sa_rd_en, sa_rd_bank, ref_rd_en, ref_rd_bank;
  logic [COORD_W-1:0]        sa_rd_row, sa_rd_col, ref_rd_row, ref_rd_col;
  pixel_t                    sa_rd_data, ref_rd_data;
  logic                      pf_rd_en, pf_rd_bank;
  logic [COORD_W-1:0]        pf_rd_row, pf_rd_col;
  pixel_t                    pf_rd_data;
  localparam int FIRST     = PREFETCH ? N - 1 : 0;     // first column loaded through the main buffer
  localparam int MB_CLOCKS = (L - FIRST) * Q * ALPHA;  // back-to-back macroblock spacing
  logic                      mv_valid;
  logic signed [COORD_W-1:0] mv_x, mv_y;
  logic [SAD_W-1:0]          mv_sad;

  `ME_TOP_INST

  // ---------------- data model ----------------
  function automatic int hash(input int a);
    int unsigned h;
    h = a * 32'h9E3779B1 + 32'h7F4A7C15 + SEED * 32'h85EBCA6B;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    h = h ^ (h >> 12);
    return int'(h & 32'h7FFF_FFFF);
  endfunction

  function automatic int win_px(input int g, input int y, input int x);
    return hash(g * 65536 + y * 256 + x) & 255;
  endfunction

  function automatic int off_y(input int g); return hash(g * 7 + 100001) % PH; endfunction
  function automatic int off_x(input int g); return hash(g * 7 + 200003) % PH; endfunction
  function automatic bit exact(input int g); return (g % 3) != 2; endfunction

  function automatic int ref_px(input int g, input int i, input int j);
    if (exact(g)) return win_px(g, i + off_y(g), j + off_x(g));
    return hash(g * 65536 + i * 256 + j + 40000000) & 255;
  endfunction

  function automatic int sad_at(input int g, input int dy, input int dx);
    int s = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        int d = ref_px(g, i, j) - win_px(g, i + dy, j + dx);
        s += (d < 0) ? -d : d;
      end
    return s;
  endfunction

  int sa_mb [2];
  int ref_mb [2];
  int sa_next, ref_next;
  bit opened_sa [2];   // the main port opened the window in this bank first
  bit opened_pf [2];   // the pre-fetch port opened it first

  // A window is opened by the read of row 0, column FIRST on the main port
  // and by the read of row 0, column 0 on the pre-fetch port. Whichever
  // port opens it first takes the next sequence number; the other port
  // then reads the same window.
  always @(posedge clk) begin
    if (pf_rd_en && pf_rd_row == 0 && pf_rd_col == 0) begin
      if (opened_sa[pf_rd_bank]) opened_sa[pf_rd_bank] = 1'b0;
      else begin
        sa_mb[pf_rd_bank]     = sa_next;
        sa_next               = sa_next + 1;
        opened_pf[pf_rd_bank] = 1'b1;
      end
    end
    if (sa_rd_en && sa_rd_row == 0 && sa_rd_col == COORD_W'(FIRST)) begin
      if (opened_pf[sa_rd_bank]) opened_pf[sa_rd_bank] = 1'b0;
      else begin
        sa_mb[sa_rd_bank]     = sa_next;
        sa_next               = sa_next + 1;
        opened_sa[sa_rd_bank] = PREFETCH;
      end
    end
    if (sa_rd_en)
      sa_rd_data <= pixel_t'(win_px(sa_mb[sa_rd_bank], int'(sa_rd_row), int'(sa_rd_col)));
    if (pf_rd_en)
      pf_rd_data <= pixel_t'(win_px(sa_mb[pf_rd_bank], int'(pf_rd_row), int'(pf_rd_col)));
    if (ref_rd_en) begin
      int g;
      g = ref_mb[ref_rd_bank];
      if (ref_rd_row == 0 && ref_rd_col == 0) begin
        g = ref_next;
        ref_mb[ref_rd_bank] <= ref_next;
        ref_next <= ref_next + 1;
      end
      ref_rd_data <= pixel_t'(ref_px(g, int'(ref_rd_row), int'(ref_rd_col)));
    end
  end

  // ---------------- mechanism counters ----------------
  int n_load_straight, n_load_rot, n_fwd, n_bwd, n_preload, n_hold, n_hold_late, n_b2b;
  int n_pf_fill, n_pf_xfer;
  int cyc, last_mv_cyc, mv_count, in_run_mv;

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (dut.u_sa_ctrl.fetch) begin
        if (dut.u_sa_ctrl.fetch_dir) n_load_rot <= n_load_rot + 1;
        else                         n_load_straight <= n_load_straight + 1;
      end
      if (dut.proc_en && dut.op == SH_FWD) n_fwd <= n_fwd + 1;
      if (dut.proc_en && dut.op == SH_BWD) n_bwd <= n_bwd + 1;
      if (ref_rd_en && busy && ref_rd_bank != dut.u_ccu.bank) n_preload <= n_preload + 1;
      if (pf_rd_en && busy && pf_rd_bank != dut.u_ccu.bank) n_pf_fill <= n_pf_fill + 1;
      if (dut.proc_en && dut.op == SH_LEFT && dut.u_ccu.pf_xfer) n_pf_xfer <= n_pf_xfer + 1;
      if (wait_data) begin
        n_hold <= n_hold + 1;
        if (dut.u_ccu.col != COORD_W'(FIRST)) n_hold_late <= n_hold_late + 1;
      end
    end
  end

  // ---------------- motion vector checker ----------------
  int mv_g;
  always @(posedge clk) begin
    if (rst_n && mv_valid) begin
      int mn, s_at, dy, dx;
      mn = 1 << 30;
      for (int y = 0; y < PH; y++)
        for (int x = 0; x < PH; x++) begin
          s_at = sad_at(mv_g, y, x);
          if (s_at < mn) mn = s_at;
        end
      dy = int'(mv_y) + P - 1;
      dx = int'(mv_x) + P - 1;
      checks = checks + 1;
      if (dy < 0 || dy >= PH || dx < 0 || dx >= PH) begin
        failures = failures + 1;
        $display("[%m] MB %0d: vector (%0d,%0d) out of range", mv_g, mv_x, mv_y);
      end else begin
        s_at = sad_at(mv_g, dy, dx);
        checks = checks + 2;
        if (int'(mv_sad) != mn) begin
          failures = failures + 1;
          $display("[%m] MB %0d: reported SAD %0d, minimum %0d", mv_g, mv_sad, mn);
        end
        if (s_at != mn) begin
          failures = failures + 1;
          $display("[%m] MB %0d: SAD at (%0d,%0d) is %0d, minimum %0d", mv_g, mv_x, mv_y, s_at, mn);
        end
      end
      if (exact(mv_g)) begin
        checks = checks + 1;
        if (dy != off_y(mv_g) || dx != off_x(mv_g)) begin
          failures = failures + 1;
          $display("[%m] MB %0d: vector (%0d,%0d), expected (%0d,%0d)", mv_g, mv_x, mv_y,
                   off_x(mv_g) - (P - 1), off_y(mv_g) - (P - 1));
        end
      end
      if (in_run_mv > 0) n_b2b = n_b2b + 1;
      if (in_run_mv > 0 && !NEED_HOLD) begin
        checks = checks + 1;
        if (cyc - last_mv_cyc != MB_CLOCKS) begin
          failures = failures + 1;
          $display("[%m] MB %0d: %0d clocks after previous vector, expected %0d", mv_g,
                   cyc - last_mv_cyc, MB_CLOCKS);
        end
      end
      last_mv_cyc = cyc;
      in_run_mv   = in_run_mv + 1;
      mv_g        = mv_g + 1;
      mv_count    = mv_count + 1;
    end
  end

  task automatic run(input int nmb);
    int t;
    @(negedge clk);
    num_mb = 16'(nmb);
    start  = 1'b1;
    @(negedge clk);
    while (!busy) @(negedge clk);
    start = 1'b0;
    in_run_mv = 0;
    t = 0;
    while (mv_count < mv_g_target(nmb) && t < 100000 + nmb * MB_CLOCKS * 4) begin
      @(negedge clk);
      t++;
    end
  endtask

  int target_base;
  function automatic int mv_g_target(input int nmb);
    return target_base + nmb;
  endfunction

  task automatic expect_count(input string what, input int n, input bit want_nonzero);
    checks = checks + 1;
    if ((n > 0) != want_nonzero) begin
      failures = failures + 1;
      $display("[%m] mechanism '%s' count %0d, expected %s", what, n, want_nonzero ? "> 0" : "0");
    end
  endtask

  initial begin
    checks = 0; failures = 0; finished = 1'b0;
    sa_mb = '{0, 0}; ref_mb = '{0, 0}; opened_sa = '{1'b0, 1'b0}; opened_pf = '{1'b0, 1'b0}; sa_next = 0; ref_next = 0;
    n_load_straight = 0; n_load_rot = 0; n_fwd = 0; n_bwd = 0; n_preload = 0;
    n_hold = 0; n_hold_late = 0; n_b2b = 0; cyc = 0; last_mv_cyc = 0; mv_count = 0; mv_g = 0;
    in_run_mv = 0; target_base = 0; n_pf_fill = 0; n_pf_xfer = 0;
    rst_n = 1'b0; start = 1'b0; num_mb = '0;
    sa_rd_data = '0; ref_rd_data = '0; pf_rd_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(RUN1);
    target_base = RUN1;
    checks = checks + 1;
    if (mv_count != RUN1) begin
      failures = failures + 1;
      $display("[%m] first run: %0d vectors, expected %0d", mv_count, RUN1);
    end
    repeat (5) @(negedge clk);
    run(RUN2);
    checks = checks + 1;
    if (mv_count != RUN1 + RUN2) begin
      failures = failures + 1;
      $display("[%m] second run: %0d vectors, expected %0d", mv_count, RUN1 + RUN2);
    end
    expect_count("straight column load", n_load_straight, 1'b1);
    expect_count("rotated column load", n_load_rot, 1'b1);
    expect_count("forward rotation", n_fwd, 1'b1);
    expect_count("backward rotation", n_bwd, 1'b1);
    expect_count("reference preload during processing", n_preload, 1'b1);
    expect_count("back-to-back macroblocks", n_b2b, 1'b1);
    expect_count("hold for missing data", n_hold, 1'b1);
    expect_count("hold after the first column", n_hold_late, NEED_HOLD);
    expect_count("pre-fetch layer filled during processing", n_pf_fill, PREFETCH);
    expect_count("pre-fetch layer transfer", n_pf_xfer, PREFETCH);
    $display("[%m] PREFETCH=%0d pf_fill=%0d pf_xfer=%0d", PREFETCH, n_pf_fill, n_pf_xfer);
    $display("[%m] N=%0d P=%0d C=%0d ALPHA=%0d: vectors=%0d straight=%0d rotated=%0d fwd=%0d bwd=%0d preload=%0d b2b=%0d hold=%0d late_hold=%0d",
             N, P, C, ALPHA, mv_count, n_load_straight, n_load_rot, n_fwd, n_bwd, n_preload,
             n_b2b, n_hold, n_hold_late);
    finished = 1'b1;
  end

