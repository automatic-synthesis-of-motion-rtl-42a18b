// me_pkg: types, constants and sizing functions shared by the full-search
// block-matching (FSBM) motion estimation processor.
//
// The processor compares an N x N reference macroblock with every candidate
// position of a square search window using the sum of absolute differences
// (SAD). The sizing functions below follow the configuration equations of the
// architecture class: with C processing cores each core covers
// Q = floor(2p/C) candidates of every search column, the effective number of
// candidates per column is PHAT = C*Q, and the search window is L x L pixels
// with L = PHAT + N - 1. The read/processing clock ratio ALPHA is the smallest
// integer with Q >= (L+3)/ALPHA, i.e. ceil(C + (N+2)/Q).
//
// The pixel width (8 bits) and the coordinate width used on the motion-vector
// and address ports are this design's choices; the architecture leaves them
// open.
package me_pkg;

  localparam int PIX_W   = 8;   // luminance sample width
  localparam int COORD_W = 8;   // width of window coordinates and candidate indices

  typedef logic [PIX_W-1:0] pixel_t;

  // Displacement applied to the search-area registers of the processing array
  // in one processing cycle.
  typedef enum logic [1:0] {
    SH_HOLD = 2'd0,  // keep contents
    SH_LEFT = 2'd1,  // shift one column left, new column enters on the right
    SH_FWD  = 2'd2,  // rotate the ring: position r takes position r+1 (mod L)
    SH_BWD  = 2'd3   // rotate the ring: position r takes position r-1 (mod L)
  } shift_op_e;

  // Tag that travels with the SADs of one processing cycle through the adder
  // trees to the comparator.
  typedef struct packed {
    logic               valid;  // the array holds a real candidate this cycle
    logic               first;  // first candidate column/cycle of a macroblock
    logic               last;   // last candidate cycle of a macroblock
    logic [COORD_W-1:0] dx;     // candidate column index, 0 .. PHAT-1
    logic [COORD_W-1:0] off;    // ring offset, candidate row of core 0
  } cand_tag_t;

  localparam int TAG_W = $bits(cand_tag_t);

  function automatic int cand_per_core(input int p, input int c);
    return (2 * p) / c;
  endfunction

  function automatic int eff_range(input int p, input int c);
    return c * ((2 * p) / c);
  endfunction

  function automatic int win_size(input int n, input int p, input int c);
    return c * ((2 * p) / c) + n - 1;
  endfunction

  // Eq. for the read/processing clock ratio: ceil(C + (N+2)/Q).
  function automatic int min_alpha(input int n, input int p, input int c);
    int q;
    q = (2 * p) / c;
    return c + (n + 2 + q - 1) / q;
  endfunction

endpackage
