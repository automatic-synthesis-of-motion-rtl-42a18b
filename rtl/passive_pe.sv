// passive_pe: search-area displacement register of the processing array.
//
// A passive processing element holds one search-area pixel and moves it in
// one of three directions: to the left (a new search column enters the array
// from the right), forward or backward along the cylindrical ring formed by
// the active and passive rows (the zig-zag vertical displacement). It does no
// arithmetic; active PEs reuse it for their own search register.
//
// Interface: `en` is the processing-clock enable; `op` selects the move;
// `from_right` is the pixel of the right neighbour (or of the search input
// buffer for the rightmost column), `from_next`/`from_prev` the pixels of the
// ring neighbours r+1 and r-1. `s` is the stored pixel, updated one cycle
// after an enabled op.
//
// The three displacement directions follow the architecture; the encoding
// of `op` and the absence of a reset (the array is always overwritten by a
// full column load before its contents are used) are this design's choices.
module passive_pe
  import me_pkg::*;
(
  input  logic      clk,
  input  logic      en,
  input  shift_op_e op,
  input  pixel_t    from_right,
  input  pixel_t    from_next,
  input  pixel_t    from_prev,
  output pixel_t    s
);

  always_ff @(posedge clk) begin
    if (en) begin
      unique case (op)
        SH_LEFT: s <= from_right;
        SH_FWD:  s <= from_next;
        SH_BWD:  s <= from_prev;
        default: s <= s;
      endcase
    end
  end

endmodule
