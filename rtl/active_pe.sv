// active_pe: SAD processing element of an active block.
//
// Besides moving its search pixel like a passive PE (it contains one), an
// active PE holds reference pixels and computes, every processing cycle, the
// absolute difference between its current reference pixel and its search
// pixel, added to the partial row sum arriving from its right neighbour:
//   psum_out = psum_in + |r - s|
// The row sums leave the leftmost column towards the core's adder tree.
//
// Reference storage follows the register pair of the architecture: NFRAC
// running-data registers, filled while the previous macroblock is processed
// (they form a left-shifting chain across a row, `ref_in` -> `ref_out`), and
// NFRAC standing-data registers, loaded from the running ones in parallel by
// `ref_xfer` at the start of a macroblock. `ref_wsel` picks the running
// register that shifts and drives `ref_out`; `frac_sel` picks the standing
// register used in the difference. NFRAC is ceil(N/h)*ceil(N/l); it is 1
// when an active block covers the whole macroblock (h = l = N).
//
// Timing: the search register changes on enabled clock edges; the
// difference and the row accumulation are combinational, so psum_out is
// valid in the same cycle as the registered pixels. The reference registers
// are written on `ref_shift`/`ref_xfer` independently of `en`, because the
// reference is loaded at the read-clock rate. Reference registers reset to 0.
module active_pe
  import me_pkg::*;
#(
  parameter int SUM_W = 12,
  parameter int NFRAC = 1
)(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  shift_op_e                op,
  input  pixel_t                   from_right,
  input  pixel_t                   from_next,
  input  pixel_t                   from_prev,
  output pixel_t                   s,
  input  pixel_t                   ref_in,
  input  logic                     ref_shift,
  input  logic [$clog2(NFRAC+1)-1:0] ref_wsel,
  output pixel_t                   ref_out,
  input  logic                     ref_xfer,
  input  logic [$clog2(NFRAC+1)-1:0] frac_sel,
  input  logic [SUM_W-1:0]         psum_in,
  output logic [SUM_W-1:0]         psum_out
);

  pixel_t running  [NFRAC];
  pixel_t standing [NFRAC];
  pixel_t r_cur;
  pixel_t ad;

  passive_pe u_search (
    .clk       (clk),
    .en        (en),
    .op        (op),
    .from_right(from_right),
    .from_next (from_next),
    .from_prev (from_prev),
    .s         (s)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NFRAC; k++) begin
        running[k]  <= '0;
        standing[k] <= '0;
      end
    end else begin
      if (ref_shift) running[ref_wsel] <= ref_in;
      if (ref_xfer) begin
        for (int k = 0; k < NFRAC; k++) standing[k] <= running[k];
      end
    end
  end

  always_comb begin
    ref_out  = running[ref_wsel];
    r_cur    = standing[frac_sel];
    ad       = (r_cur > s) ? pixel_t'(r_cur - s) : pixel_t'(s - r_cur);
    psum_out = psum_in + SUM_W'(ad);
  end

endmodule
