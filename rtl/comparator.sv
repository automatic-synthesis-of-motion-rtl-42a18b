// comparator: selects the candidate with the smallest SAD and reports its
// motion vector at the end of every macroblock.
//
// Every processing cycle the C adder trees deliver C SADs, one per core,
// with a common tag (candidate column `dx`, ring offset `off`). Core c's
// candidate row is dy = c*Q + off. The comparator keeps the smallest SAD
// seen since the tag marked `first` and, when the tag marks `last`, emits
// the winner: mv_x = dx - (P-1), mv_y = dy - (P-1). Displacements span
// -(P-1)..+P when C divides 2P, and -(P-1)..C*Q-P otherwise.
// Ties keep the earlier candidate in scan order (and the lower core index
// within a cycle).
//
// Timing: inputs are sampled on clock edges with `en` high; `mv_valid` is a
// one-clock pulse in the clock cycle after the `last` tag was sampled.
// The minimum search is the architecture's comparator; the scan-order tie
// rule and the signed vector encoding are this design's choices.
module comparator
  import me_pkg::*;
#(
  parameter int P     = 16,
  parameter int C     = 1,
  parameter int SAD_W = 16,
  localparam int Q    = (2 * P) / C
)(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       en,
  input  logic [SAD_W-1:0]           sad [C],
  input  cand_tag_t                  tag,
  output logic                       mv_valid,
  output logic signed [COORD_W-1:0]  mv_x,
  output logic signed [COORD_W-1:0]  mv_y,
  output logic [SAD_W-1:0]           mv_sad
);

  logic [SAD_W-1:0]   best_sad;
  logic [COORD_W-1:0] best_dx, best_dy;

  // best of this cycle's C candidates, then merged with the running best
  logic [SAD_W-1:0]   cyc_sad;
  logic [COORD_W-1:0] cyc_dy;
  logic [SAD_W-1:0]   new_sad;
  logic [COORD_W-1:0] new_dx, new_dy;

  always_comb begin
    cyc_sad = sad[0];
    cyc_dy  = tag.off;
    for (int c = 1; c < C; c++) begin
      if (sad[c] < cyc_sad) begin
        cyc_sad = sad[c];
        cyc_dy  = COORD_W'(c * Q) + tag.off;
      end
    end
    if (tag.first || cyc_sad < best_sad) begin
      new_sad = cyc_sad;
      new_dx  = tag.dx;
      new_dy  = cyc_dy;
    end else begin
      new_sad = best_sad;
      new_dx  = best_dx;
      new_dy  = best_dy;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_sad <= '1;
      best_dx  <= '0;
      best_dy  <= '0;
      mv_valid <= 1'b0;
      mv_x     <= '0;
      mv_y     <= '0;
      mv_sad   <= '0;
    end else begin
      mv_valid <= 1'b0;
      if (en && tag.valid) begin
        best_sad <= new_sad;
        best_dx  <= new_dx;
        best_dy  <= new_dy;
        if (tag.last) begin
          mv_valid <= 1'b1;
          mv_x     <= $signed(new_dx) - COORD_W'(P - 1);
          mv_y     <= $signed(new_dy) - COORD_W'(P - 1);
          mv_sad   <= new_sad;
        end
      end
    end
  end

endmodule
