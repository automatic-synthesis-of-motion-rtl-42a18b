// sa_input_buffer: serial-in parallel-out search-area input buffer with the
// alignment circuit for the cylindrical array.
//
// The buffer holds one search column of L pixels. Pixels enter serially on
// `sin` (rows 0, 1, ..., L-1 of the column, one per `shift`), and the array
// takes all L positions in parallel on `q`. Position k feeds ring position k.
//
// The L registers form two shift registers, A (positions 0 .. LA-1,
// LA = C(l+m) - m) and B (positions LA .. L-1, LB = m + N - 1 registers).
// Two multiplexers controlled by `dir` change how they are chained:
//   dir = 0: sin -> B -> A, one straight chain; after L shifts position k
//            holds row k (ring at offset 0);
//   dir = 1: sin -> A -> B; after L shifts B holds rows 0 .. LB-1 and A
//            holds rows LB .. L-1, i.e. position k holds row (k + LB) mod L,
//            the alignment of a ring rotated by LB = Q-1 positions.
// `dir` must stay constant while a column is shifted in.
//
// The split into two registers of these lengths and the two direction
// multiplexers follow the architecture; the shift direction inside each
// register and the row order on `sin` are this design's choices. No reset:
// a column is always fully shifted in before the array reads it.
module sa_input_buffer
  import me_pkg::*;
#(
  parameter int N  = 16,
  parameter int P  = 16,
  parameter int C  = 1,
  localparam int Q  = (2 * P) / C,
  localparam int L  = C * Q + N - 1,
  localparam int LB = Q - 1,
  localparam int LA = L - LB
)(
  input  logic   clk,
  input  logic   shift,
  input  logic   dir,
  input  pixel_t sin,
  output pixel_t q [L]
);

  pixel_t a_tail_in;  // mux feeding the top of register A (position LA-1)
  pixel_t b_tail_in;  // mux feeding the top of register B (position L-1)

  always_comb begin
    a_tail_in = dir ? sin : q[LA];
    b_tail_in = dir ? q[0] : sin;
  end

  always_ff @(posedge clk) begin
    if (shift) begin
      for (int k = 0; k < LA - 1; k++) q[k] <= q[k+1];
      q[LA-1] <= a_tail_in;
      for (int k = LA; k < L - 1; k++) q[k] <= q[k+1];
      q[L-1] <= b_tail_in;
    end
  end

endmodule
