// ref_input_buffer: serial-in parallel-out input register for the reference
// macroblock.
//
// One column of the N x N reference block (rows 0 .. N-1) enters serially
// on `sin`, one pixel per `shift`; after N shifts position i holds row i and
// the array copies the whole column into the running-data registers of
// column N-1 of every active block. The register may start shifting the
// next column in the same clock edge at which the array copies the current
// one.
//
// A chain of N registers fed from one end is what the architecture shows
// (the reference input register of the active block); the row order is this
// design's choice. No reset: a column is always complete before use.
module ref_input_buffer
  import me_pkg::*;
#(
  parameter int N = 16
)(
  input  logic   clk,
  input  logic   shift,
  input  pixel_t sin,
  output pixel_t q [N]
);

  always_ff @(posedge clk) begin
    if (shift) begin
      for (int i = 0; i < N - 1; i++) q[i] <= q[i+1];
      q[N-1] <= sin;
    end
  end

endmodule
