// prefetch_layer: transparent pre-fetch layer for the search window.
//
// Without it, the first N-1 columns of every search window have to pass
// through the array column by column, costing (N-1)*Q processing cycles per
// macroblock before the first candidate can be compared. This layer holds
// N-1 search columns of L pixels next to the array. While the current
// macroblock is processed, it loads the first N-1 columns of the next window
// through its own search input controller and buffer. At the macroblock
// boundary the array takes all N-1 columns in one cycle (`xfer`), together
// with column N-1 from the main input buffer, so the first candidate of the
// new window is compared in that same processing cycle.
//
// Operation: a `start` pulse (with `start_dir` and `start_bank`) makes the
// sequencer fetch window columns 0 .. N-2, one at a time, through the
// search input controller attached to `fetch`/`consume`/`ready`. Each
// returned column is shifted into the layer (oldest in `cols[0]`). After the
// (N-1)-th column `full` rises; it falls with `xfer`. All N-1 columns are
// fetched with the same alignment `start_dir`, which is the alignment of the
// array load at which they will be transferred. The sequencer runs on the
// read clock; `xfer` must only be given while `full` is high.
//
// Following the architecture: a transparent layer that is filled during
// processing and transferred to the processing layer after the last
// candidate. This design's own choices: the layer has its own search input
// controller and memory port, so the read clock ratio of the main input
// buffer is unchanged, and it is loaded column by column through a second
// split input buffer with the same alignment circuit.
module prefetch_layer
  import me_pkg::*;
#(
  parameter int N = 16,
  parameter int P = 16,
  parameter int C = 1,
  localparam int Q  = (2 * P) / C,
  localparam int L  = C * Q + N - 1,
  localparam int NC = (N > 1) ? N - 1 : 1
)(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               start_dir,
  input  logic               start_bank,
  input  logic               xfer,
  output logic               full,
  // search input controller of the layer
  output logic               fetch,
  output logic [COORD_W-1:0] fetch_col,
  output logic               fetch_dir,
  output logic               fetch_bank,
  output logic               consume,
  input  logic               ready,
  input  pixel_t             col_in [L],
  // the layer's columns, cols[j] goes to array column j
  output pixel_t             cols [NC][L]
);

  logic               active;    // sequence in progress, one fetch outstanding
  logic [COORD_W-1:0] nfetched;  // columns requested so far

  assign consume = active && ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active     <= 1'b0;
      nfetched   <= '0;
      full       <= 1'b0;
      fetch      <= 1'b0;
      fetch_col  <= '0;
      fetch_dir  <= 1'b0;
      fetch_bank <= 1'b0;
    end else begin
      fetch <= 1'b0;
      if (xfer) full <= 1'b0;
      if (start) begin
        active     <= 1'b1;
        nfetched   <= COORD_W'(1);
        fetch      <= 1'b1;
        fetch_col  <= '0;
        fetch_dir  <= start_dir;
        fetch_bank <= start_bank;
      end else if (consume) begin
        if (nfetched == COORD_W'(N - 1)) begin
          active  <= 1'b0;
          full    <= 1'b1;
        end else begin
          nfetched  <= nfetched + 1'b1;
          fetch     <= 1'b1;
          fetch_col <= nfetched;
        end
      end
    end
  end

  // column shift register: each loaded column enters at NC-1, older
  // columns move towards 0
  always_ff @(posedge clk) begin
    if (consume) begin
      for (int j = 0; j < NC - 1; j++) cols[j] <= cols[j+1];
      cols[NC-1] <= col_in;
    end
  end

  // a new sequence may only start after the previous one was transferred
  p_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                 start |-> !active && (!full || xfer))
    else $error("prefetch_layer: start while the layer is busy or full");
  p_xfer_full:  assert property (@(posedge clk) disable iff (!rst_n)
                                 xfer |-> full)
    else $error("prefetch_layer: transfer from a layer that is not full");

endmodule
