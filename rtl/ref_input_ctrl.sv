// ref_input_ctrl: reference macroblock input controller.
//
// On a `fetch` pulse it reads the N x N reference block from the external
// reference memory column by column (column 0 first, rows 0 .. N-1 within a
// column), one read per clock, and shifts each returning pixel (one-clock
// read latency) into the reference SIPO register. In the clock after a
// column is complete it pulses `arr_shift`, which moves the running-data
// registers of the array one column left and inserts that column. After the
// N-th column `ready` rises; it falls when the array copies the running data
// into its standing-data registers (`consume`). The whole block takes
// N*N + 3 clocks from `fetch` to `ready`.
//
// Because the running-data registers are separate from the standing-data
// registers used by the computation, the next block is loaded while the
// current one is processed, as in the architecture. The memory interface
// and the column-major order are this design's choices.
module ref_input_ctrl
  import me_pkg::*;
#(
  parameter int N = 16
)(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               fetch,
  input  logic               fetch_bank,
  input  logic               consume,
  output logic               ready,
  // external reference memory
  output logic               rd_en,
  output logic [COORD_W-1:0] rd_row,
  output logic [COORD_W-1:0] rd_col,
  output logic               rd_bank,
  input  pixel_t             rd_data,
  // reference SIPO register and running-data registers
  output logic               buf_shift,
  output pixel_t             buf_sin,
  output logic               arr_shift
);

  logic busy;
  logic colend_q, blkend_q, blkend_q2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      rd_row    <= '0;
      rd_col    <= '0;
      rd_bank   <= 1'b0;
      buf_shift <= 1'b0;
      colend_q  <= 1'b0;
      blkend_q  <= 1'b0;
      blkend_q2 <= 1'b0;
      arr_shift <= 1'b0;
      ready     <= 1'b0;
    end else begin
      buf_shift <= rd_en;
      colend_q  <= rd_en && (rd_row == COORD_W'(N - 1));
      blkend_q  <= rd_en && (rd_row == COORD_W'(N - 1)) && (rd_col == COORD_W'(N - 1));
      arr_shift <= colend_q;
      blkend_q2 <= blkend_q;
      if (fetch) begin
        busy    <= 1'b1;
        rd_row  <= '0;
        rd_col  <= '0;
        rd_bank <= fetch_bank;
      end else if (busy) begin
        if (rd_row == COORD_W'(N - 1)) begin
          rd_row <= '0;
          if (rd_col == COORD_W'(N - 1)) busy <= 1'b0;
          else                           rd_col <= rd_col + 1'b1;
        end else begin
          rd_row <= rd_row + 1'b1;
        end
      end
      if (consume)        ready <= 1'b0;
      else if (blkend_q2) ready <= 1'b1;
    end
  end

  assign rd_en   = busy;
  assign buf_sin = rd_data;

  property p_no_refetch;
    @(posedge clk) disable iff (!rst_n) fetch |-> !busy;
  endproperty
  a_no_refetch: assert property (p_no_refetch)
    else $error("ref_input_ctrl: fetch while a block is being read");

  property p_consume_ready;
    @(posedge clk) disable iff (!rst_n) consume |-> ready;
  endproperty
  a_consume_ready: assert property (p_consume_ready)
    else $error("ref_input_ctrl: block taken before it was complete");

endmodule
