// sa_input_ctrl: search-area input controller.
//
// On a `fetch` pulse it reads one column (`fetch_col`) of the L x L search
// window from the external search-area memory, row 0 to row L-1, one read
// per clock (`rd_en`, `rd_row`, `rd_col`, `rd_bank`), and shifts each pixel
// into the SIPO input buffer as it returns on `rd_data` one clock after its
// read. `fetch_dir` is latched and drives the buffer's alignment
// multiplexers for the whole column. `ready` rises in the clock after the
// last pixel is in the buffer and falls when the array takes the column
// (`consume`). A new fetch may be requested in the same cycle as `consume`.
// `ready` is high from the (L+2)-th clock edge after the edge that samples
// `fetch`.
//
// `fetch_bank` selects one of two external window buffers, so the window of
// the next macroblock can be written while the current one is read. The
// memory interface (one-clock read latency, the bank bit) is this design's
// choice; that the controller fills the SIPO buffer row by row, with the
// direction-dependent alignment, is the architecture's.
module sa_input_ctrl
  import me_pkg::*;
#(
  parameter int N = 16,
  parameter int P = 16,
  parameter int C = 1,
  localparam int Q = (2 * P) / C,
  localparam int L = C * Q + N - 1
)(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               fetch,
  input  logic [COORD_W-1:0] fetch_col,
  input  logic               fetch_dir,
  input  logic               fetch_bank,
  input  logic               consume,
  output logic               ready,
  // external search-area memory
  output logic               rd_en,
  output logic [COORD_W-1:0] rd_row,
  output logic [COORD_W-1:0] rd_col,
  output logic               rd_bank,
  input  pixel_t             rd_data,
  // SIPO buffer control
  output logic               buf_shift,
  output logic               buf_dir,
  output pixel_t             buf_sin
);

  logic               busy;
  logic               last_q;   // the returning pixel is the column's last

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      rd_row    <= '0;
      rd_col    <= '0;
      rd_bank   <= 1'b0;
      buf_dir   <= 1'b0;
      buf_shift <= 1'b0;
      last_q    <= 1'b0;
      ready     <= 1'b0;
    end else begin
      buf_shift <= rd_en;
      last_q    <= rd_en && (rd_row == COORD_W'(L - 1));
      if (fetch) begin
        busy    <= 1'b1;
        rd_row  <= '0;
        rd_col  <= fetch_col;
        rd_bank <= fetch_bank;
        buf_dir <= fetch_dir;
      end else if (busy) begin
        if (rd_row == COORD_W'(L - 1)) busy <= 1'b0;
        else                           rd_row <= rd_row + 1'b1;
      end
      if (consume)     ready <= 1'b0;
      else if (last_q) ready <= 1'b1;
    end
  end

  assign rd_en   = busy;
  assign buf_sin = rd_data;

  property p_no_refetch;
    @(posedge clk) disable iff (!rst_n) fetch |-> !busy;
  endproperty
  a_no_refetch: assert property (p_no_refetch)
    else $error("sa_input_ctrl: fetch while a column is being read");

  property p_consume_ready;
    @(posedge clk) disable iff (!rst_n) consume |-> ready;
  endproperty
  a_consume_ready: assert property (p_consume_ready)
    else $error("sa_input_ctrl: column taken before it was complete");

endmodule
