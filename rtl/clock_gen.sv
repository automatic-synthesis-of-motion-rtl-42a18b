// clock_gen: derives the processing clock from the read clock.
//
// The search and reference input buffers are filled at the read-clock rate,
// which must be ALPHA times the processing-clock rate so that a search column
// of L pixels (plus three cycles of overhead) is read while the array
// processes the Q candidates of the previous column. This design runs the
// whole processor from the read clock and expresses the processing clock as
// a one-cycle enable, `proc_en`, high in one of every ALPHA read-clock
// cycles (every cycle when ALPHA = 1). A phase counter modulo ALPHA
// produces it; proc_en is high while the counter is 0, which includes the
// first clock after reset.
//
// The two clock rates and the ratio ALPHA = ceil(C + (N+2)/floor(2P/C)) are
// the architecture's; using a clock enable instead of a second clock is this
// design's choice, which keeps the design in one clock domain.
module clock_gen #(
  parameter int ALPHA = 2,
  localparam int CW   = (ALPHA > 1) ? $clog2(ALPHA) : 1
)(
  input  logic          clk,
  input  logic          rst_n,
  output logic          proc_en
);

  logic [CW-1:0] phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        phase <= '0;
    else if (phase == CW'(ALPHA - 1))  phase <= '0;
    else                               phase <= phase + 1'b1;
  end

  assign proc_en = (phase == '0);

endmodule
