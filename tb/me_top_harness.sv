// me_top_harness: drives one me_top instance, with the given parameters,
// through two runs of macroblocks (RUN1 then RUN2) and checks every motion
// vector against a brute-force full search; see me_top_check.svh for the
// memory model, the checks and the mechanism counters.
module me_top_harness
  import me_pkg::*;
#(
  parameter int  N         = 4,
  parameter int  P         = 4,
  parameter int  C         = 1,
  parameter int  ALPHA     = min_alpha(N, P, C),
  parameter bit  PREFETCH  = 1'b0,
  parameter bit  NEED_HOLD = 1'b0,
  parameter int  RUN1      = 3,
  parameter int  RUN2      = 2,
  parameter int  SEED      = 1
)(
  input  logic clk,
  output logic finished,
  output int   checks,
  output int   failures
);

`define ME_TOP_INST me_top #(.N(N), .P(P), .C(C), .ALPHA(ALPHA), .PREFETCH(PREFETCH)) dut (.*);
`include "me_top_check.svh"
`undef ME_TOP_INST

endmodule
