// adder_tree: pipelined binary adder tree that turns the N row sums of one
// active block into the SAD of the candidate the block processes.
//
// The tree has ceil(log2 N) levels of two-input adders (N-1 adders when N is
// a power of two), with a register after every level, so one SAD leaves
// every enabled cycle and LAT = ceil(log2 N) enabled cycles after its row
// sums entered. Missing inputs of a non-power-of-two N are zero. A TAG_W-bit
// tag is carried through the same registers so the comparator receives the
// candidate coordinates together with the SAD. The pipeline advances only
// when `en` (the processing-clock enable) is high; tags reset to zero.
//
// The adder-tree function and its adder count are the architecture's; the
// register after every level is this design's choice.
module adder_tree #(
  parameter int N     = 16,
  parameter int IN_W  = 12,
  parameter int TAG_W = 19,
  localparam int LEV   = (N > 1) ? $clog2(N) : 1,
  localparam int NP    = 1 << LEV,
  localparam int OUT_W = IN_W + LEV
)(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [IN_W-1:0]  in_sum [N],
  input  logic [TAG_W-1:0] tag_in,
  output logic [OUT_W-1:0] sad,
  output logic [TAG_W-1:0] tag_out
);

  // lvl[k][i]: i-th value after level k (k = 0 is the padded input)
  logic [OUT_W-1:0] lvl [LEV+1][NP];
  logic [TAG_W-1:0] tag [LEV+1];

  for (genvar i = 0; i < NP; i++) begin : g_in
    if (i < N) begin : g_used
      assign lvl[0][i] = OUT_W'(in_sum[i]);
    end else begin : g_pad
      assign lvl[0][i] = '0;
    end
  end
  assign tag[0] = tag_in;

  for (genvar k = 1; k <= LEV; k++) begin : g_lev
    localparam int W = NP >> k;
    logic [OUT_W-1:0] q [W];
    logic [TAG_W-1:0] tq;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < W; i++) q[i] <= '0;
        tq <= '0;
      end else if (en) begin
        for (int i = 0; i < W; i++) q[i] <= lvl[k-1][2*i] + lvl[k-1][2*i+1];
        tq <= tag[k-1];
      end
    end
    for (genvar i = 0; i < NP; i++) begin : g_out
      if (i < W) begin : g_used
        assign lvl[k][i] = q[i];
      end else begin : g_unused
        assign lvl[k][i] = '0;
      end
    end
    assign tag[k] = tq;
  end

  assign sad     = lvl[LEV][0];
  assign tag_out = tag[LEV];

endmodule
