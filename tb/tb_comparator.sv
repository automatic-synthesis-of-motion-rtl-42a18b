// tb_comparator: sends three macroblocks of random SADs (C = 2 cores,
// P = 4, so Q = 4 and an 8 x 8 candidate set) through the comparator with
// first/last tags and idle cycles, and checks the reported minimum SAD and
// the vector of its earliest occurrence (scan order, lower core first),
// and that mv_valid is a single-clock pulse after the last candidate.
module tb_comparator;
  import me_pkg::*;
  localparam int P = 4, C = 2, SAD_W = 16;
  localparam int Q = (2 * P) / C;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                      rst_n, en;
  logic [SAD_W-1:0]          sad [C];
  cand_tag_t                 tag;
  logic                      mv_valid;
  logic signed [COORD_W-1:0] mv_x, mv_y;
  logic [SAD_W-1:0]          mv_sad;

  comparator #(.P(P), .C(C), .SAD_W(SAD_W)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .sad(sad), .tag(tag),
    .mv_valid(mv_valid), .mv_x(mv_x), .mv_y(mv_y), .mv_sad(mv_sad));

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  int valid_pulses = 0;
  always @(posedge clk) if (mv_valid) valid_pulses++;

  initial begin
    rst_n = 1'b0; en = 1'b0; tag = '0; sad[0] = 0; sad[1] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int mb = 0; mb < 3; mb++) begin
      int best, bx, by, pulses0;
      best = 1 << 30; bx = 0; by = 0;
      for (int dx = 0; dx < C * Q; dx++) begin
        for (int k = 0; k < Q; k++) begin
          int off;
          off = (dx % 2 == 0) ? k : Q - 1 - k;
          // an idle processing slot now and then
          if ($urandom % 4 == 0) begin
            en = 1'b0; tag.valid = 1'b1; @(negedge clk);
          end
          en = 1'b1;
          tag.valid = 1'b1;
          tag.first = (dx == 0 && k == 0);
          tag.last  = (dx == C * Q - 1 && k == Q - 1);
          tag.dx    = COORD_W'(dx);
          tag.off   = COORD_W'(off);
          for (int c = 0; c < C; c++) begin
            sad[c] = SAD_W'(200 + $urandom % 300);
            // planted minima: a very small one in MB 0 must not leak into MB 1
            if (mb == 0 && dx == 2 && k == 3 && c == 0) sad[c] = 3;
            if (mb == 2 && dx == 5 && k == 1 && c == 1) sad[c] = 7;
            if (int'(sad[c]) < best) begin
              best = sad[c]; bx = dx; by = c * Q + off;
            end
          end
          pulses0 = valid_pulses;
          @(negedge clk);
          if (!tag.last) begin
            checks++;
            if (valid_pulses != pulses0) begin
              failures++; $display("mv_valid before the last candidate");
            end
          end
        end
      end
      // invalid tag cycle must be ignored
      en = 1'b1; tag.valid = 1'b0; sad[0] = 0; sad[1] = 0;
      checks += 4;
      if (!mv_valid) begin
        failures++; $display("MB %0d: no mv_valid after last candidate", mb);
      end
      if (int'(mv_sad) != best) begin
        failures++; $display("MB %0d: sad %0d expected %0d", mb, mv_sad, best);
      end
      if (int'(mv_x) != bx - (P - 1) || int'(mv_y) != by - (P - 1)) begin
        failures++; $display("MB %0d: mv (%0d,%0d) expected (%0d,%0d)", mb, mv_x, mv_y, bx - (P - 1), by - (P - 1));
      end
      @(negedge clk);
      if (mv_valid) begin
        failures++; $display("MB %0d: mv_valid longer than one clock", mb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
