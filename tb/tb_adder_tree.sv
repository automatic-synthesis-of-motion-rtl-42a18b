// tb_adder_tree: feeds random row sums into two adder trees (N = 16 and a
// non-power-of-two N = 5) and checks that each SAD and its tag come out
// exactly LEV = ceil(log2 N) enabled cycles later, with idle (en low)
// cycles in between that must not advance the pipeline.
module tb_adder_tree;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int done_cnt = 0;

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  logic rst_n = 1'b0;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
  end

  for (genvar gi = 0; gi < 2; gi++) begin : g_cfg
    localparam int N     = (gi == 0) ? 16 : 5;
    localparam int IN_W  = 12;
    localparam int TAG_W = 10;
    localparam int LEV   = $clog2(N);
    localparam int OUT_W = IN_W + LEV;

    logic             en;
    logic [IN_W-1:0]  in_sum [N];
    logic [TAG_W-1:0] tag_in, tag_out;
    logic [OUT_W-1:0] sad;
    int               exp_sad [$];
    int               exp_tag [$];

    adder_tree #(.N(N), .IN_W(IN_W), .TAG_W(TAG_W)) dut (
      .clk(clk), .rst_n(rst_n), .en(en), .in_sum(in_sum), .tag_in(tag_in), .sad(sad), .tag_out(tag_out));

    initial begin
      int s;
      en = 1'b0; tag_in = '0;
      for (int i = 0; i < N; i++) in_sum[i] = '0;
      wait (rst_n);
      @(negedge clk);
      for (int t = 0; t < 300 + LEV; t++) begin
        en = ($urandom % 3) != 0;
        s = 0;
        for (int i = 0; i < N; i++) begin
          in_sum[i] = IN_W'($urandom);
          s += int'(in_sum[i]);
        end
        tag_in = TAG_W'(t);
        if (en) begin
          exp_sad.push_back(s);
          exp_tag.push_back(t % (1 << TAG_W));
        end
        @(negedge clk);
        // after LEV enabled cycles the oldest entry is at the output
        if (en && exp_sad.size() >= LEV) begin
          int es, et;
          es = exp_sad.pop_front();
          et = exp_tag.pop_front();
          checks += 2;
          if (int'(sad) != es) begin
            failures++; $display("N=%0d t=%0d sad %0d expected %0d", N, t, sad, es);
          end
          if (int'(tag_out) != et) begin
            failures++; $display("N=%0d t=%0d tag %0d expected %0d", N, t, tag_out, et);
          end
        end
      end
      done_cnt++;
    end
  end

  initial begin
    wait (done_cnt == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
