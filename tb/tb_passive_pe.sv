// tb_passive_pe: drives the three displacement inputs of a passive PE with
// random pixels and checks that each op (left, forward, backward, hold) and
// a low enable store the expected value one clock later.
module tb_passive_pe;
  import me_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic      en;
  shift_op_e op;
  pixel_t    fr, fn, fp, s, exp_s;

  passive_pe dut (.clk(clk), .en(en), .op(op), .from_right(fr), .from_next(fn), .from_prev(fp), .s(s));

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    en = 1'b1; op = SH_LEFT; fr = 8'h5A; fn = 0; fp = 0;
    @(negedge clk);
    exp_s = 8'h5A;
    for (int t = 0; t < 400; t++) begin
      fr = pixel_t'($urandom); fn = pixel_t'($urandom); fp = pixel_t'($urandom);
      en = ($urandom % 5) != 0;
      op = shift_op_e'($urandom % 4);
      if (en) begin
        case (op)
          SH_LEFT: exp_s = fr;
          SH_FWD:  exp_s = fn;
          SH_BWD:  exp_s = fp;
          default: ;
        endcase
      end
      @(negedge clk);
      checks++;
      if (s !== exp_s) begin
        failures++;
        $display("t=%0d op=%s en=%b: s=%h expected %h", t, op.name(), en, s, exp_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
