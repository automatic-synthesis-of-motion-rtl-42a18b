// tb_active_pe: random test of an active PE with two reference fractions
// (NFRAC = 2, as when an active block covers half of the macroblock rows).
// A model in the testbench tracks the search register, the running-data and
// standing-data registers; every cycle the testbench checks the search
// pixel, R_out and psum_out = psum_in + |standing[frac_sel] - s|.
module tb_active_pe;
  import me_pkg::*;
  localparam int SUM_W = 12;
  localparam int NF    = 2;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic             rst_n, en, ref_shift, ref_xfer;
  shift_op_e        op;
  pixel_t           fr, fn, fp, s, ref_in, ref_out;
  logic [1:0]       ref_wsel, frac_sel;
  logic [SUM_W-1:0] psum_in, psum_out;

  pixel_t m_s;
  pixel_t m_run [NF];
  pixel_t m_std [NF];

  active_pe #(.SUM_W(SUM_W), .NFRAC(NF)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .op(op), .from_right(fr), .from_next(fn), .from_prev(fp),
    .s(s), .ref_in(ref_in), .ref_shift(ref_shift), .ref_wsel(ref_wsel), .ref_out(ref_out),
    .ref_xfer(ref_xfer), .frac_sel(frac_sel), .psum_in(psum_in), .psum_out(psum_out));

  function automatic int absd(input int a, input int b);
    return (a > b) ? a - b : b - a;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    rst_n = 1'b0; en = 1'b1; op = SH_LEFT; fr = 8'h11; fn = 0; fp = 0;
    ref_in = 0; ref_shift = 0; ref_xfer = 0; ref_wsel = 0; frac_sel = 0; psum_in = 0;
    m_run = '{0, 0}; m_std = '{0, 0};
    @(negedge clk);
    rst_n = 1'b1;
    m_s = 8'h11;
    for (int t = 0; t < 1000; t++) begin
      fr = pixel_t'($urandom); fn = pixel_t'($urandom); fp = pixel_t'($urandom);
      en = ($urandom % 4) != 0;
      op = shift_op_e'($urandom % 4);
      ref_in    = pixel_t'($urandom);
      ref_shift = ($urandom % 3) == 0;
      ref_xfer  = ($urandom % 5) == 0;
      ref_wsel  = 2'($urandom % NF);
      frac_sel  = 2'($urandom % NF);
      psum_in   = SUM_W'($urandom % 3000);
      #1;
      checks += 2;
      if (ref_out !== m_run[ref_wsel]) begin
        failures++; $display("t=%0d R_out=%h expected %h", t, ref_out, m_run[ref_wsel]);
      end
      if (int'(psum_out) != int'(psum_in) + absd(m_std[frac_sel], m_s)) begin
        failures++;
        $display("t=%0d psum_out=%0d expected %0d", t, psum_out, int'(psum_in) + absd(m_std[frac_sel], m_s));
      end
      if (en) begin
        case (op)
          SH_LEFT: m_s = fr;
          SH_FWD:  m_s = fn;
          SH_BWD:  m_s = fp;
          default: ;
        endcase
      end
      if (ref_xfer) m_std = m_run;
      if (ref_shift) m_run[ref_wsel] = ref_in;
      @(negedge clk);
      checks++;
      if (s !== m_s) begin
        failures++; $display("t=%0d s=%h expected %h", t, s, m_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
