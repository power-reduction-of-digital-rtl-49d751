// Testbench of fft_bp: random Q15 operands and twiddles from the reference
// table, compared with the reference butterfly (halved sum, halved
// difference times W, truncated to Q15).
module tb_fft_bp;
  import fft_pkg::*;
  import tb_fft_ref_pkg::*;
  cplx_t a, b, w, a_out, b_out;
  int checks = 0, failures = 0;

  fft_bp dut (.a, .b, .w, .a_out, .b_out);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wr, wi, oar, oai, obr, obi;
    for (int t = 0; t < 3000; t++) begin
      a.re = 16'(int'($urandom_range(0, 32000)) - 16000);
      a.im = 16'(int'($urandom_range(0, 32000)) - 16000);
      b.re = 16'(int'($urandom_range(0, 32000)) - 16000);
      b.im = 16'(int'($urandom_range(0, 32000)) - 16000);
      twiddle(int'($urandom_range(0, 511)), wr, wi);
      w.re = 16'(wr); w.im = 16'(wi);
      #1;
      bfly(a.re, a.im, b.re, b.im, wr, wi, oar, oai, obr, obi);
      checks++;
      if (int'(a_out.re) != oar || int'(a_out.im) != oai || int'(b_out.re) != obr || int'(b_out.im) != obi) begin
        failures++;
        if (failures < 10) $display("FAIL got %0d %0d %0d %0d exp %0d %0d %0d %0d",
                                    a_out.re, a_out.im, b_out.re, b_out.im, oar, oai, obr, obi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
