// Testbench of fft_rom: all 512 twiddle exponents of the 1024-point table,
// one per clock, compared one clock later with cos/sin computed in the
// testbench.
module tb_fft_rom;
  import fft_pkg::*;
  import tb_fft_ref_pkg::*;
  logic clk = 0;
  logic [8:0] e;
  cplx_t w;
  int checks = 0, failures = 0;

  fft_rom dut (.clk, .e, .w);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wr, wi;
    for (int k = 0; k <= 512; k++) begin
      @(negedge clk);
      if (k > 0) begin
        twiddle(k - 1, wr, wi);
        checks++;
        if (int'(w.re) != wr || int'(w.im) != wi) begin
          failures++;
          if (failures < 10) $display("FAIL e=%0d got %0d %0d exp %0d %0d", k - 1, w.re, w.im, wr, wi);
        end
      end
      if (k < 512) e = 9'(k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
