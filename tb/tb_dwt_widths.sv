// Width sweep of the parallel DWT: designs with 4, 16 and 64 parallel units
// each transform one random 256x256 image (64, 16 and 4 stripes), side by
// side.  A fourth run uses 32 units on a 32-pixel-wide, 256-row image, where
// one stripe covers the whole width, so no striping and no extra bus words
// are used (the case of a design as wide as the image).  Two units, the
// narrowest width of the sweep, are below the minimum of four that the row
// stage needs.  Every coefficient of every run is compared with the
// reference transform, and the number of bus clocks per image must be
// rows * stripes * (NU + 3) when striping and rows * width when not.
module tb_dwt_widths;
  localparam int N = 4;
  localparam int WIDTHS [N] = '{4, 16, 64, 32};
  localparam int IMGW   [N] = '{256, 256, 256, 32};

  logic clk = 0, rst_n = 1;
  logic fin [N];
  int   chk [N], fl [N], clk_cnt [N];
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  for (genvar k = 0; k < N; k++) begin : g_w
    dwt_workload_run #(.NU(WIDTHS[k]), .IMG_W(IMGW[k]), .IMG_H(256)) u_run (
      .clk, .rst_n, .finished(fin[k]), .checks(chk[k]), .failures(fl[k]), .clocks(clk_cnt[k])
    );
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    do begin
      @(posedge clk);
      all = 1;
      for (int k = 0; k < N; k++) all &= fin[k];
    end while (!all);
    for (int k = 0; k < N; k++) begin
      int st, exp_clk;
      st = IMGW[k] / WIDTHS[k];
      exp_clk = (st > 1) ? 256 * st * (WIDTHS[k] + 3) : 256 * IMGW[k];
      checks += chk[k] + 1;
      failures += fl[k];
      if (clk_cnt[k] != exp_clk) begin
        failures++;
        $display("FAIL NU=%0d took %0d bus clocks, expected %0d", WIDTHS[k], clk_cnt[k], exp_clk);
      end
      $display("NU=%0d: %0d stripes, %0d bus clocks per image, %0d checks, %0d failures",
               WIDTHS[k], st, clk_cnt[k], chk[k], fl[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
