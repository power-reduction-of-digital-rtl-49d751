// End-to-end testbench of subthreshold_dsp_top at its default (full) size:
// a 256x256 image through the 32-unit DWT and 1024/256-point transforms
// through the 32-processor hybrid FFT, both running at the same time.
//
// DWT side: one random 256x256 image is sent as 8 stripes of 32 columns,
// each row of a stripe as 35 serial words (32 pixels, then columns -2, -1
// and +32 of the neighbouring stripes), followed by a flush.  Every 2D
// coefficient is compared with a full-image reference (5,3) transform and
// must appear exactly once.
// FFT side: a 1024-point transform with all 32 processors active, then a
// 256-point transform with 8 processors active (mode switch with active
// unit scaling), then a 256-point transform with 32 again.  Each spectrum
// must match the reference fixed-point DIF FFT bit for bit.
// Mechanism counters printed at the end (each must be non-zero): stripes
// seen, left/right/top/bottom mirrored coefficients, flush, row strobes,
// processor stalls, stage drains, mode switches, and correct result words
// read from each memory bank (words 512-1023 live in the second bank).
// Only the top's ports are observed.
module tb_subthreshold_dsp_top;
  import dwt_pkg::*;
  import tb_dwt_ref_pkg::*;
  import tb_fft_ref_pkg::*;

  localparam int NU = 32, IW = 256, IH = 256, NST = IW / NU;

  logic clk = 0, rst_n = 1;
  logic dwt_in_valid = 0, dwt_flush = 0;
  logic [7:0] dwt_in_pix = '0;
  logic dwt_coef_stb, dwt_odd_lp, dwt_even_lp, dwt_flushing;
  logic signed [15:0] dwt_coef [NU];
  logic dwt_coef_valid [NU];
  logic [ROW_W-1:0] dwt_odd_row, dwt_even_row;
  logic [STRIPE_W-1:0] dwt_odd_stripe, dwt_even_stripe;
  logic fft_host_we = 0, fft_host_re = 0, fft_start = 0;
  logic [9:0] fft_host_waddr = '0, fft_host_raddr = '0;
  logic [31:0] fft_host_wdata = '0, fft_host_rdata;
  logic [3:0] fft_log2n = 4'd10;
  logic [5:0] fft_n_active = 6'd32;
  logic fft_busy, fft_done, fft_pe_stall, fft_draining;
  int checks = 0, failures = 0;

  subthreshold_dsp_top dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // asynchronous reset needs an edge

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // ---------------------------------------------------------------- counters
  int n_stripes = 0, n_mirror_l = 0, n_mirror_r = 0, n_mirror_t = 0, n_mirror_b = 0;
  int n_flush = 0, n_row_en = 0, n_stall = 0, n_drain = 0, n_mode = 0;
  int n_bank [2] = '{0, 0};
  int last_stripe = -1;

  always @(posedge clk) if (rst_n) begin
    if (dwt_coef_stb) n_row_en++;
    if (fft_pe_stall) n_stall++;
    if (fft_draining && !$past(fft_draining)) n_drain++;
  end

  // ------------------------------------------------------------------- DWT
  int img  [IH][IW];
  int ref2 [IH][IW];
  int seen [IH][IW];

  task automatic make_ref();
    iarr_t v, t;
    for (int r = 0; r < IH; r++) begin
      v = {};
      for (int c = 0; c < IW; c++) v.push_back(img[r][c]);
      t = dwt53_1d(v);
      for (int c = 0; c < IW; c++) ref2[r][c] = t[c];
    end
    for (int c = 0; c < IW; c++) begin
      v = {};
      for (int r = 0; r < IH; r++) v.push_back(ref2[r][c]);
      t = dwt53_1d(v);
      for (int r = 0; r < IH; r++) ref2[r][c] = t[r];
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && dwt_coef_stb) begin
      for (int c = 0; c < NU; c++) if (dwt_coef_valid[c]) begin
        int row, st, col;
        bit lp;
        if (c % 2 == 1) begin
          row = int'(dwt_odd_row); st = int'(dwt_odd_stripe); lp = dwt_odd_lp;
          if (st != last_stripe) begin n_stripes++; last_stripe = st; end
        end else begin
          row = int'(dwt_even_row); st = int'(dwt_even_stripe); lp = dwt_even_lp;
        end
        col = st * NU + c;
        // coefficients whose lifting step reaches past an image border
        if (col <= 1)       n_mirror_l++;
        if (col >= IW - 2)  n_mirror_r++;
        if (row <= 1)       n_mirror_t++;
        if (row >= IH - 2)  n_mirror_b++;
        check(lp == (row % 2 == 0), "band flag");
        check(int'(dwt_coef[c]) == ref2[row][col],
              $sformatf("dwt r=%0d c=%0d got %0d exp %0d", row, col, dwt_coef[c], ref2[row][col]));
        seen[row][col]++;
      end
    end
  end

  task automatic run_dwt();
    int t0;
    for (int s = 0; s < NST; s++)
      for (int r = 0; r < IH; r++)
        for (int p = 0; p < NU + 3; p++) begin
          int v;
          if (p < NU)         v = img[r][s*NU + p];
          else if (p == NU)   v = (s > 0) ? img[r][s*NU - 2] : 0;
          else if (p == NU+1) v = (s > 0) ? img[r][s*NU - 1] : 0;
          else                v = (s < NST-1) ? img[r][s*NU + NU] : 0;
          dwt_in_valid <= 1; dwt_in_pix <= 8'(v);
          @(posedge clk);
        end
    dwt_in_valid <= 0;
    repeat (4) @(posedge clk);
    dwt_flush <= 1;
    @(posedge clk);
    dwt_flush <= 0;
    n_flush++;
    t0 = 0;
    @(posedge clk);
    while (dwt_flushing && t0 < 50) begin @(posedge clk); t0++; end
    check(t0 <= 4, $sformatf("flush took %0d clocks", t0));
    repeat (4) @(posedge clk);
    for (int r = 0; r < IH; r++)
      for (int c = 0; c < IW; c++)
        check(seen[r][c] == 1, $sformatf("dwt (%0d,%0d) seen %0d times", r, c, seen[r][c]));
  endtask

  // ------------------------------------------------------------------- FFT
  task automatic run_fft(input int L, input int act, output int clocks);
    int N, got_r, got_i;
    int xr [1024], xi [1024];
    N = 1 << L;
    for (int i = 0; i < N; i++) begin
      xr[i] = int'($urandom_range(0, 40000)) - 20000;
      xi[i] = int'($urandom_range(0, 40000)) - 20000;
    end
    for (int i = 0; i < N; i++) begin
      fft_host_we <= 1; fft_host_waddr <= 10'(i); fft_host_wdata <= {16'(xr[i]), 16'(xi[i])};
      @(posedge clk);
    end
    fft_dif(L, xr, xi);
    if (act != int'(fft_n_active) || L != int'(fft_log2n)) n_mode++;
    fft_host_we <= 0; fft_log2n <= 4'(L); fft_n_active <= 6'(act); fft_start <= 1;
    @(posedge clk);
    fft_start <= 0;
    clocks = 1;
    while (!fft_done) begin @(posedge clk); clocks++; end
    @(posedge clk);
    for (int i = 0; i < N; i++) begin
      fft_host_re <= 1; fft_host_raddr <= 10'(i);
      @(posedge clk);
      #1;
      got_r = int'($signed(fft_host_rdata[31:16])); got_i = int'($signed(fft_host_rdata[15:0]));
      if (got_r == xr[i] && got_i == xi[i]) n_bank[i / 512]++;
      check(got_r == xr[i] && got_i == xi[i],
            $sformatf("fft N=%0d word %0d: got %0d,%0d exp %0d,%0d", N, i, got_r, got_i, xr[i], xi[i]));
    end
    fft_host_re <= 0;
  endtask

  initial begin
    int c1024, c256s, c256;
    for (int r = 0; r < IH; r++) for (int c = 0; c < IW; c++) begin
      img[r][c] = int'($urandom_range(0, 255));
      seen[r][c] = 0;
    end
    make_ref();
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    fork
      run_dwt();
      begin
        run_fft(10, 32, c1024);
        run_fft(8, 8, c256s);
        run_fft(8, 32, c256);
      end
    join
    // 1024 points, 32 processors: 10 stages of 512 butterflies at one per clock
    check(c1024 >= 10 * 512 && c1024 <= 10 * (512 + 32 + 12), $sformatf("1024-point took %0d clocks", c1024));
    check(c256 >= 8 * 128 && c256 <= 8 * (128 + 32 + 12), $sformatf("256-point took %0d clocks", c256));
    // 8 of 32 processors: one butterfly every 4 clocks
    check(c256s >= 8 * 128 * 4 && c256s <= 8 * (128 * 4 + 32 + 12), $sformatf("256-point on 8 processors took %0d clocks", c256s));
    check(n_stripes == NST, $sformatf("%0d stripes", n_stripes));
    check(n_mirror_l > 0 && n_mirror_r > 0 && n_mirror_t > 0 && n_mirror_b > 0, "border mirroring");
    check(n_row_en == NST * IH + 3, $sformatf("%0d row strobes", n_row_en));
    check(n_flush == 1 && n_stall > 0 && n_drain >= 10 + 8 + 8 && n_mode >= 2, "fft mechanisms");
    check(n_bank[0] > 0 && n_bank[1] > 0, "both memory banks hold correct results");
    $display("MECH dwt_stripes=%0d dwt_row_strobes=%0d dwt_mirror_left=%0d dwt_mirror_right=%0d dwt_mirror_top=%0d dwt_mirror_bottom=%0d dwt_flush=%0d",
             n_stripes, n_row_en, n_mirror_l, n_mirror_r, n_mirror_t, n_mirror_b, n_flush);
    $display("MECH fft_stall_cycles=%0d fft_stage_drains=%0d fft_mode_switches=%0d fft_bank0_results=%0d fft_bank1_results=%0d",
             n_stall, n_drain, n_mode, n_bank[0], n_bank[1]);
    $display("clocks: 1024-pt/32 %0d, 256-pt/8 %0d, 256-pt/32 %0d", c1024, c256s, c256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
