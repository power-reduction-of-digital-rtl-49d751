// Testbench of dwt2d_parallel at reduced size (8 units, 32x8 images, so four
// stripes with neighbouring-stripe pixels, 4 sub-buses).  Two random images
// are streamed back to back at one pixel per clock, then a flush.  Every 2D
// coefficient must equal a full-image reference 2D (5,3) transform (rows,
// then columns, symmetric extension at the image borders) and must appear
// exactly once; the flush must finish within a few clocks.
module tb_dwt2d_parallel;
  import dwt_pkg::*;
  import tb_dwt_ref_pkg::*;

  localparam int NU = 8, IW = 32, IH = 8, S = 4, NIMG = 2;
  localparam int NST = IW / NU;

  logic clk = 0, rst_n = 1, in_valid = 0, flush = 0;
  logic [7:0] in_pix;
  logic coef_stb, odd_lp, even_lp, flushing;
  logic signed [15:0] coef [NU];
  logic coef_valid [NU];
  logic [ROW_W-1:0] odd_row, even_row;
  logic [STRIPE_W-1:0] odd_stripe, even_stripe;
  int checks = 0, failures = 0;

  dwt2d_parallel #(.NU(NU), .IMG_W(IW), .IMG_H(IH), .SPLITS(S), .PIX_W(8), .DW(16)) dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // asynchronous reset needs an edge

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int img  [NIMG][IH][IW];
  int ref2 [NIMG][IH][IW];
  int seen [NIMG][IH][IW];
  int img_out_odd = 0, img_out_even = 0;   // image currently leaving each parity
  int last_odd_stripe = 0, last_even_stripe = 0;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic make_ref(input int m);
    iarr_t v, t;
    for (int r = 0; r < IH; r++) begin
      v = {};
      for (int c = 0; c < IW; c++) v.push_back(img[m][r][c]);
      t = dwt53_1d(v);
      for (int c = 0; c < IW; c++) ref2[m][r][c] = t[c];
    end
    for (int c = 0; c < IW; c++) begin
      v = {};
      for (int r = 0; r < IH; r++) v.push_back(ref2[m][r][c]);
      t = dwt53_1d(v);
      for (int r = 0; r < IH; r++) ref2[m][r][c] = t[r];
    end
  endtask

  // output monitor: track which image each parity is delivering (the stripe
  // index wraps from NST-1 to 0 when a new image starts)
  always @(posedge clk) begin
    if (rst_n && coef_stb) begin
      for (int c = 0; c < NU; c++) if (coef_valid[c]) begin
        int row, st, m, col;
        bit lp;
        if (c % 2 == 1) begin
          if (int'(odd_stripe) < last_odd_stripe) img_out_odd++;
          last_odd_stripe = int'(odd_stripe);
          row = int'(odd_row); st = int'(odd_stripe); lp = odd_lp; m = img_out_odd;
        end else begin
          if (int'(even_stripe) < last_even_stripe) img_out_even++;
          last_even_stripe = int'(even_stripe);
          row = int'(even_row); st = int'(even_stripe); lp = even_lp; m = img_out_even;
        end
        col = st * NU + c;
        if (m < NIMG) begin
          check(lp == (row % 2 == 0), "band flag");
          check(int'(coef[c]) == ref2[m][row][col],
                $sformatf("img %0d r=%0d c=%0d got %0d exp %0d", m, row, col, coef[c], ref2[m][row][col]));
          seen[m][row][col]++;
        end else check(0, "output beyond the images sent");
      end
    end
  end

  initial begin
    int t0;
    in_pix = '0;
    for (int m = 0; m < NIMG; m++) begin
      for (int r = 0; r < IH; r++) for (int c = 0; c < IW; c++) begin
        img[m][r][c] = int'($urandom_range(0, 255));
        seen[m][r][c] = 0;
      end
      make_ref(m);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int m = 0; m < NIMG; m++)
      for (int s = 0; s < NST; s++)
        for (int r = 0; r < IH; r++)
          for (int p = 0; p < NU + 3; p++) begin
            int v;
            if (p < NU)       v = img[m][r][s*NU + p];
            else if (p == NU) v = (s > 0) ? img[m][r][s*NU - 2] : int'($urandom_range(0, 255));
            else if (p == NU+1) v = (s > 0) ? img[m][r][s*NU - 1] : int'($urandom_range(0, 255));
            else              v = (s < NST-1) ? img[m][r][s*NU + NU] : int'($urandom_range(0, 255));
            in_valid <= 1; in_pix <= 8'(v);
            @(posedge clk);
          end
    in_valid <= 0;
    repeat (4) @(posedge clk);
    flush <= 1;
    @(posedge clk);
    flush <= 0;
    t0 = 0;
    @(posedge clk);
    while (flushing && t0 < 50) begin @(posedge clk); t0++; end
    check(t0 <= 4, $sformatf("flush took %0d clocks", t0));
    repeat (4) @(posedge clk);
    for (int m = 0; m < NIMG; m++)
      for (int r = 0; r < IH; r++)
        for (int c = 0; c < IW; c++)
          check(seen[m][r][c] == 1, $sformatf("img %0d (%0d,%0d) seen %0d times", m, r, c, seen[m][r][c]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
