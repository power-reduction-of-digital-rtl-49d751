// Testbench helper: one parallel DWT of width NU transforming one random
// IMG_W x IMG_H image end to end.  It streams the image stripe by stripe
// (NU pixels per stripe row, plus the three neighbouring-stripe pixels when
// the image is wider than NU), flushes, and compares every 2D coefficient
// with a full-image reference (5,3) transform; each coefficient must appear
// exactly once.  It reports its counts and raises finished when done, so a
// testbench can run several widths side by side.
module dwt_workload_run
  import dwt_pkg::*;
  import tb_dwt_ref_pkg::*;
#(
  parameter int NU    = 32,
  parameter int IMG_W = 256,
  parameter int IMG_H = 256
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   clocks
);
  localparam int NST = IMG_W / NU;
  localparam int NX  = (NST > 1) ? NU + 3 : NU;

  logic in_valid, flush;
  logic [7:0] in_pix;
  logic coef_stb, odd_lp, even_lp, flushing;
  logic signed [15:0] coef [NU];
  logic coef_valid [NU];
  logic [ROW_W-1:0] odd_row, even_row;
  logic [STRIPE_W-1:0] odd_stripe, even_stripe;

  dwt2d_parallel #(.NU(NU), .IMG_W(IMG_W), .IMG_H(IMG_H), .SPLITS(4), .PIX_W(8), .DW(16)) dut (.*);

  int img  [IMG_H][IMG_W];
  int ref2 [IMG_H][IMG_W];
  int seen [IMG_H][IMG_W];

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 5) $display("FAIL NU=%0d %s", NU, what); end
  endtask

  task automatic make_ref();
    iarr_t v, t;
    for (int r = 0; r < IMG_H; r++) begin
      v = {};
      for (int c = 0; c < IMG_W; c++) v.push_back(img[r][c]);
      t = dwt53_1d(v);
      for (int c = 0; c < IMG_W; c++) ref2[r][c] = t[c];
    end
    for (int c = 0; c < IMG_W; c++) begin
      v = {};
      for (int r = 0; r < IMG_H; r++) v.push_back(ref2[r][c]);
      t = dwt53_1d(v);
      for (int r = 0; r < IMG_H; r++) ref2[r][c] = t[r];
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && coef_stb) begin
      for (int c = 0; c < NU; c++) if (coef_valid[c]) begin
        int row, col;
        bit lp;
        if (c % 2 == 1) begin row = int'(odd_row);  col = int'(odd_stripe) * NU + c;  lp = odd_lp; end
        else            begin row = int'(even_row); col = int'(even_stripe) * NU + c; lp = even_lp; end
        check(lp == (row % 2 == 0), "band flag");
        check(int'(coef[c]) == ref2[row][col],
              $sformatf("r=%0d c=%0d got %0d exp %0d", row, col, coef[c], ref2[row][col]));
        seen[row][col]++;
      end
    end
  end

  initial begin
    int t0;
    finished = 0; checks = 0; failures = 0; clocks = 0;
    in_valid = 0; flush = 0; in_pix = '0;
    for (int r = 0; r < IMG_H; r++) for (int c = 0; c < IMG_W; c++) begin
      img[r][c] = int'($urandom_range(0, 255));
      seen[r][c] = 0;
    end
    make_ref();
    @(posedge rst_n);
    @(posedge clk);
    for (int s = 0; s < NST; s++)
      for (int r = 0; r < IMG_H; r++)
        for (int p = 0; p < NX; p++) begin
          int v;
          if (p < NU)         v = img[r][s*NU + p];
          else if (p == NU)   v = (s > 0) ? img[r][s*NU - 2] : 0;
          else if (p == NU+1) v = (s > 0) ? img[r][s*NU - 1] : 0;
          else                v = (s < NST-1) ? img[r][s*NU + NU] : 0;
          in_valid <= 1; in_pix <= 8'(v);
          @(posedge clk);
          clocks++;
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
    for (int r = 0; r < IMG_H; r++)
      for (int c = 0; c < IMG_W; c++)
        check(seen[r][c] == 1, $sformatf("(%0d,%0d) seen %0d times", r, c, seen[r][c]));
    finished = 1;
  end
endmodule
