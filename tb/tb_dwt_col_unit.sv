// Testbench of dwt_col_unit: three stripes' columns of random row-transformed
// values (heights 8) are shifted in back to back, followed by three flush
// bubbles.  Every valid output must equal the 1D (5,3) transform of its
// column at the reported row, high pass on odd rows and low pass on even
// rows, and every row of every column must come out exactly once.
module tb_dwt_col_unit;
  import dwt_pkg::*;
  import tb_dwt_ref_pkg::*;

  localparam int H = 8, NS = 3;
  logic clk = 0, rst_n = 1, row_en = 0;
  logic signed [15:0] reg_a, y;
  row_tag_t tag_a;
  logic y_valid, y_lp;
  logic [ROW_W-1:0] y_row;
  logic [STRIPE_W-1:0] y_stripe;
  int checks = 0, failures = 0;

  dwt_col_unit #(.DW(16)) dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // asynchronous reset needs an edge

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  iarr_t col [NS];
  iarr_t ref_col [NS];
  int    seen [NS][H];

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    int s, r;
    for (int k = 0; k < NS; k++) begin
      col[k] = {};
      for (int i = 0; i < H; i++) col[k].push_back(int'($urandom_range(0, 1000)) - 500);
      ref_col[k] = dwt53_1d(col[k]);
      for (int i = 0; i < H; i++) seen[k][i] = 0;
    end
    reg_a = '0; tag_a = TAG_NONE;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < NS * H + 4; n++) begin
      // load Register A (as the row stage would), then advance the chain
      s = n / H; r = n % H;
      @(posedge clk);
      row_en <= 1;
      @(posedge clk);
      row_en <= 0;
      // Register A takes the next row at the same enable that shifts the chain
      if (s < NS) begin
        reg_a <= 16'(col[s][r]);
        tag_a <= '{valid: 1'b1, row: ROW_W'(r), stripe: STRIPE_W'(s), left_edge: 1'b1, right_edge: 1'b1};
      end else begin
        reg_a <= 16'(12345);
        tag_a <= '{valid: 1'b0, row: ROW_W'(r), stripe: '0, left_edge: 1'b1, right_edge: 1'b1};
      end
      #1;
      if (y_valid) begin
        int ys, yr;
        ys = int'(y_stripe); yr = int'(y_row);
        check(y_lp == (yr % 2 == 0), "band");
        check(int'(y) == ref_col[ys][yr], $sformatf("s=%0d r=%0d got %0d exp %0d", ys, yr, y, ref_col[ys][yr]));
        seen[ys][yr]++;
      end
    end
    for (int k = 0; k < NS; k++)
      for (int i = 0; i < H; i++) check(seen[k][i] == 1, $sformatf("row %0d of column %0d seen %0d times", i, k, seen[k][i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
