// Testbench of dwt_row_stage (8 units): rows taken from a three-stripe-wide
// line are fed as left, middle and right stripe; Register A of every column
// must equal the 1D (5,3) transform of the whole line, which checks the
// mirroring at image borders and the use of neighbouring-stripe pixels and
// the extra edge processor inside the image.  Odd columns must be ready one
// row enable after the row entered, even columns two.
module tb_dwt_row_stage;
  import dwt_pkg::*;
  import tb_dwt_ref_pkg::*;

  localparam int NU = 8;
  logic clk = 0, rst_n = 1, row_en = 0;
  logic signed [15:0] x [NU];
  logic signed [15:0] x_m2, x_m1, x_pn;
  row_tag_t tag_in, tag_odd, tag_even;
  logic signed [15:0] reg_a [NU];
  int checks = 0, failures = 0;

  dwt_row_stage #(.NU(NU), .DW(16)) dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // asynchronous reset needs an edge

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  iarr_t line [16];
  iarr_t ref_line [16];
  int    exp_even [NU];
  int    prev_ref [NU];
  row_tag_t prev_tag;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    for (int r = 0; r < 16; r++) begin
      line[r] = {};
      for (int i = 0; i < 3 * NU; i++) line[r].push_back(int'($urandom_range(0, 255)));
      ref_line[r] = dwt53_1d(line[r]);
    end
    foreach (x[i]) x[i] = '0;
    x_m2 = '0; x_m1 = '0; x_pn = '0; tag_in = TAG_NONE;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // 16 rows, each presented as stripe s = r % 3
    for (int r = 0; r < 17; r++) begin
      int s;
      s = r % 3;
      if (r < 16) begin
        for (int c = 0; c < NU; c++) x[c] <= 16'(line[r][s*NU + c]);
        x_m2 <= (s > 0) ? 16'(line[r][s*NU - 2]) : 16'(777);
        x_m1 <= (s > 0) ? 16'(line[r][s*NU - 1]) : 16'(555);
        x_pn <= (s < 2) ? 16'(line[r][s*NU + NU]) : 16'(333);
        tag_in <= '{valid: 1'b1, row: ROW_W'(r), stripe: STRIPE_W'(s),
                    left_edge: (s == 0), right_edge: (s == 2)};
      end
      row_en <= 1;
      @(posedge clk);
      row_en <= 0;
      @(posedge clk);
      #1;
      if (r < 16) begin
        for (int c = 1; c < NU; c += 2)
          check(int'(reg_a[c]) == ref_line[r][s*NU + c], $sformatf("odd r=%0d c=%0d got %0d exp %0d", r, c, reg_a[c], ref_line[r][s*NU + c]));
        check(tag_odd.row == ROW_W'(r) && tag_odd.valid, "tag_odd");
      end
      if (r > 0) begin
        int ps;
        ps = (r - 1) % 3;
        for (int c = 0; c < NU; c += 2)
          check(int'(reg_a[c]) == ref_line[r-1][ps*NU + c], $sformatf("even r=%0d c=%0d got %0d exp %0d", r-1, c, reg_a[c], ref_line[r-1][ps*NU + c]));
        check(tag_even.row == ROW_W'(r - 1), "tag_even");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
