// Testbench of dwt53_proc: random centre/neighbour values in both modes,
// compared with exact floor-division lifting formulas.
module tb_dwt53_proc;
  import tb_dwt_ref_pkg::*;

  logic               lp;
  logic signed [15:0] x, a, b, y;
  int checks = 0, failures = 0;

  dwt53_proc #(.DW(16)) dut (.lp, .x, .a, .b, .y);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xi, ai, bi, exp_y;
    for (int t = 0; t < 4000; t++) begin
      xi = int'($urandom_range(0, 8000)) - 4000;
      ai = int'($urandom_range(0, 8000)) - 4000;
      bi = int'($urandom_range(0, 8000)) - 4000;
      lp = t[0];
      x = 16'(xi); a = 16'(ai); b = 16'(bi);
      #1;
      exp_y = lp ? xi + fdiv(ai + bi + 2, 4) : xi - fdiv(ai + bi, 2);
      checks++;
      if (int'(y) != exp_y) begin
        failures++;
        if (failures < 10) $display("mismatch lp=%0d x=%0d a=%0d b=%0d y=%0d exp=%0d", lp, xi, ai, bi, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
