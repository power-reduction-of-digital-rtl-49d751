// Testbench of booth_mul: corner values and random 16-bit signed operands
// compared with the product of the simulator's own multiplication.
module tb_booth_mul;
  logic signed [15:0] x, y;
  logic signed [31:0] p;
  int checks = 0, failures = 0;

  booth_mul #(.W(16)) dut (.x, .y, .p);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input int a, input int b);
    longint e;
    x = 16'(a); y = 16'(b);
    #1;
    e = longint'(x) * longint'(y);
    checks++;
    if (longint'(p) != e) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d = %0d, got %0d", x, y, e, p);
    end
  endtask

  initial begin
    int corners [8] = '{0, 1, -1, 2, 32767, -32768, 21845, -21846};
    foreach (corners[i]) foreach (corners[j]) try(corners[i], corners[j]);
    for (int t = 0; t < 5000; t++) try(int'($urandom) , int'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
