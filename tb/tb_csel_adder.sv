// Testbench of csel_adder (17 and 33 bits): random and carry-chain corner
// operands, add and subtract, against the simulator's own arithmetic.
module tb_csel_adder;
  logic [16:0] a, b, s;
  logic        sub, cout;
  logic [32:0] a2, b2, s2;
  logic        sub2, cout2;
  int checks = 0, failures = 0;

  csel_adder #(.W(17), .BLK(4)) dut  (.a, .b, .sub, .s, .cout);
  csel_adder #(.W(33), .BLK(4)) dut2 (.a(a2), .b(b2), .sub(sub2), .s(s2), .cout(cout2));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [17:0] e;
    logic [33:0] e2;
    for (int t = 0; t < 6000; t++) begin
      a = 17'($urandom); b = 17'($urandom); sub = t[0];
      a2 = {1'($urandom), 32'($urandom)}; b2 = {1'($urandom), 32'($urandom)}; sub2 = t[1];
      if (t < 8) begin a = '1; b = 17'(t); a2 = '1; b2 = 33'(t); end
      #1;
      e  = sub  ? {1'b0, a}  + {1'b0, ~b}  + 18'd1 : {1'b0, a}  + {1'b0, b};
      e2 = sub2 ? {1'b0, a2} + {1'b0, ~b2} + 34'd1 : {1'b0, a2} + {1'b0, b2};
      checks += 2;
      if ({cout, s} != e)    begin failures++; if (failures < 10) $display("FAIL 17: %h %h %0d", a, b, sub); end
      if ({cout2, s2} != e2) begin failures++; if (failures < 10) $display("FAIL 33: %h %h %0d", a2, b2, sub2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
