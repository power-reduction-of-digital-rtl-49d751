// Testbench of fft_ram (1024 words, 2 banks): random traffic on both write
// ports and both read ports against a flat array model; reads return the
// word one clock later, and both banks are exercised.
module tb_fft_ram;
  logic clk = 0;
  logic re0 = 0, re1 = 0, we0 = 0, we1 = 0;
  logic [9:0] ra0, ra1, wa0, wa1;
  logic [31:0] rd0, rd1, wd0, wd1;
  int checks = 0, failures = 0;
  logic [31:0] model [1024];
  int bank_hits [2] = '{0, 0};

  fft_ram #(.DEPTH(1024), .BANKS(2), .DW(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] e0, e1;
    logic p0, p1;
    // fill every word through alternating ports
    for (int i = 0; i < 1024; i += 2) begin
      @(negedge clk);
      we0 = 1; wa0 = 10'(i);     wd0 = $urandom; model[i]   = wd0;
      we1 = 1; wa1 = 10'(i + 1); wd1 = $urandom; model[i+1] = wd1;
    end
    @(negedge clk); we0 = 0; we1 = 0;
    p0 = 0; p1 = 0;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      // check the reads issued in the previous clock
      if (p0) begin checks++; if (rd0 != e0) begin failures++; if (failures < 10) $display("FAIL port0"); end end
      if (p1) begin checks++; if (rd1 != e1) begin failures++; if (failures < 10) $display("FAIL port1"); end end
      re0 = 1'($urandom); ra0 = 10'($urandom);
      re1 = 1'($urandom); ra1 = 10'($urandom);
      p0 = re0; p1 = re1;
      e0 = model[ra0]; e1 = model[ra1];     // old data if written this clock
      if (re0) bank_hits[ra0[9]]++;
      we0 = 1'($urandom); wa0 = 10'($urandom); wd0 = $urandom;
      we1 = 1'($urandom); wa1 = 10'($urandom); wd1 = $urandom;
      if (we0 && we1 && wa0 == wa1) we1 = 0;
      @(posedge clk);
      #1;
      if (we0) model[wa0] = wd0;
      if (we1) model[wa1] = wd1;
    end
    checks++;
    if (bank_hits[0] == 0 || bank_hits[1] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
