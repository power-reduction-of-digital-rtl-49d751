// Testbench of dwt_split_bus (8 units + 3 extra positions, 4 sub-buses):
// rows of random pixels are sent back to back and with idle gaps; at every
// row_en the input registers must hold exactly the row just sent, and row_en
// must be seen by a monitor three clock edges after the edge at which the
// row's last pixel was driven (it is sampled into the bus one edge later).
module tb_dwt_split_bus;
  localparam int NU = 8, NX = 11, S = 4;
  logic clk = 0, rst_n = 1, in_valid = 0;
  logic [7:0] in_pix;
  logic [7:0] in_reg [NX];
  logic row_en;
  int checks = 0, failures = 0;

  dwt_split_bus #(.NU(NU), .NX(NX), .SPLITS(S), .PIX_W(8)) dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // asynchronous reset needs an edge

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] pix_q [$];      // every pixel sent, in order
  int cyc = 0, last_pix_cyc [$];
  always @(posedge clk) cyc <= cyc + 1;

  // monitor
  int nrows = 0;
  always @(posedge clk) begin
    if (rst_n && row_en) begin
      checks++;
      if (pix_q.size() < NX) begin failures++; $display("FAIL row_en without a row"); end
      else begin
        logic [7:0] exp_row [NX];
        int lc;
        for (int c = 0; c < NX; c++) exp_row[c] = pix_q.pop_front();
        lc = last_pix_cyc.pop_front();
        for (int c = 0; c < NX; c++) begin
          checks++;
          if (in_reg[c] != exp_row[c]) begin
            failures++;
            if (failures < 10) $display("FAIL row %0d pos %0d got %0d exp %0d", nrows, c, in_reg[c], exp_row[c]);
          end
        end
        checks++;
        if (cyc - lc != 3) begin failures++; $display("FAIL latency %0d", cyc - lc); end
      end
      nrows++;
    end
  end

  initial begin
    logic [7:0] r [NX];
    in_pix = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 40; n++) begin
      for (int c = 0; c < NX; c++) r[c] = 8'($urandom);
      for (int c = 0; c < NX; c++) pix_q.push_back(r[c]);
      for (int c = 0; c < NX; c++) begin
        @(posedge clk);
        in_valid <= 1; in_pix <= r[c];
        if (c == NX - 1) last_pix_cyc.push_back(cyc);
        // occasional idle gaps inside and between rows
        if (n % 3 == 2 && c % 4 == 1) begin
          @(posedge clk); in_valid <= 0;
        end
      end
      @(posedge clk);
      in_valid <= 0;
      if (n % 2 == 0) repeat (n % 5) @(posedge clk);
      else if (n % 4 == 1) ; // back to back (no idle beyond one)
    end
    repeat (6) @(posedge clk);
    checks++;
    if (nrows != 40) begin failures++; $display("FAIL %0d rows", nrows); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
