// Testbench of fft_pe (8 butterfly processors).  Random butterflies are
// offered every clock, first with all 8 processors active, then with 2 and
// with 1 (active unit scaling).  Checks: each result equals the reference
// butterfly and comes out in issue order; latency is N_BP + 1 clocks; with
// k active processors the element accepts k butterflies per N_BP clocks, and
// with all active one per clock (no stall).
module tb_fft_pe;
  import fft_pkg::*;
  import tb_fft_ref_pkg::*;

  localparam int NB = 8;
  logic clk = 0, rst_n = 1;
  logic [3:0] n_active;
  logic in_valid = 0, in_ready, out_valid;
  cplx_t in_a, in_b, in_w, out_a, out_b;
  logic [19:0] in_tag, out_tag;
  int checks = 0, failures = 0;

  fft_pe #(.N_BP(NB), .TAG_W(20)) dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  int cyc = 0;
  int exp_q [$];        // expected results, packed per butterfly: 4 ints
  int iss_cyc [$];
  int next_out = 0, issued = 0, stalls = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && in_valid && !in_ready) stalls++;
    if (rst_n && in_valid && in_ready) begin
      int wr, wi, oar, oai, obr, obi;
      bfly(in_a.re, in_a.im, in_b.re, in_b.im, in_w.re, in_w.im, oar, oai, obr, obi);
      exp_q.push_back(oar); exp_q.push_back(oai); exp_q.push_back(obr); exp_q.push_back(obi);
      iss_cyc.push_back(cyc);
    end
    if (rst_n && out_valid) begin
      int e0, e1, e2, e3, ic;
      e0 = exp_q.pop_front(); e1 = exp_q.pop_front(); e2 = exp_q.pop_front(); e3 = exp_q.pop_front();
      ic = iss_cyc.pop_front();
      check(int'(out_tag) == next_out, $sformatf("order: tag %0d expected %0d", out_tag, next_out));
      check(int'(out_a.re) == e0 && int'(out_a.im) == e1 && int'(out_b.re) == e2 && int'(out_b.im) == e3,
            $sformatf("value of butterfly %0d", next_out));
      check(cyc - ic == NB + 1, $sformatf("latency %0d", cyc - ic));
      next_out++;
    end
  end

  task automatic run(input int k, input int count, output int clocks);
    int t0, wr, wi;
    n_active = 4'(k);
    @(posedge clk);
    t0 = cyc;
    for (int i = 0; i < count; i++) begin
      in_valid <= 1;
      in_a <= '{re: 16'(int'($urandom_range(0, 30000)) - 15000), im: 16'(int'($urandom_range(0, 30000)) - 15000)};
      in_b <= '{re: 16'(int'($urandom_range(0, 30000)) - 15000), im: 16'(int'($urandom_range(0, 30000)) - 15000)};
      twiddle(int'($urandom_range(0, 511)), wr, wi);
      in_w <= '{re: 16'(wr), im: 16'(wi)};
      in_tag <= 20'(issued);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      issued++;
    end
    in_valid <= 0;
    clocks = cyc - t0;
    repeat (NB + 4) @(posedge clk);
  endtask

  initial begin
    int clk_full, clk_two, clk_one, st0;
    n_active = 4'(NB);
    in_a = '0; in_b = '0; in_w = '0; in_tag = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    st0 = stalls;
    run(NB, 64, clk_full);
    check(stalls == st0, $sformatf("stalls with all processors active: %0d", stalls - st0));
    check(clk_full == 64, $sformatf("full rate: 64 butterflies took %0d clocks", clk_full));
    run(2, 32, clk_two);
    check(clk_two >= 32 * NB / 2 - NB && clk_two <= 32 * NB / 2 + NB,
          $sformatf("2 active: 32 butterflies took %0d clocks", clk_two));
    run(1, 8, clk_one);
    check(clk_one >= 8 * NB - NB && clk_one <= 8 * NB + NB, $sformatf("1 active: 8 butterflies took %0d clocks", clk_one));
    check(stalls > st0, "active unit scaling never stalled");
    check(next_out == issued && issued == 104, $sformatf("%0d results for %0d butterflies", next_out, issued));
    $display("full %0d, two %0d, one %0d clocks; stalls %0d", clk_full, clk_two, clk_one, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
