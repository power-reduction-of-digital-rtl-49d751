// Testbench of fft_hybrid at reduced size (4 butterfly processors, 1024-word
// memory).  Runs: a 16-point impulse (every bin within a few LSB of A/16), a 64-point and
// a 256-point random transform with all processors active, and a 64-point
// transform with one processor active (active unit scaling).  Each spectrum
// must match the reference fixed-point FFT bit for bit; the full-rate run
// must take close to log2(N) * (N/2 + pipeline latency) clocks and the
// one-processor run about N_BP times longer.
module tb_fft_hybrid;
  import fft_pkg::*;
  import tb_fft_ref_pkg::*;

  localparam int NB = 4;
  logic clk = 0, rst_n = 1;
  logic host_we = 0, host_re = 0, start = 0;
  logic [9:0] host_waddr, host_raddr;
  logic [31:0] host_wdata, host_rdata;
  logic [3:0] log2n;
  logic [2:0] n_active;
  logic busy, done, pe_stall, draining;
  int checks = 0, failures = 0;

  fft_hybrid #(.N_BP(NB), .LOG2_NMAX(10), .BANKS(2)) dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  int stall_cycles = 0;
  always @(posedge clk) if (pe_stall) stall_cycles++;

  int xr [1024], xi [1024];

  task automatic run(input int L, input int act, input bit impulse, output int clocks);
    int N = 1 << L;
    int got_r, got_i;
    int rr [1024], ri [1024];
    for (int i = 0; i < N; i++) begin
      xr[i] = impulse ? ((i == 0) ? 8000 : 0) : int'($urandom_range(0, 20000)) - 10000;
      xi[i] = impulse ? 0 : int'($urandom_range(0, 20000)) - 10000;
      rr[i] = xr[i]; ri[i] = xi[i];
    end
    fft_dif(L, rr, ri);
    for (int i = 0; i < N; i++) begin
      @(posedge clk);
      host_we <= 1; host_waddr <= 10'(i); host_wdata <= {16'(xr[i]), 16'(xi[i])};
    end
    @(posedge clk);
    host_we <= 0; log2n <= 4'(L); n_active <= 3'(act); start <= 1;
    @(posedge clk);
    start <= 0;
    clocks = 1;
    while (!done) begin @(posedge clk); clocks++; end
    @(posedge clk);
    // the read address is registered by the RAM on the next edge, so the
    // word is visible just after that edge
    for (int i = 0; i < N; i++) begin
      host_re <= 1; host_raddr <= 10'(i);
      @(posedge clk);
      #1;
      got_r = int'($signed(host_rdata[31:16])); got_i = int'($signed(host_rdata[15:0]));
      check(got_r == rr[i] && got_i == ri[i],
            $sformatf("N=%0d word %0d: got %0d,%0d exp %0d,%0d", N, i, got_r, got_i, rr[i], ri[i]));
      // truncation towards minus infinity loses at most one LSB per stage
      if (impulse) check(got_r <= 8000 / N && got_r >= 8000 / N - L && got_i <= 0 && got_i >= -L,
                         $sformatf("impulse spectrum bin %0d = %0d,%0d", i, got_r, got_i));
    end
    host_re <= 0;
  endtask

  initial begin
    int c16, c64, c256, c64s;
    log2n = 4; n_active = 3'(NB); host_waddr = 0; host_raddr = 0; host_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    run(4, NB, 1, c16);
    run(6, NB, 0, c64);
    run(8, NB, 0, c256);
    check(stall_cycles == 0, $sformatf("%0d stall cycles with all processors active", stall_cycles));
    run(6, 1, 0, c64s);
    // full rate: N/2 butterflies per stage plus a pipeline drain per stage
    check(c256 >= 8 * 128 && c256 <= 8 * (128 + NB + 12), $sformatf("256-point took %0d clocks", c256));
    check(c64s >= 6 * 32 * NB && c64s <= 6 * (32 * NB + NB + 12), $sformatf("64-point, 1 active, took %0d clocks", c64s));
    check(stall_cycles > 0, "active unit scaling never stalled");
    $display("clocks: 16-pt %0d, 64-pt %0d, 256-pt %0d, 64-pt with 1 of %0d processors %0d", c16, c64, c256, NB, c64s);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
