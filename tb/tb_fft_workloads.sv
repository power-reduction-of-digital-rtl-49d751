// Configurations of the hybrid FFT that the architecture is evaluated in,
// each a full 1024-point transform, run side by side:
//   * 32 processors, 4 active: active unit scaling to 1/8 of the maximum
//     throughput (222 MHz * 4/32 = 27.75 MHz, the 28 MHz operating point);
//   * 32 processors, 16 active: half throughput;
//   * 16 processors, all active: the smaller parallel design, full rate;
//   * 1 processor: the non-parallel reference architecture, full rate.
// Every spectrum must match the reference bit for bit.  The clock count of a
// run must be the butterfly count 10 * 512 stretched by N_BP / n_active,
// plus at most N_BP + 12 clocks per stage for the stage drain.
module tb_fft_workloads;
  localparam int N = 4;
  localparam int NBP [N] = '{32, 32, 16, 1};
  localparam int ACT [N] = '{4, 16, 16, 1};

  logic clk = 0, rst_n = 1;
  logic fin [N];
  int   chk [N], fl [N], clocks [N], stalls [N];
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  for (genvar k = 0; k < N; k++) begin : g_cfg
    fft_workload_run #(.N_BP(NBP[k]), .LOG2N(10), .N_ACT(ACT[k])) u_run (
      .clk, .rst_n, .finished(fin[k]), .checks(chk[k]), .failures(fl[k]),
      .clocks(clocks[k]), .stalls(stalls[k])
    );
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    do begin
      @(posedge clk);
      all = 1;
      for (int k = 0; k < N; k++) all &= fin[k];
    end while (!all);
    for (int k = 0; k < N; k++) begin
      int lo, hi;
      lo = 10 * 512 * NBP[k] / ACT[k];
      hi = lo + 10 * (NBP[k] + 12);
      checks += chk[k] + 2;
      failures += fl[k];
      if (clocks[k] < lo || clocks[k] > hi) begin
        failures++;
        $display("FAIL %0d of %0d active: %0d clocks, expected %0d..%0d", ACT[k], NBP[k], clocks[k], lo, hi);
      end
      if ((ACT[k] < NBP[k]) != (stalls[k] > 0)) begin
        failures++;
        $display("FAIL %0d of %0d active: %0d stall cycles", ACT[k], NBP[k], stalls[k]);
      end
      $display("1024-point, %0d of %0d processors: %0d clocks (%0.3f of full rate), %0d stall cycles",
               ACT[k], NBP[k], clocks[k], real'(5120) / real'(clocks[k]), stalls[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
