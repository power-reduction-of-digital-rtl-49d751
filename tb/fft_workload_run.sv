// Testbench helper: one hybrid FFT with N_BP butterfly processors running a
// random 2^LOG2N-point transform with N_ACT processors active.  It loads the
// data through the host port, starts the transform, counts the clocks to
// done, reads the spectrum back and compares every word with the reference
// fixed-point DIF FFT.  It reports its counts and raises finished when done,
// so a testbench can run several configurations side by side.
module fft_workload_run
  import tb_fft_ref_pkg::*;
#(
  parameter int N_BP  = 32,
  parameter int LOG2N = 10,
  parameter int N_ACT = 32
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   clocks,
  output int   stalls
);
  logic host_we, host_re, start;
  logic [9:0] host_waddr, host_raddr;
  logic [31:0] host_wdata, host_rdata;
  logic [3:0] log2n;
  logic [$clog2(N_BP+1)-1:0] n_active;
  logic busy, done, pe_stall, draining;

  fft_hybrid #(.N_BP(N_BP), .LOG2_NMAX(10), .BANKS(2)) dut (.*);

  always @(posedge clk) if (rst_n && pe_stall) stalls++;

  initial begin
    int n, got_r, got_i;
    int xr [1024], xi [1024];
    finished = 0; checks = 0; failures = 0; clocks = 0; stalls = 0;
    host_we = 0; host_re = 0; start = 0; host_waddr = '0; host_raddr = '0; host_wdata = '0;
    log2n = 4'(LOG2N); n_active = ($clog2(N_BP+1))'(N_ACT);
    n = 1 << LOG2N;
    for (int i = 0; i < n; i++) begin
      xr[i] = int'($urandom_range(0, 40000)) - 20000;
      xi[i] = int'($urandom_range(0, 40000)) - 20000;
    end
    @(posedge rst_n);
    @(posedge clk);
    for (int i = 0; i < n; i++) begin
      host_we <= 1; host_waddr <= 10'(i); host_wdata <= {16'(xr[i]), 16'(xi[i])};
      @(posedge clk);
    end
    fft_dif(LOG2N, xr, xi);
    host_we <= 0; start <= 1;
    @(posedge clk);
    start <= 0;
    clocks = 1;
    while (!done) begin @(posedge clk); clocks++; end
    @(posedge clk);
    for (int i = 0; i < n; i++) begin
      host_re <= 1; host_raddr <= 10'(i);
      @(posedge clk);
      #1;
      got_r = int'($signed(host_rdata[31:16])); got_i = int'($signed(host_rdata[15:0]));
      checks++;
      if (got_r != xr[i] || got_i != xi[i]) begin
        failures++;
        if (failures < 5) $display("FAIL N_BP=%0d act=%0d word %0d: got %0d,%0d exp %0d,%0d",
                                   N_BP, N_ACT, i, got_r, got_i, xr[i], xi[i]);
      end
    end
    host_re <= 0;
    finished = 1;
  end
endmodule
