// Testbench of fft_ctrl: a model processing element writes each butterfly
// back a fixed 11 clocks after it was read, and the read path is randomly
// not ready.  For 16- and 256-point runs the issued addresses and twiddle
// exponents must follow the in-place DIF order, no stage may read before the
// previous stage is completely written back, and done must pulse once.
module tb_fft_ctrl;
  logic clk = 0, rst_n = 1, start = 0, rd_ok = 0, wb;
  logic [3:0] log2n;
  logic rd, busy, draining, done;
  logic [9:0] addr_a, addr_b;
  logic [8:0] tw_e;
  int checks = 0, failures = 0;

  fft_ctrl #(.LOG2_NMAX(10)) dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  localparam int LAT = 11;
  logic [LAT-1:0] pipe = '0;
  assign wb = pipe[LAT-1];
  int L, n_rd, n_wb, n_done, drain_cycles;

  always @(posedge clk) begin
    if (!rst_n) pipe <= '0;
    else pipe <= {pipe[LAT-2:0], rd};
    if (rst_n) begin
      if (wb) n_wb++;
      if (done) n_done++;
      if (draining) drain_cycles++;
      if (rd) begin
        int N, s, j, h, p, g, a;
        N = 1 << L; s = n_rd / (N / 2); j = n_rd % (N / 2);
        h = N >> (s + 1); p = j % h; g = j / h; a = 2 * g * h + p;
        check(int'(addr_a) == a && int'(addr_b) == a + h && int'(tw_e) == ((p << s) << (10 - L)),
              $sformatf("butterfly %0d: got %0d %0d %0d", n_rd, addr_a, addr_b, tw_e));
        // first read of a stage only after every earlier butterfly is written
        if (j == 0) check(n_wb == n_rd, $sformatf("stage %0d started with %0d of %0d written", s, n_wb, n_rd));
        n_rd++;
      end
    end
  end

  always @(negedge clk) rd_ok <= ($urandom_range(0, 3) != 0);

  task automatic run(input int l);
    int t;
    L = l; n_rd = 0; n_wb = 0; n_done = 0;
    @(posedge clk);
    log2n <= 4'(l); start <= 1;
    @(posedge clk);
    start <= 0;
    t = 0;
    while (!done && t < 100000) begin @(posedge clk); t++; end
    repeat (3) @(posedge clk);
    check(n_rd == l * (1 << l) / 2, $sformatf("%0d butterflies for log2n=%0d", n_rd, l));
    check(n_done == 1 && !busy, "done once, then idle");
  endtask

  initial begin
    log2n = 4;
    drain_cycles = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    run(4);
    run(8);
    check(drain_cycles > 0, "never waited for write-back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
