// Hybrid super/subthreshold FFT processor.
//
// A memory-based radix-2 FFT whose single butterfly processor has been
// replaced by a processing element of N_BP slow butterfly processors working
// in staggered turns.  The memories (RAM, twiddle ROM) stay at a supply above
// threshold; the butterfly processors run N_BP times slower at a
// subthreshold supply, and together they still deliver one butterfly per
// clock.  Turning off processors (n_active < N_BP) lowers the throughput to
// n_active/N_BP of the maximum without changing any supply.
//
//      +-------- results (2 words) ---------+
//      v                                    |
//   fft_ram --2 words--> operand buffer --> fft_pe --+
//                          ^                ^
//   fft_rom --W^e----------+                |
//   fft_ctrl: addresses, exponents, stage sequencing
//
// Use: while busy is low, load N complex words (Q15 real part in bits 31:16,
// imaginary part in 15:0) through host_we/host_waddr/host_wdata, pulse start
// with log2n (e.g. 8 or 10), wait for done, read the spectrum through
// host_raddr/host_rdata (one clock latency).  Output bin k is at the
// bit-reversed address of k and equals DFT(x)[k] / N.
// Between the memory read and the processing element sits a two-entry
// operand buffer so that the memory can be read one clock ahead of the
// element's ready signal.  The RAM/ROM/PE structure follows the document;
// the host port and the operand buffer are this design's choices.
module fft_hybrid
  import fft_pkg::*;
#(
  parameter int N_BP      = 32,
  parameter int LOG2_NMAX = 10,
  parameter int BANKS     = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // host access to the data memory (ignored while busy)
  input  logic                       host_we,
  input  logic [LOG2_NMAX-1:0]       host_waddr,
  input  logic [31:0]                host_wdata,
  input  logic                       host_re,
  input  logic [LOG2_NMAX-1:0]       host_raddr,
  output logic [31:0]                host_rdata,
  // control
  input  logic                       start,
  input  logic [3:0]                 log2n,
  input  logic [$clog2(N_BP+1)-1:0]  n_active,
  output logic                       busy,
  output logic                       done,
  // activity, for observation
  output logic                       pe_stall,   // operands wait for a free processor
  output logic                       draining    // stage end, waiting for write-back
);

  localparam int AW    = LOG2_NMAX;
  localparam int TAG_W = 2 * AW;

  // controller
  logic          rd, rd_ok, wb;
  logic [AW-1:0] addr_a, addr_b;
  logic [8:0]    tw_e;

  fft_ctrl #(.LOG2_NMAX(LOG2_NMAX)) u_ctrl (
    .clk, .rst_n, .start, .log2n, .rd_ok, .wb, .rd,
    .addr_a, .addr_b, .tw_e, .busy, .draining, .done
  );

  // memories
  logic [31:0] rd0, rd1;
  cplx_t       w;
  logic        pe_out_valid;
  cplx_t       pe_out_a, pe_out_b;
  logic [TAG_W-1:0] pe_out_tag;

  fft_ram #(.DEPTH(1 << AW), .BANKS(BANKS), .DW(32)) u_ram (
    .clk,
    .re0(rd || (host_re && !busy)), .ra0(busy ? addr_a : host_raddr), .rd0,
    .re1(rd),                       .ra1(addr_b),                     .rd1,
    .we0(busy ? pe_out_valid : host_we),
    .wa0(busy ? pe_out_tag[TAG_W-1:AW] : host_waddr),
    .wd0(busy ? 32'(pe_out_a) : host_wdata),
    .we1(busy && pe_out_valid), .wa1(pe_out_tag[AW-1:0]), .wd1(32'(pe_out_b))
  );
  assign host_rdata = rd0;
  assign wb         = pe_out_valid;

  fft_rom u_rom (.clk, .e(tw_e), .w);

  // operand buffer: two entries, filled one clock after the read
  logic             rd_q;
  logic [TAG_W-1:0] tag_q;
  cplx_t            buf_a   [2];
  cplx_t            buf_b   [2];
  cplx_t            buf_w   [2];
  logic [TAG_W-1:0] buf_tag [2];
  logic             wr_ptr, rd_ptr;
  logic [1:0]       count;
  logic             pe_ready, pop;

  assign pop      = (count != 2'd0) && pe_ready;
  assign rd_ok    = (32'(count) + 32'(rd_q) - 32'(pop)) < 2;
  assign pe_stall = (count != 2'd0) && !pe_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q   <= 1'b0;
      tag_q  <= '0;
      wr_ptr <= 1'b0;
      rd_ptr <= 1'b0;
      count  <= '0;
      for (int i = 0; i < 2; i++) begin
        buf_a[i] <= '0; buf_b[i] <= '0; buf_w[i] <= '0; buf_tag[i] <= '0;
      end
    end else begin
      rd_q  <= rd;
      tag_q <= {addr_a, addr_b};
      if (rd_q) begin
        buf_a[wr_ptr]   <= cplx_t'(rd0);
        buf_b[wr_ptr]   <= cplx_t'(rd1);
        buf_w[wr_ptr]   <= w;
        buf_tag[wr_ptr] <= tag_q;
        wr_ptr          <= ~wr_ptr;
      end
      if (pop) rd_ptr <= ~rd_ptr;
      count <= count + 2'(rd_q) - 2'(pop);
    end
  end

  // processing element
  fft_pe #(.N_BP(N_BP), .TAG_W(TAG_W)) u_pe (
    .clk, .rst_n, .n_active,
    .in_valid(count != 2'd0), .in_ready(pe_ready),
    .in_a(buf_a[rd_ptr]), .in_b(buf_b[rd_ptr]), .in_w(buf_w[rd_ptr]), .in_tag(buf_tag[rd_ptr]),
    .out_valid(pe_out_valid), .out_a(pe_out_a), .out_b(pe_out_b), .out_tag(pe_out_tag)
  );

endmodule
