// Top level: the two subthreshold signal-processing designs side by side.
//
//   * dwt2d_parallel - a 2D (5,3) discrete wavelet transform built from NU
//     slow parallel units fed by a split serial bus, with no SRAM;
//   * fft_hybrid     - a memory-based FFT whose processing element holds
//     N_BP slow butterfly processors, with active unit scaling.
// They are independent and share only clock and reset; each keeps its own
// ports (prefixed dwt_ and fft_).  See the two modules for their interfaces.
// Putting the two side by side is this design's choice; each design itself
// follows its source architecture.  Lint notes rst_n as used both
// asynchronously and synchronously: the synchronous use is only the
// disable condition of two concurrent assertions, not hardware.
module subthreshold_dsp_top
  import dwt_pkg::*;
  import fft_pkg::*;
#(
  parameter int DWT_NU     = 32,
  parameter int DWT_IMG_W  = 256,
  parameter int DWT_IMG_H  = 256,
  parameter int DWT_SPLITS = 4,
  parameter int FFT_N_BP   = 32,
  parameter int FFT_LOG2_NMAX = 10,
  parameter int FFT_BANKS  = 2
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // DWT
  input  logic                          dwt_in_valid,
  input  logic [7:0]                    dwt_in_pix,
  input  logic                          dwt_flush,
  output logic                          dwt_coef_stb,
  output logic signed [15:0]            dwt_coef       [DWT_NU],
  output logic                          dwt_coef_valid [DWT_NU],
  output logic                          dwt_odd_lp,
  output logic [ROW_W-1:0]              dwt_odd_row,
  output logic                          dwt_even_lp,
  output logic [ROW_W-1:0]              dwt_even_row,
  output logic [STRIPE_W-1:0]           dwt_odd_stripe,
  output logic [STRIPE_W-1:0]           dwt_even_stripe,
  output logic                          dwt_flushing,
  // FFT
  input  logic                          fft_host_we,
  input  logic [FFT_LOG2_NMAX-1:0]      fft_host_waddr,
  input  logic [31:0]                   fft_host_wdata,
  input  logic                          fft_host_re,
  input  logic [FFT_LOG2_NMAX-1:0]      fft_host_raddr,
  output logic [31:0]                   fft_host_rdata,
  input  logic                          fft_start,
  input  logic [3:0]                    fft_log2n,
  input  logic [$clog2(FFT_N_BP+1)-1:0] fft_n_active,
  output logic                          fft_busy,
  output logic                          fft_done,
  output logic                          fft_pe_stall,
  output logic                          fft_draining
);

  dwt2d_parallel #(
    .NU(DWT_NU), .IMG_W(DWT_IMG_W), .IMG_H(DWT_IMG_H), .SPLITS(DWT_SPLITS),
    .PIX_W(8), .DW(16)
  ) u_dwt (
    .clk, .rst_n,
    .in_valid(dwt_in_valid), .in_pix(dwt_in_pix), .flush(dwt_flush),
    .coef_stb(dwt_coef_stb), .coef(dwt_coef), .coef_valid(dwt_coef_valid),
    .odd_lp(dwt_odd_lp), .odd_row(dwt_odd_row), .even_lp(dwt_even_lp), .even_row(dwt_even_row),
    .odd_stripe(dwt_odd_stripe), .even_stripe(dwt_even_stripe), .flushing(dwt_flushing)
  );

  fft_hybrid #(.N_BP(FFT_N_BP), .LOG2_NMAX(FFT_LOG2_NMAX), .BANKS(FFT_BANKS)) u_fft (
    .clk, .rst_n,
    .host_we(fft_host_we), .host_waddr(fft_host_waddr), .host_wdata(fft_host_wdata),
    .host_re(fft_host_re), .host_raddr(fft_host_raddr), .host_rdata(fft_host_rdata),
    .start(fft_start), .log2n(fft_log2n), .n_active(fft_n_active),
    .busy(fft_busy), .done(fft_done), .pe_stall(fft_pe_stall), .draining(fft_draining)
  );

endmodule
