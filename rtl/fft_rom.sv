// Twiddle-factor ROM of the FFT.
//
// A 1024-point decimation-in-frequency FFT needs W^e = exp(-2*pi*j*e/1024)
// for 0 <= e < 512.  By the symmetry of the unit circle only a quarter of
// them is stored: entry k (0..255) holds
//     C(k) = round(32767 * cos(2*pi*k/1024))   (upper 16 bits)
//     S(k) = round(32767 * sin(2*pi*k/1024))   (lower 16 bits)
// and the factors are formed as
//     e <  256:  W^e = C(e)     - j S(e)
//     e >= 256:  W^e = -S(e-256) - j C(e-256)      (W^e = -j W^(e-256)).
// The table is read from fft_twiddle_rom.hex (256 words, computed by the
// formula above).  Read is synchronous: w is valid one clock after e.
// The 256-entry size is the document's; the quarter-circle mapping and the
// rounding are this design's choices.
module fft_rom
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic [8:0] e,     // twiddle exponent, 0..511
  output cplx_t      w
);

  logic [2*QW-1:0] table_q [256];
  logic [2*QW-1:0] word_q;
  logic            hi_q;

  initial $readmemh("rtl/fft_twiddle_rom.hex", table_q);

  always_ff @(posedge clk) begin
    word_q <= table_q[e[7:0]];
    hi_q   <= e[8];
  end

  always_comb begin
    if (!hi_q) begin
      w.re = word_q[2*QW-1:QW];
      w.im = -word_q[QW-1:0];
    end else begin
      w.re = -word_q[QW-1:0];
      w.im = -word_q[2*QW-1:QW];
    end
  end

endmodule
