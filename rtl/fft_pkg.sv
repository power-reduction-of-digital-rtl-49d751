// Shared types of the hybrid super/subthreshold FFT.
//
// Samples are complex numbers of two 16-bit Q15 fixed-point parts (value =
// integer / 32768), packed into one 32-bit word: real part in the upper half,
// imaginary part in the lower half.
package fft_pkg;

  localparam int QW = 16;   // width of one Q15 part

  typedef struct packed {
    logic signed [QW-1:0] re;
    logic signed [QW-1:0] im;
  } cplx_t;

endpackage
