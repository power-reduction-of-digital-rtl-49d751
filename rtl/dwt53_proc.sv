// (5,3) lifting DWT processor.
//
// One combinational lifting step of the reversible (5,3) wavelet used by
// JPEG2000.  With lp = 0 it is the predict (high-pass) step on an odd sample,
//     y = x - floor((a + b) / 2),
// where a and b are the two untransformed neighbours.  With lp = 1 it is the
// update (low-pass) step on an even sample,
//     y = x + floor((a + b + 2) / 4),
// where a and b are the high-pass results on either side.  Both divisions are
// arithmetic right shifts; the +2 rounding term enters the same adder as a
// constant, so one adder, one shifter and one add/subtract make up the unit.
//
// The same unit serves as row processor and column processor of the
// parallel architecture: the whole step completes in one clock period of the
// parallel units.  Data are DW-bit two's complement (the word width is this
// design's choice; 16 bits hold two lifting levels of 8-bit pixels).
module dwt53_proc #(
  parameter int DW = 16
) (
  input  logic                 lp,  // 0: high pass (predict), 1: low pass (update)
  input  logic signed [DW-1:0] x,   // centre sample
  input  logic signed [DW-1:0] a,   // one neighbour
  input  logic signed [DW-1:0] b,   // other neighbour
  output logic signed [DW-1:0] y
);

  logic signed [DW+1:0] nsum;   // a + b (+2), two guard bits
  logic signed [DW+1:0] scaled;

  always_comb begin
    nsum   = (DW+2)'(a) + (DW+2)'(b) + (lp ? (DW+2)'(2) : (DW+2)'(0));
    scaled = lp ? (nsum >>> 2) : (nsum >>> 1);
    y      = lp ? (x + DW'(scaled)) : (x - DW'(scaled));
  end

endmodule
