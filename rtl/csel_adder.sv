// Carry-select adder / subtractor.
//
// The W-bit operands are cut into blocks of BLK bits.  Every block but the
// first computes its sum twice, once for a carry-in of 0 and once for 1, in
// parallel; the carry that ripples from block to block only drives the
// multiplexers that pick one of the two precomputed sums.  With sub = 1 the
// unit computes a - b (b inverted, carry-in 1).  Combinational; s is the W-bit
// result (modulo 2^W), cout the carry out of the top bit.  The adder type is
// the one the butterfly processor names; block size and the subtract control
// are this design's choice.
module csel_adder #(
  parameter int W   = 17,
  parameter int BLK = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W-1:0] s,
  output logic         cout
);

  localparam int NB = (W + BLK - 1) / BLK;

  logic [W-1:0] bx;
  logic [NB:0]  c;      // carry into each block

  assign bx   = sub ? ~b : b;
  assign c[0] = sub;

  for (genvar k = 0; k < NB; k++) begin : g_blk
    localparam int LO = k * BLK;
    localparam int BW = (LO + BLK <= W) ? BLK : W - LO;
    logic [BW:0] s0, s1;   // block sum and carry for carry-in 0 / 1
    assign s0 = {1'b0, a[LO +: BW]} + {1'b0, bx[LO +: BW]};
    assign s1 = {1'b0, a[LO +: BW]} + {1'b0, bx[LO +: BW]} + 1'b1;
    assign s[LO +: BW] = c[k] ? s1[BW-1:0] : s0[BW-1:0];
    assign c[k+1]      = c[k] ? s1[BW]     : s0[BW];
  end

  assign cout = c[NB];

endmodule
