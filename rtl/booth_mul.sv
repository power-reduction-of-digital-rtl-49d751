// Signed W x W multiplier with radix-4 (modified) Booth recoding.
//
// The multiplier y is scanned in overlapping 3-bit groups
// {y[2i+1], y[2i], y[2i-1]} (y[-1] = 0), each recoded to a digit in
// {-2, -1, 0, +1, +2}.  Digit i selects 0, +-x or +-2x as a partial product
// weighted by 4^i, which halves the number of partial products compared with
// a plain array multiplier.  The W/2 partial products are then summed.
// The product is exact: p = x * y, 2W bits, combinational.
// The butterfly processor's multiplications use this Booth form; the
// recoding radix and the plain summation of the partial products are this
// design's choice.
module booth_mul #(
  parameter int W = 16   // even
) (
  input  logic signed [W-1:0]   x,
  input  logic signed [W-1:0]   y,
  output logic signed [2*W-1:0] p
);

  logic [W:0]             yext;         // y with the implicit y[-1] = 0
  logic signed [2*W-1:0]  pp [W/2];     // partial products
  logic signed [2*W-1:0]  x1, x2;

  always_comb begin
    yext = {y, 1'b0};
    x1   = (2*W)'(x);
    x2   = x1 <<< 1;
    for (int i = 0; i < W/2; i++) begin
      unique case (yext[2*i +: 3])
        3'b001, 3'b010: pp[i] =  x1;
        3'b011:         pp[i] =  x2;
        3'b100:         pp[i] = -x2;
        3'b101, 3'b110: pp[i] = -x1;
        default:        pp[i] = '0;    // 000, 111
      endcase
      pp[i] = pp[i] <<< (2 * i);
    end
    p = '0;
    for (int i = 0; i < W/2; i++) p = p + pp[i];
  end

endmodule
