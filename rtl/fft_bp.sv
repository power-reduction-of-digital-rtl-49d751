// Butterfly processor: one radix-2 decimation-in-frequency butterfly on Q15
// complex numbers,
//     a' = (a + b) / 2
//     b' = ((a - b) / 2) * W
// The sum and difference come from carry-select adders, the complex product
// from four Booth multipliers and two more carry-select adders (real part
// ar*wr - ai*wi, imaginary part ar*wi + ai*wr), and each product is brought
// back to Q15 by an arithmetic shift right by 15 (truncation).
// Halving both outputs keeps every stage of a 1024-point transform inside
// Q15 when input magnitudes stay below 1; the finished transform is the DFT
// divided by N.  The halving and the truncation are this design's choices,
// the butterfly structure is the document's.  Purely combinational: the
// processing element gives it as many clocks as it has parallel units.
module fft_bp
  import fft_pkg::*;
(
  input  cplx_t a,
  input  cplx_t b,
  input  cplx_t w,      // twiddle factor W^n
  output cplx_t a_out,
  output cplx_t b_out
);

  logic [QW:0]     sum_re, sum_im, dif_re, dif_im;
  cplx_t           d;
  logic [2*QW-1:0] p_rr, p_ii, p_ri, p_ir;
  logic [2*QW:0]   m_re, m_im;

  csel_adder #(.W(QW+1)) u_sre (.a({a.re[QW-1], a.re}), .b({b.re[QW-1], b.re}), .sub(1'b0), .s(sum_re), .cout());
  csel_adder #(.W(QW+1)) u_sim (.a({a.im[QW-1], a.im}), .b({b.im[QW-1], b.im}), .sub(1'b0), .s(sum_im), .cout());
  csel_adder #(.W(QW+1)) u_dre (.a({a.re[QW-1], a.re}), .b({b.re[QW-1], b.re}), .sub(1'b1), .s(dif_re), .cout());
  csel_adder #(.W(QW+1)) u_dim (.a({a.im[QW-1], a.im}), .b({b.im[QW-1], b.im}), .sub(1'b1), .s(dif_im), .cout());

  assign a_out.re = sum_re[QW:1];
  assign a_out.im = sum_im[QW:1];
  assign d.re     = dif_re[QW:1];
  assign d.im     = dif_im[QW:1];

  booth_mul #(.W(QW)) u_mrr (.x(d.re), .y(w.re), .p(p_rr));
  booth_mul #(.W(QW)) u_mii (.x(d.im), .y(w.im), .p(p_ii));
  booth_mul #(.W(QW)) u_mri (.x(d.re), .y(w.im), .p(p_ri));
  booth_mul #(.W(QW)) u_mir (.x(d.im), .y(w.re), .p(p_ir));

  csel_adder #(.W(2*QW+1)) u_cre (.a({p_rr[2*QW-1], p_rr}), .b({p_ii[2*QW-1], p_ii}), .sub(1'b1), .s(m_re), .cout());
  csel_adder #(.W(2*QW+1)) u_cim (.a({p_ri[2*QW-1], p_ri}), .b({p_ir[2*QW-1], p_ir}), .sub(1'b0), .s(m_im), .cout());

  assign b_out.re = m_re[2*QW-2:QW-1];
  assign b_out.im = m_im[2*QW-2:QW-1];

endmodule
