// Reference model of the reversible (5,3) wavelet for the DWT testbenches.
// Written directly from the lifting equations with exact floor division,
// independent of the RTL's shift-based arithmetic:
//   HP(2n+1) = x(2n+1) - floor((x(2n) + x(2n+2)) / 2)
//   LP(2n)   = x(2n)   + floor((HP(2n-1) + HP(2n+1) + 2) / 4)
// with symmetric extension x(-1) = x(1), x(L) = x(L-2) at both ends.
package tb_dwt_ref_pkg;

  typedef int iarr_t[$];

  function automatic int fdiv(int n, int d);
    if (n >= 0) return n / d;
    return -((-n + d - 1) / d);
  endfunction

  function automatic iarr_t dwt53_1d(iarr_t x);
    iarr_t y;
    int L = x.size();
    y = x;
    for (int i = 1; i < L; i += 2) begin
      int r = (i + 1 < L) ? x[i+1] : x[i-1];
      y[i] = x[i] - fdiv(x[i-1] + r, 2);
    end
    for (int i = 0; i < L; i += 2) begin
      int hl = (i > 0) ? y[i-1] : y[i+1];
      int hr = (i + 1 < L) ? y[i+1] : y[i-1];
      y[i] = x[i] + fdiv(hl + hr + 2, 4);
    end
    return y;
  endfunction

endpackage
