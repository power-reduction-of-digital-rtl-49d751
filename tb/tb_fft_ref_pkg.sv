// Reference model of the fixed-point FFT for the testbenches, written from
// the arithmetic definition with plain integer operators:
//   twiddle W^e (1024-point table) = round(32767 cos(2 pi e/1024))
//                                  - j round(32767 sin(2 pi e/1024))
//   butterfly: a' = floor((a+b)/2), d = floor((a-b)/2),
//              b' = floor((d * W) / 2^15) per real/imaginary part
//   transform: in-place radix-2 decimation in frequency, output bit-reversed.
package tb_fft_ref_pkg;

  function automatic int q15_round(real v);
    return int'($floor(32767.0 * v + 0.5));
  endfunction

  function automatic void twiddle(input int e, output int wr, output int wi);
    real ang = 2.0 * 3.14159265358979323846 * real'(e) / 1024.0;
    wr = q15_round($cos(ang));
    wi = -q15_round($sin(ang));
  endfunction

  function automatic int fl2(longint n, int sh);   // floor(n / 2^sh)
    return int'(n >>> sh);
  endfunction

  function automatic void bfly(input int ar, ai, br, bi, wr, wi,
                               output int oar, oai, obr, obi);
    int dr, di;
    oar = fl2(longint'(ar) + br, 1);
    oai = fl2(longint'(ai) + bi, 1);
    dr  = fl2(longint'(ar) - br, 1);
    di  = fl2(longint'(ai) - bi, 1);
    obr = fl2(longint'(dr) * wr - longint'(di) * wi, 15);
    obi = fl2(longint'(dr) * wi + longint'(di) * wr, 15);
  endfunction

  // in-place DIF FFT of 2^L points on re[]/im[]
  function automatic void fft_dif(input int L, ref int re[1024], ref int im[1024]);
    int N, h;
    N = 1 << L;
    for (int s = 0; s < L; s++) begin
      h = N >> (s + 1);
      for (int j = 0; j < N / 2; j++) begin
        int p, g, a, b, wr, wi, oar, oai, obr, obi;
        p = j % h; g = j / h;
        a = 2 * g * h + p; b = a + h;
        twiddle((p << s) << (10 - L), wr, wi);
        bfly(re[a], im[a], re[b], im[b], wr, wi, oar, oai, obr, obi);
        re[a] = oar; im[a] = oai; re[b] = obr; im[b] = obi;
      end
    end
  endfunction

  function automatic int bitrev(int k, int L);
    int r = 0;
    for (int i = 0; i < L; i++) if (k & (1 << i)) r |= 1 << (L - 1 - i);
    return r;
  endfunction

endpackage
