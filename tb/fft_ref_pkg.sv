// fft_ref_pkg - reference models for the FFT testbenches.
//
// model_fft(): bit-true model of a radix-4 decimation-in-frequency FFT of
// length N = 16 or 64, written directly from the transform equations.
// Every stage but the last forms, for each block of 4L words,
//     y(m*L + q) = floor(Wq * sum_p x(p*L + q) * W4^(p*m) / 2^15),
// with the twiddle W_{4L}^(q*m) quantised as floor(v * 2^15) per part
// (1.0 clipped to 0x7fff); the last stage is an exact 4-point DFT.  Results
// are returned in natural bin order (base-4 digit reversal of positions).
// It also returns the largest butterfly-sum magnitude of each stage, used
// to bound the distance from an ideal DFT.
// model_dft(): floating-point DFT.
//
// The transform equations are the published ones; the quantisation and
// rounding modelled here are this design's choices, matching the RTL.
package fft_ref_pkg;

  function automatic longint qtw(real v);
    longint q = longint'($floor(v * 32768.0 + 1.0e-6));
    if (q > 32767) q = 32767;
    return q;
  endfunction

  // sum of 4 inputs with factor (-j)^(p*m)
  function automatic void r4_sum(input longint vr [4], input longint vi [4],
                                 input int m, output longint sr, output longint si);
    sr = 0; si = 0;
    for (int p = 0; p < 4; p++)
      case ((p * m) % 4)
        0: begin sr += vr[p]; si += vi[p]; end
        1: begin sr += vi[p]; si -= vr[p]; end
        2: begin sr -= vr[p]; si -= vi[p]; end
        default: begin sr -= vi[p]; si += vr[p]; end
      endcase
  endfunction

  function automatic void model_fft(input int n, input longint xr [], input longint xi [],
                                    output longint Xr [], output longint Xi [],
                                    output longint peak [3]);
    real    pi = 3.14159265358979323846;
    longint ar [] = new [n];
    longint ai [] = new [n];
    longint br [] = new [n];
    longint bi [] = new [n];
    int     lvl = 0;
    for (int i = 0; i < n; i++) begin ar[i] = xr[i]; ai[i] = xi[i]; end
    for (int s = 0; s < 3; s++) peak[s] = 0;
    for (int L = n / 4; L >= 1; L /= 4) begin
      for (int b = 0; b < n; b += 4 * L)
        for (int q = 0; q < L; q++)
          for (int m = 0; m < 4; m++) begin
            longint vr [4], vi [4], sr, si;
            for (int p = 0; p < 4; p++) begin
              vr[p] = ar[b + p * L + q];
              vi[p] = ai[b + p * L + q];
            end
            r4_sum(vr, vi, m, sr, si);
            if (sr > peak[lvl])  peak[lvl] = sr;
            if (-sr > peak[lvl]) peak[lvl] = -sr;
            if (si > peak[lvl])  peak[lvl] = si;
            if (-si > peak[lvl]) peak[lvl] = -si;
            if (L > 1) begin
              longint cr = qtw($cos(2.0 * pi * q * m / (4.0 * L)));
              longint ci = qtw(-$sin(2.0 * pi * q * m / (4.0 * L)));
              br[b + m * L + q] = (sr * cr - si * ci) >>> 15;
              bi[b + m * L + q] = (sr * ci + si * cr) >>> 15;
            end else begin
              br[b + m * L + q] = sr;
              bi[b + m * L + q] = si;
            end
          end
      for (int i = 0; i < n; i++) begin ar[i] = br[i]; ai[i] = bi[i]; end
      lvl++;
    end
    Xr = new [n];
    Xi = new [n];
    for (int pos = 0; pos < n; pos++) begin
      int k = 0, t = pos;
      for (int d = 1; d < n; d *= 4) begin
        k = k * 4 + t % 4;
        t /= 4;
      end
      Xr[k] = ar[pos];
      Xi[k] = ai[pos];
    end
  endfunction

  function automatic void model_dft(input int n, input longint xr [], input longint xi [],
                                    output real Fr [], output real Fi []);
    real pi = 3.14159265358979323846;
    Fr = new [n];
    Fi = new [n];
    for (int k = 0; k < n; k++) begin
      real sr = 0.0, si = 0.0;
      for (int i = 0; i < n; i++) begin
        real ang = -2.0 * pi * ((i * k) % n) / n;
        sr += xr[i] * $cos(ang) - xi[i] * $sin(ang);
        si += xr[i] * $sin(ang) + xi[i] * $cos(ang);
      end
      Fr[k] = sr;
      Fi[k] = si;
    end
  endfunction

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

endpackage
