// mfcc_tb_pkg: reference models shared by the MFCC testbenches.
// - mel_bank(): 40 unit-area triangular filters with edges equally spaced on
//   the Mel scale mel(f) = 1127 ln(1 + f/700) from 0 Hz to fs/2 = 4000 Hz,
//   mapped onto FFT bins b*fs/256 (fs = 8000 Hz). Filter k rises from edge k
//   to edge k+1 and falls to edge k+2; its height is 2/(width in bins) so its
//   area is 1; weights are scaled by 10000 and rounded.
// - ref_log(): the integer log computation (leading one, 8-bit index,
//   table value computed here with $ln, x ln2 in Q16, minus 40000).
// - cosine(): the DCT matrix entry cos(pi * i * (j + 0.5) / 40) in Q14.
package mfcc_tb_pkg;
  import mfcc_pkg::*;

  typedef int unsigned coef_mat_t [N_FILT][N_BINS];
  typedef int unsigned end_tab_t  [N_FILT];

  function automatic real mel(real f);
    return 1127.0 * $ln(1.0 + f / 700.0);
  endfunction

  function automatic real imel(real m);
    return 700.0 * ($exp(m / 1127.0) - 1.0);
  endfunction

  function automatic void mel_bank(output coef_mat_t w, output end_tab_t e);
    real edge_bin [N_FILT+2];
    real top = mel(4000.0);
    for (int i = 0; i < N_FILT + 2; i++)
      edge_bin[i] = imel(top * i / (N_FILT + 1)) / 8000.0 * N_BINS;
    for (int k = 0; k < N_FILT; k++) begin
      real l = edge_bin[k], c = edge_bin[k+1], r = edge_bin[k+2];
      real h = 2.0 / (r - l);
      e[k] = 0;
      for (int b = 0; b < N_BINS; b++) begin
        real t = 0.0;
        if (b > l && b <= c)      t = h * (b - l) / (c - l);
        else if (b > c && b < r)  t = h * (r - b) / (r - c);
        w[k][b] = (t > 0.0) ? int'($rtoi(t * 10000.0 + 0.5)) : 0;
        if (b > l && b < r) e[k] = b;
      end
    end
  endfunction

  function automatic int lut_val(int i);
    real v = 10000.0 * $ln(0.5 + i / 512.0) / $ln(2.0);
    return (v < 0.0) ? -int'($rtoi(-v + 0.5)) : int'($rtoi(v + 0.5));
  endfunction

  function automatic longint ref_log(longint unsigned a);
    int p, idx;
    longint s;
    if (a == 0) a = 1;
    p = 0;
    for (int i = 0; i < 64; i++) if (a[i]) p = i + 1;
    // 8 bits below the leading one
    if (p - 1 >= 8) idx = int'((a >> (p - 1 - 8)) & 64'hff);
    else            idx = int'((a << (8 - (p - 1))) & 64'hff);
    s = longint'(p) * 10000 + longint'(lut_val(idx));
    return ((s * 45426) >>> 16) - 40000;
  endfunction

  function automatic int cosine(int i, int j);
    real c = $cos(3.14159265358979 * i * (j + 0.5) / N_FILT) * 16384.0;
    int  v = (c < 0.0) ? -int'($rtoi(-c + 0.5)) : int'($rtoi(c + 0.5));
    return (v > 32767) ? 32767 : v;
  endfunction

endpackage
