// dwt_ref_pkg: reference model of the transform for the testbenches.
//
// A plain loop-nest implementation of the same arithmetic as the engine: periodic
// extension, 13-tap convolution of 32-bit two's complement data with Q2.30
// coefficients into a 64-bit sum, right shift by F_in + 30 - F_out with round-half-up,
// Mallat in-place layout. It also builds the coefficient tables of six biorthogonal
// filter banks (F1 9/7, F2 13/11, F3 6/10, F4 5/3, F5 2/6, F6 9/3 taps; F2 is the
// default) and holds the integer bits per scale that keep each of them lossless. The
// high-pass and synthesis filters follow from the low-pass pair by the QMF relations.
package dwt_ref_pkg;

  // Filter banks F1..F6: one side of each symmetric low pass (analysis H, synthesis
  // H~), from the centre outwards, and the filter lengths. Odd lengths are symmetric
  // about a sample (h[-o] = h[o]), even lengths about a half sample (h[1-o] = h[o]).
  localparam real BANK_H  [6][7] = '{
    '{0.852699, 0.377402, -0.110624, -0.023849, 0.037828, 0.0, 0.0},
    '{0.767245, 0.383269, -0.068878, -0.033475, 0.047282, 0.003759, -0.008473},
    '{0.788486, 0.047699, -0.129078, 0.0, 0.0, 0.0, 0.0},
    '{1.060660, 0.353553, -0.176777, 0.0, 0.0, 0.0, 0.0},
    '{0.707107, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0},
    '{0.994369, 0.419845, -0.176777, -0.066291, 0.033145, 0.0, 0.0}};
  localparam real BANK_HB [6][7] = '{
    '{0.788486, 0.418092, -0.040689, -0.064539, 0.0, 0.0, 0.0},
    '{0.832848, 0.448109, -0.069163, -0.108737, 0.006292, 0.014182, 0.0},
    '{0.615051, 0.133389, -0.067237, 0.006989, 0.018914, 0.0, 0.0},
    '{0.707107, 0.353553, 0.0, 0.0, 0.0, 0.0, 0.0},
    '{0.707107, 0.088388, -0.088388, 0.0, 0.0, 0.0, 0.0},
    '{0.707107, 0.353553, 0.0, 0.0, 0.0, 0.0, 0.0}};
  localparam int  BANK_LH [6] = '{9, 13, 6, 5, 2, 9};
  // integer bits per scale (index 0: 13-bit pixels) that keep each bank lossless
  localparam int  BANK_BINT [6][8] = '{
    '{13, 15, 17, 19, 21, 23, 25, 27},
    '{13, 16, 17, 19, 21, 23, 25, 27},
    '{13, 15, 17, 19, 21, 23, 25, 27},
    '{13, 16, 18, 20, 22, 24, 27, 29},
    '{13, 15, 16, 17, 18, 19, 20, 21},
    '{13, 16, 19, 21, 24, 26, 29, 31}};
  localparam int  DEFAULT_BANK = 1;   // F2, 13/11 taps

  function automatic int q30(input real v);
    return int'($floor(v * 1073741824.0 + 0.5));
  endfunction

  function automatic int sgn(input int o);
    return (o % 2 == 0) ? 1 : -1;
  endfunction

  // Tap of a symmetric filter at offset o (zero outside the 13-tap window).
  function automatic real tap(input real c [7], input bit even_len, input int o);
    int i;
    if (o < -6 || o > 6) return 0.0;
    i = even_len ? ((o >= 1) ? o - 1 : -o) : ((o < 0) ? -o : o);
    return (i < 7) ? c[i] : 0.0;
  endfunction

  // 32-word coefficient image: words 0..12 even outputs, 16..28 odd outputs; word k
  // (16 + k) multiplies x[m - 6 + k]. Forward: h, and the high pass
  // g[o] = (-1)^o h~[o + sh] (sh = 0 for odd-length banks, -1 for even-length ones).
  // Inverse: the sample at distance d = m - q from the output is weighted by
  // (-1)^(d + ta) g[d + ta] if it is a low-pass sample (q even) and by
  // sb (-1)^(d + tb) h[d + tb] if it is a high-pass sample (q odd); ta = tb = 0 and
  // sb = 1 for odd lengths, ta = 1, tb = -1, sb = -1 for even lengths.
  function automatic void make_coefs(input bit inverse, output int c [32],
                                     input int bank = DEFAULT_BANK);
    bit ev;
    int sh, ta, tb, sb;
    ev = (BANK_LH[bank] % 2) == 0;
    sh = ev ? -1 : 0; ta = ev ? 1 : 0; tb = ev ? -1 : 0; sb = ev ? -1 : 1;
    for (int i = 0; i < 32; i++) c[i] = 0;
    for (int p = 0; p < 2; p++)
      for (int k = 0; k < 13; k++) begin
        int o, d;
        real v;
        o = k - 6;
        d = -o;
        if (!inverse)
          v = (p == 0) ? tap(BANK_H[bank], ev, o)
                       : sgn(o) * tap(BANK_HB[bank], ev, o + sh);
        else if ((p + o) % 2 == 0)
          v = tap(BANK_HB[bank], ev, d + ta + sh);
        else
          v = sb * sgn(d + tb) * tap(BANK_H[bank], ev, d + tb);
        c[p * 16 + k] = q30(v);
      end
  endfunction

  function automatic int rnd(input longint acc, input int rs);
    longint sh;
    sh = acc >>> rs;
    return int'(sh + ((acc >> (rs - 1)) & 64'd1));
  endfunction

  // One 1-D pass over a line v of length n (input in natural order for forward,
  // Mallat layout for inverse); returns the line in its stored layout.
  function automatic void line_pass(ref int v [], input int n, input bit inverse,
                                    input int c [32], input int shl, input int rs);
    int u [], w [];
    u = new[n]; w = new[n];
    for (int q = 0; q < n; q++)
      u[q] = inverse ? v[(q % 2) ? n/2 + q/2 : q/2] : v[q];
    for (int m = 0; m < n; m++) begin
      longint acc;
      acc = 0;
      for (int k = 0; k < 13; k++) begin
        int x;
        x = u[((m - 6 + k) % n + n) % n] <<< shl;
        acc += longint'(x) * longint'(c[(m % 2) * 16 + k]);
      end
      w[inverse ? m : ((m % 2) ? n/2 + m/2 : m/2)] = rnd(acc, rs);
    end
    for (int i = 0; i < n; i++) v[i] = w[i];
  endfunction

  // Whole transform of an nf x nf row-major image, in place.
  function automatic void transform(ref int img [], input int nf, input int nscales,
                                    input bit inverse, input int bint [8],
                                    input int bank = DEFAULT_BANK);
    int c [32];
    make_coefs(inverse, c, bank);
    for (int step = 0; step < nscales; step++) begin
      int s, n;
      s = inverse ? nscales - step : step + 1;
      n = nf >> (s - 1);
      for (int pass = 0; pass < 2; pass++) begin
        bit is_col;
        int shl, rs;
        is_col = inverse ? (pass == 1) : (pass == 0);
        shl = (!inverse && s == 1 && pass == 0) ? 32 - bint[0] : 0;
        if (!inverse) rs = (pass != 0) ? 30 : 30 + bint[s] - bint[s-1];
        else if (pass == 0) rs = 30;
        else if (s == 1) rs = 30 + 32 - bint[1];
        else rs = 30 - (bint[s] - bint[s-1]);
        for (int line = 0; line < n; line++) begin
          int v [];
          v = new[n];
          for (int p = 0; p < n; p++) v[p] = is_col ? img[p*nf + line] : img[line*nf + p];
          line_pass(v, n, inverse, c, shl, rs);
          for (int p = 0; p < n; p++)
            if (is_col) img[p*nf + line] = v[p]; else img[line*nf + p] = v[p];
        end
      end
    end
  endfunction
endpackage
