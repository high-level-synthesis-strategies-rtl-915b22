// tb_cplx_pkg: floating-point helpers shared by the RGMIU testbenches.
//
// They produce test Gram matrices and the reference inverses against which
// the fixed-point hardware is compared, entirely in double precision and
// independently of the RTL:
//   make_gram  draws a random channel H (m_ant x k, i.i.d. entries, uniform
//              real and imaginary parts, unit variance per complex entry)
//              and returns G = H^H H / m_ant.
//   quantize   rounds a real to a 16-bit word with 14 fractional bits.
//   ref_rs     bit-exact model of the words' rounding: x / 2^sh rounded to
//              nearest (ties up) and saturated to 16 bits.
//   ref_recip  bit-exact model of the reciprocal: round(2^28 / d),
//              saturated to 32767 (also for d <= 0).
//   rand_word  a random 16-bit word, with the extreme values often.
//   cinv       inverts a complex k x k matrix by Gauss-Jordan elimination
//              with partial pivoting.
package tb_cplx_pkg;

  localparam int KMAX = 16;
  localparam real SCALE = 16384.0;   // 2^14

  typedef real rmat_t [KMAX][KMAX];

  function automatic real urand_sym();
    return ($itor($urandom) / 4294967296.0) * 2.0 - 1.0;
  endfunction

  function automatic void make_gram(input int m_ant, input int k,
                                    output rmat_t gr, output rmat_t gi);
    real hr [][];
    real hi [][];
    real a;
    a = $sqrt(1.5);   // uniform on [-a, a] has variance 1/2 per part
    hr = new[m_ant];
    hi = new[m_ant];
    for (int r = 0; r < m_ant; r++) begin
      hr[r] = new[k];
      hi[r] = new[k];
      for (int c = 0; c < k; c++) begin
        hr[r][c] = a * urand_sym();
        hi[r][c] = a * urand_sym();
      end
    end
    for (int i = 0; i < KMAX; i++)
      for (int j = 0; j < KMAX; j++) begin
        gr[i][j] = 0.0;
        gi[i][j] = 0.0;
      end
    for (int i = 0; i < k; i++)
      for (int j = 0; j < k; j++) begin
        real sr, si;
        sr = 0.0;
        si = 0.0;
        for (int r = 0; r < m_ant; r++) begin
          // conj(h(r,i)) * h(r,j)
          sr += hr[r][i] * hr[r][j] + hi[r][i] * hi[r][j];
          si += hr[r][i] * hi[r][j] - hi[r][i] * hr[r][j];
        end
        gr[i][j] = sr / m_ant;
        gi[i][j] = (i == j) ? 0.0 : si / m_ant;
      end
  endfunction

  function automatic int quantize(input real x);
    real s;
    int  q;
    s = x * SCALE;
    q = (s >= 0.0) ? int'($floor(s + 0.5)) : -int'($floor(-s + 0.5));
    if (q > 32767)  q = 32767;
    if (q < -32768) q = -32768;
    return q;
  endfunction

  function automatic real to_real(input logic signed [15:0] w);
    return $itor(w) / SCALE;
  endfunction

  function automatic int ref_rs(input longint x, input int sh);
    longint r;
    r = x + (longint'(1) << (sh - 1));
    // floor division by 2^sh
    if (r >= 0) r = r / (longint'(1) << sh);
    else        r = -((-r + (longint'(1) << sh) - 1) / (longint'(1) << sh));
    if (r > 32767)  r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  function automatic int ref_recip(input int d);
    longint q;
    if (d <= 0) return 32767;
    q = ((longint'(1) << 29) + longint'(d)) / (2 * longint'(d));
    return (q > 32767) ? 32767 : int'(q);
  endfunction

  function automatic logic signed [15:0] rand_word();
    int sel;
    sel = int'($urandom % 16);
    if (sel == 0) return 16'sh8000;
    if (sel == 1) return 16'sh7fff;
    return 16'($urandom);
  endfunction

  // A random word in [lo, hi] (given as reals).
  function automatic logic signed [15:0] rand_range(input real lo, input real hi);
    return 16'(quantize(lo + (hi - lo) * (urand_sym() + 1.0) / 2.0));
  endfunction

  function automatic void cinv(input int k, input rmat_t ar, input rmat_t ai,
                               output rmat_t br, output rmat_t bi);
    rmat_t xr, xi;
    xr = ar;
    xi = ai;
    for (int i = 0; i < KMAX; i++)
      for (int j = 0; j < KMAX; j++) begin
        br[i][j] = (i == j) ? 1.0 : 0.0;
        bi[i][j] = 0.0;
      end
    for (int col = 0; col < k; col++) begin
      int  piv;
      real best, pr, pi, den, ir, ii;
      piv  = col;
      best = -1.0;
      for (int r = col; r < k; r++) begin
        real mag;
        mag = xr[r][col] * xr[r][col] + xi[r][col] * xi[r][col];
        if (mag > best) begin
          best = mag;
          piv  = r;
        end
      end
      for (int c = 0; c < k; c++) begin
        real t;
        t = xr[col][c]; xr[col][c] = xr[piv][c]; xr[piv][c] = t;
        t = xi[col][c]; xi[col][c] = xi[piv][c]; xi[piv][c] = t;
        t = br[col][c]; br[col][c] = br[piv][c]; br[piv][c] = t;
        t = bi[col][c]; bi[col][c] = bi[piv][c]; bi[piv][c] = t;
      end
      pr  = xr[col][col];
      pi  = xi[col][col];
      den = pr * pr + pi * pi;
      ir  = pr / den;
      ii  = -pi / den;
      for (int c = 0; c < k; c++) begin
        real t1, t2;
        t1 = xr[col][c] * ir - xi[col][c] * ii;
        t2 = xr[col][c] * ii + xi[col][c] * ir;
        xr[col][c] = t1; xi[col][c] = t2;
        t1 = br[col][c] * ir - bi[col][c] * ii;
        t2 = br[col][c] * ii + bi[col][c] * ir;
        br[col][c] = t1; bi[col][c] = t2;
      end
      for (int r = 0; r < k; r++) begin
        if (r != col) begin
          real fr, fi;
          fr = xr[r][col];
          fi = xi[r][col];
          for (int c = 0; c < k; c++) begin
            xr[r][c] -= fr * xr[col][c] - fi * xi[col][c];
            xi[r][c] -= fr * xi[col][c] + fi * xr[col][c];
            br[r][c] -= fr * br[col][c] - fi * bi[col][c];
            bi[r][c] -= fr * bi[col][c] + fi * br[col][c];
          end
        end
      end
    end
  endfunction

endpackage
