// dwt_tb_pkg: testbench helpers for the DWT encoder.
//
// fp2r decodes an 18-bit float (1 sign, 6 exponent with bias 31, 11 mantissa
// bits, hidden one, exponent 0 = zero) into a real, written independently of
// the RTL. rand_fp draws a random float with its exponent in a given range.
// The Daubechies-4 coefficients are the published real values; G follows
// from H by g[m] = (-1)^(m+1) h[3-m].
package dwt_tb_pkg;
  import dwt_pkg::*;

  localparam real H [4] = '{0.48296291314453, 0.83651630373781,
                            0.22414386804201, -0.12940952255126};
  localparam real G [4] = '{0.12940952255126, 0.22414386804201,
                            -0.83651630373781, 0.48296291314453};

  function automatic real pow2(int e);
    real r = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) r = r * 2.0;
    else        for (int i = 0; i < -e; i++) r = r / 2.0;
    return r;
  endfunction

  function automatic real fp2r(fp18_t f);
    real m;
    if (f.exp == 0) return 0.0;
    m = (1.0 + real'(f.man) / 2048.0) * pow2(int'(f.exp) - 31);
    return f.sign ? -m : m;
  endfunction

  function automatic real rabs(real r);
    return (r < 0.0) ? -r : r;
  endfunction

  function automatic fp18_t rand_fp(int emin, int emax);
    fp18_t f;
    f.sign = 1'($urandom);
    f.exp  = 6'(emin + int'($urandom % (emax - emin + 1)));
    f.man  = 11'($urandom);
    return f;
  endfunction

  // Reference model of the whole encoder in real arithmetic, written in
  // two-dimensional terms: odd passes filter the rows of the current
  // average image, even passes its columns; each keeps the even-indexed
  // outputs (zero before the first sample of a row or column). Details are
  // listed in the order the encoder emits them: odd passes row by row, even
  // passes column by column. bnd is the sum of absolute terms, used for the
  // error tolerance.
  typedef struct { real v; real bnd; int pass; } ref_t;

  function automatic void dwt_ref(input real img[], input int w, input int hgt, input int np,
                                  ref ref_t det[$], ref ref_t avg[$]);
    real cur[], cb[], nxt[], nb[];
    int r, c;
    real lo, hi, b, xv, xb;
    ref_t e;
    r = hgt; c = w;
    cur = new[r * c];
    cb  = new[r * c];
    for (int i = 0; i < r * c; i++) begin cur[i] = img[i]; cb[i] = rabs(img[i]); end
    for (int p = 1; p <= np; p++) begin
      int nseq, len;
      nseq = (p % 2 == 1) ? r : c;
      len  = (p % 2 == 1) ? c : r;
      nxt = new[nseq * (len / 2)];
      nb  = new[nseq * (len / 2)];
      for (int s = 0; s < nseq; s++) begin
        for (int k = 0; k < len / 2; k++) begin
          lo = 0.0; hi = 0.0; b = 0.0;
          for (int t = 0; t < 4; t++) begin
            if (2 * k - t >= 0) begin
              int idx;
              idx = (p % 2 == 1) ? s * c + (2 * k - t) : (2 * k - t) * c + s;
              xv = cur[idx]; xb = cb[idx];
              lo += H[t] * xv;
              hi += G[t] * xv;
              b  += rabs(H[t]) * xb;
            end
          end
          e.v = hi; e.bnd = b; e.pass = p;
          det.push_back(e);
          if (p == np) begin e.v = lo; avg.push_back(e); end
          if (p % 2 == 1) begin nxt[s * (len / 2) + k] = lo; nb[s * (len / 2) + k] = b; end
          else            begin nxt[k * c + s] = lo;         nb[k * c + s] = b;         end
        end
      end
      if (p % 2 == 1) c = c / 2; else r = r / 2;
      cur = nxt; cb = nb;
    end
  endfunction
endpackage
