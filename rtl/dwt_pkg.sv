// dwt_pkg: types and constants shared by the subband image encoder.
//
// Number format. All arithmetic inside the encoder uses an 18-bit floating
// point word: 1 sign bit, a 6-bit exponent and an 11-bit mantissa (the
// field widths are the original design's). The exponent bias (31), the
// hidden leading one and the coding of zero (exponent field 0) are this
// design's choices: there are no denormals, infinities or NaNs, results
// that underflow become zero and results that overflow saturate to the
// largest magnitude.
//
// The Daubechies-4 filter coefficients are hardwired constants (DB4_H).
//
// A coefficient leaving the filter bank is a 19-bit word: the 18-bit float
// plus a valid bit (coef_stream_t).
package dwt_pkg;

  localparam int FP_W     = 18;
  localparam int EXP_W    = 6;
  localparam int MAN_W    = 11;
  localparam int EXP_BIAS = 31;
  localparam int EXP_MAX  = 63;

  // Largest number of one-dimensional filter passes (5 two-dimensional levels).
  localparam int MAX_PASS = 10;
  localparam int PASS_W   = 4;

  typedef struct packed {
    logic             sign;
    logic [EXP_W-1:0] exp;
    logic [MAN_W-1:0] man;
  } fp18_t;

  typedef struct packed {
    logic  valid;
    fp18_t data;
  } coef_stream_t;

  localparam fp18_t FP_ZERO = '0;

  // Negate a float; zero stays zero (exponent 0).
  function automatic fp18_t fp_neg(fp18_t a);
    fp18_t r;
    r = a;
    if (a.exp != '0) r.sign = ~a.sign;
    else r = FP_ZERO;
    return r;
  endfunction

  // Round a real number to the nearest 18-bit float. Only used at elaboration
  // time (constant coefficients), never in logic.
  function automatic fp18_t real_to_fp18(real r);
    fp18_t res;
    real   m;
    int    e;
    int    man;
    res = FP_ZERO;
    if (r != 0.0) begin
      res.sign = (r < 0.0);
      m = (r < 0.0) ? -r : r;
      e = 0;
      while (m >= 2.0) begin m = m / 2.0; e = e + 1; end
      while (m < 1.0)  begin m = m * 2.0; e = e - 1; end
      man = int'($floor((m - 1.0) * 2048.0 + 0.5));
      if (man == 2048) begin man = 0; e = e + 1; end
      e = e + EXP_BIAS;
      if (e <= 0) res = FP_ZERO;
      else begin
        res.exp = EXP_W'(e);
        res.man = MAN_W'(man);
      end
    end
    return res;
  endfunction

  // Hardwired lowpass coefficients h0..h3 of the Daubechies-4 wavelet,
  // rounded to the nearest 18-bit float. The highpass coefficients are not
  // stored: the filter bank derives them by the quadrature-mirror relation
  // g[m] = (-1)^(m+1) h[3-m].
  localparam fp18_t DB4_H [4] = '{real_to_fp18( 0.48296291314453),
                                  real_to_fp18( 0.83651630373781),
                                  real_to_fp18( 0.22414386804201),
                                  real_to_fp18(-0.12940952255126)};

endpackage
