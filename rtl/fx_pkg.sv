// fx_pkg: fixed-point number format shared by every block of the fractional-order
// chaos generators.
//
// All state variables, coefficients and intermediate values are signed 64-bit
// two's-complement numbers with 32 fractional bits (Q32.32): range about +-2.1e9,
// resolution 2.3e-10. The fine resolution is needed because the first state of each
// Bode-approximation filter is the fractional state divided by g*l (about 631) and is
// advanced by increments of the order of 1e-5 per Euler step. Products are formed at
// 128 bits and truncated (floor) back to Q32.32; no saturation is applied inside the
// datapath. Coefficients are given as reals and converted at elaboration by fx_const.
// The fixed-point format is this design's choice; the reference model used floating point.
package fx_pkg;

  localparam int unsigned FX_W    = 64;
  localparam int unsigned FX_FRAC = 32;

  typedef logic signed [FX_W-1:0] fx_t;

  localparam fx_t FX_ONE  = fx_t'(64'sd1 <<< FX_FRAC);
  localparam fx_t FX_ZERO = '0;

  // Real to Q32.32, rounding to nearest. Only for elaboration-time constants.
  function automatic fx_t fx_const(real r);
    return fx_t'(longint'(r * 4294967296.0));
  endfunction

  // Q32.32 product, truncated toward minus infinity.
  function automatic fx_t fx_mul(fx_t a, fx_t b);
    logic signed [2*FX_W-1:0] p;
    p = 128'(a) * 128'(b);
    return fx_t'(p >>> FX_FRAC);
  endfunction

  // sign(a) as -1, 0 or +1 in Q32.32.
  function automatic fx_t fx_sign(fx_t a);
    if (a == 0) return FX_ZERO;
    return a[FX_W-1] ? -FX_ONE : FX_ONE;
  endfunction

  function automatic fx_t fx_abs(fx_t a);
    return a[FX_W-1] ? -a : a;
  endfunction

  // Saturating conversion of a Q32.32 value to a signed W-bit probe word with F
  // fractional bits (F <= 32).
  function automatic logic signed [31:0] fx_to_probe(fx_t a, int unsigned w, int unsigned f);
    fx_t s, hi, lo;
    s  = a >>> (FX_FRAC - f);
    hi = (fx_t'(1) <<< (w - 1)) - 1;
    lo = -(fx_t'(1) <<< (w - 1));
    if (s > hi) s = hi;
    if (s < lo) s = lo;
    return 32'(s);
  endfunction

endpackage
