// pow_pwl: non-integer power a^EXPONENT of a non-negative Q32.32 number, the |e|^(qk)
// term of the fixed-time (qk = 0.9 * 2.9 = 2.61) and predefined-time (qk = 0.5 * 5.2
// = 2.6) synchronization laws.
//
// The input is saturated to [0, 16) and the function interpolated linearly between
// 2^SEG_BITS + 1 equally spaced breakpoints T[i] = (i * 16 / 2^SEG_BITS)^EXPONENT,
// computed at elaboration. With the default 256 segments of width 1/16 the error is
// below 3.5e-3 for |e| < 2 and below 0.2 % of the value for |e| >= 1. The
// exponents are the published design's; the evaluation method and the range are
// this design's choices (synchronization errors in the reported experiments stay
// below 11).
//
// Interface and timing: purely combinational, a -> y. Negative inputs are treated as 0.
module pow_pwl
  import fx_pkg::*;
#(
  parameter real         EXPONENT = 2.61,
  parameter int unsigned SEG_BITS = 8
) (
  input  fx_t a,
  output fx_t y
);

  localparam int unsigned NSEG  = 1 << SEG_BITS;
  // Segment width 16/NSEG = 2^(4-SEG_BITS).
  localparam int unsigned SHIFT = FX_FRAC + 4 - SEG_BITS;

  typedef fx_t tab_t [NSEG+1];

  function automatic tab_t make_table();
    tab_t t;
    for (int i = 0; i <= NSEG; i++)
      t[i] = fx_const((16.0 * real'(i) / real'(NSEG)) ** EXPONENT);
    return t;
  endfunction

  localparam tab_t TAB = make_table();

  logic [SEG_BITS:0]   idx;
  fx_t                 off;
  fx_t                 slope;

  always_comb begin
    idx   = {1'b0, a[SHIFT +: SEG_BITS]};
    off   = fx_t'(a[SHIFT-1:0]);
    slope = TAB[idx + 1'b1] - TAB[idx];
    if (a <= 0)
      y = FX_ZERO;
    else if (a >= fx_const(16.0))
      y = TAB[NSEG];
    else
      y = TAB[idx] + fx_t'((128'(slope) * 128'(off)) >>> SHIFT);
  end

endmodule
