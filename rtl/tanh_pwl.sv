// tanh_pwl: hyperbolic tangent of a Q32.32 number, used for the delayed feedback
// terms 0.1 tanh(x(t - tau)) of the time-delay systems.
//
// tanh is odd, so the magnitude |a| is looked up and the sign restored. On [0, 4) the
// function is interpolated linearly between 2^SEG_BITS equally spaced breakpoints
// T[i] = tanh(i * 4 / 2^SEG_BITS), i = 0 .. 2^SEG_BITS, computed at elaboration; for
// |a| >= 4 the result saturates at tanh(4) = 0.99933. With the default 32 segments
// the largest error is about 1.5e-3. How tanh is evaluated is this design's choice.
//
// Interface and timing: purely combinational, a -> y.
module tanh_pwl
  import fx_pkg::*;
#(
  parameter int unsigned SEG_BITS = 5
) (
  input  fx_t a,
  output fx_t y
);

  localparam int unsigned NSEG = 1 << SEG_BITS;
  // Segment width 4/NSEG = 2^(2-SEG_BITS): the low SHIFT bits are the offset in a segment.
  localparam int unsigned SHIFT = FX_FRAC + 2 - SEG_BITS;

  typedef fx_t tab_t [NSEG+1];

  function automatic tab_t make_table();
    tab_t t;
    for (int i = 0; i <= NSEG; i++)
      t[i] = fx_const($tanh(4.0 * real'(i) / real'(NSEG)));
    return t;
  endfunction

  localparam tab_t TAB = make_table();

  fx_t                  mag;
  fx_t                  r;
  logic [SEG_BITS:0]    idx;
  fx_t                  off;
  fx_t                  slope;

  always_comb begin
    mag   = fx_abs(a);
    idx   = {1'b0, mag[SHIFT +: SEG_BITS]};
    off   = fx_t'(mag[SHIFT-1:0]);
    slope = TAB[idx + 1'b1] - TAB[idx];
    if (mag >= fx_const(4.0))
      r = TAB[NSEG];
    else
      r = TAB[idx] + fx_t'((128'(slope) * 128'(off)) >>> SHIFT);
    y = a[FX_W-1] ? -r : r;
  end

endmodule
