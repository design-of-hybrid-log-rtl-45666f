// turbo_pkg: shared constants, fixed-point types and trellis functions of the
// turbo codec.
//
// All soft values (channel LLRs, extrinsic/a-priori LLRs, branch and state
// metrics) are two's-complement fixed point with FRAC fractional bits, so a
// value v stands for v / 2**FRAC. The widths are this design's own choice; the
// source material gives none.
//
// The constituent code is a recursive systematic convolutional (RSC) code
// with MEM memory cells (constraint length MEM+1 = 3, four states, eight
// branches). Its feedback and feed-forward polynomials are FB_POLY and
// FF_POLY, written MSB first as the coefficients of D^0 .. D^MEM. The default
// pair (7, 5 octal) is this design's choice for a four-state code; an
// eight-state code such as (13, 11 octal) is obtained by setting MEM = 3 and
// the two polynomials.
//
// State encoding: bit MEM-1 of a state is the most recently shifted-in cell.
// Bit u = 1 is sent as +1 and u = 0 as -1, so a positive LLR favours 1.
package turbo_pkg;

  // ---------------------------------------------------------------- trellis
  localparam int MEM = 2;
  localparam int NS  = 1 << MEM;                 // number of trellis states
  localparam logic [MEM:0] FB_POLY = 3'o7;       // feedback polynomial
  localparam logic [MEM:0] FF_POLY = 3'o5;       // feed-forward (parity) polynomial

  // ----------------------------------------------------------- fixed point
  localparam int FRAC  = 3;    // fractional bits of every soft value
  localparam int CH_W  = 7;    // channel LLR width (range +-8.0)
  localparam int EXT_W = 9;    // extrinsic / a-priori LLR width (range +-32.0)
  localparam int GM_W  = 11;   // branch metric width
  localparam int SM_W  = 12;   // state metric width (normalised every step)
  localparam int LLR_W = 12;   // a-posteriori LLR width

  typedef logic signed [CH_W-1:0]  ch_t;
  typedef logic signed [EXT_W-1:0] ext_t;
  typedef logic signed [GM_W-1:0]  gm_t;
  typedef logic signed [SM_W-1:0]  sm_t;
  typedef logic signed [LLR_W-1:0] llr_t;
  typedef logic [MEM-1:0]          state_t;

  // "Minus infinity" for state metrics of states that cannot be the start
  // state; far enough from the rails that adding branch metrics never wraps.
  localparam sm_t SM_NEG_INF = sm_t'(-(1 <<< (SM_W - 3)));

  // Feedback bit (the value shifted into the register) for state s, input u.
  function automatic logic rsc_fb(state_t s, logic u);
    logic a;
    a = u;
    for (int i = 1; i <= MEM; i++)
      if (FB_POLY[MEM-i]) a ^= s[MEM-i];
    return a;
  endfunction

  // Parity output for state s, input u.
  function automatic logic rsc_par(state_t s, logic u);
    logic a, p;
    a = rsc_fb(s, u);
    p = FF_POLY[MEM] & a;
    for (int i = 1; i <= MEM; i++)
      if (FF_POLY[MEM-i]) p ^= s[MEM-i];
    return p;
  endfunction

  // Next state for state s, input u.
  function automatic state_t rsc_next(state_t s, logic u);
    state_t n;
    n = s >> 1;
    n[MEM-1] = rsc_fb(s, u);
    return n;
  endfunction

  // Saturate a wide signed value to w bits (w <= 32).
  function automatic logic signed [31:0] sat(logic signed [31:0] v, int w);
    logic signed [31:0] hi, lo;
    hi = (32'sd1 <<< (w - 1)) - 32'sd1;
    lo = -(32'sd1 <<< (w - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

endpackage
