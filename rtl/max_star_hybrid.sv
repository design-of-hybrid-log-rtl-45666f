// max_star_hybrid: the max* (Jacobian logarithm) operator of the Log-MAP
// algorithm with the hybrid approximation of its correction term.
//
//   max*(a,b) = ln(e^a + e^b) = max(a,b) + fc(|a-b|)
//
// The correction fc(x) is approximated piecewise, as the hybrid method
// prescribes:
//   x <  1.5 : fc = 0.693 - x/2       (linear fit, clamped at 0)
//   x >= 1.5 : fc = 0.1693 / 2^floor(x) (a constant shifted right floor(x) times)
// The right shift by floor(x) is the integer part of x in fixed point, so the
// second region is a barrel shift of a constant, no multiplier or table.
//
// Inputs and output are signed fixed point with FRAC fractional bits. The two
// constants are held with G extra guard bits and the correction is rounded to
// FRAC bits at the end; the clamp at zero, the guard bits and the output
// saturation are this design's choices. Purely combinational.
module max_star_hybrid #(
  parameter int W    = 12,  // width of a, b and y
  parameter int FRAC = 3,   // fractional bits
  parameter int G    = 4    // guard bits for the correction constants
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] y,
  output logic [FRAC:0]       fc   // correction that was added (for observation)
);

  localparam int  FG  = FRAC + G;
  localparam int  C1  = int'(0.693  * (2.0 ** FG));   // ln 2 in Q(FG)
  localparam int  C2  = int'(0.1693 * (2.0 ** FG));   // hybrid constant in Q(FG)
  localparam int  TH  = 3 << (FRAC - 1);               // 1.5 in Q(FRAC)

  logic signed [W:0]   diff;
  logic        [W:0]   x;        // |a - b|
  logic signed [W-1:0] mx;
  logic        [W:0]   n;        // floor(x)
  int                  lin_ext;  // linear-region correction, Q(FG)
  int                  stp_ext;  // step-region correction, Q(FG)
  int                  corr;     // rounded correction, Q(FRAC)
  logic signed [W+1:0] sum;

  always_comb begin
    diff = {a[W-1], a} - {b[W-1], b};
    x    = diff[W] ? (W+1)'(-diff) : (W+1)'(diff);
    mx   = diff[W] ? b : a;
    n    = x >> FRAC;

    lin_ext = C1 - (int'(x) << (G - 1));
    if (lin_ext < 0) lin_ext = 0;
    stp_ext = (n >= (W+1)'(31)) ? 0 : (C2 >> n);

    if (int'(x) < TH) corr = (lin_ext + (1 << (G - 1))) >> G;
    else              corr = (stp_ext + (1 << (G - 1))) >> G;
    fc = (FRAC+1)'(corr);

    sum = (W+2)'(mx) + (W+2)'(corr);
    if (sum > (W+2)'((1 << (W - 1)) - 1)) y = {1'b0, {(W-1){1'b1}}};
    else                                  y = sum[W-1:0];
  end

endmodule
