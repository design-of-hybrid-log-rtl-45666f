// branch_metric_unit: branch metrics of one trellis step.
//
// Every branch of the trellis is labelled with a systematic symbol xs and a
// parity symbol xp, each +1 or -1, so a step has only four distinct branch
// metrics (the eight branches of the four-state trellis share them):
//
//   gamma(xs,xp) = 1/2 * ( L(u)*xs + ys*xs + yp*xp )
//
// where L(u) is the a-priori LLR and ys, yp the received systematic and
// parity channel LLRs. Output gamma[{u,p}] belongs to the label xs = 2u-1,
// xp = 2p-1. The halving is an arithmetic right shift (it truncates the last
// half LSB; this is this design's choice). Purely combinational.
module branch_metric_unit
  import turbo_pkg::*;
(
  input  ext_t la,          // a-priori LLR of the bit
  input  ch_t  ys,          // systematic channel LLR
  input  ch_t  yp,          // parity channel LLR
  output gm_t  gamma [4]    // index {u, p}
);

  logic signed [GM_W:0] s_sys;   // L(u) + ys
  logic signed [GM_W:0] tot;

  always_comb begin
    s_sys = (GM_W+1)'(la) + (GM_W+1)'(ys);
    for (int i = 0; i < 4; i++) begin
      tot = (i[1] ? s_sys : -s_sys) + (i[0] ? (GM_W+1)'(yp) : -(GM_W+1)'(yp));
      gamma[i] = gm_t'(tot >>> 1);
    end
  end

endmodule
