// forward_metric_unit: one step of the forward (alpha) recursion.
//
//   alpha_k(s') = max*_{(s,u): next(s,u)=s'} [ alpha_{k-1}(s) + gamma_k(s,s') ]
//
// For each of the NS states the two incoming branches are found from the RSC
// trellis of turbo_pkg at elaboration time, their sums are formed and merged
// by a max_star_hybrid unit (add-compare-select with the hybrid correction).
// The new metrics are then normalised by subtracting the metric of state 0,
// so they stay bounded over any frame length; normalisation is this design's
// choice. Purely combinational; the caller registers alpha_out.
module forward_metric_unit
  import turbo_pkg::*;
(
  input  sm_t alpha_in  [NS],
  input  gm_t gamma     [4],   // index {u, p}
  output sm_t alpha_out [NS]
);

  localparam int WX = SM_W + 1;

  // j-th (j = 0, 1) predecessor of state t: returns {s, u}
  function automatic int pred(int t, int j);
    int cnt;
    cnt = 0;
    for (int s = 0; s < NS; s++)
      for (int u = 0; u < 2; u++)
        if (int'(rsc_next(state_t'(s), u[0])) == t) begin
          if (cnt == j) return (s << 1) | u;
          cnt++;
        end
    return 0;
  endfunction

  logic signed [WX-1:0] m [NS];

  for (genvar t = 0; t < NS; t++) begin : g_state
    localparam int P0 = pred(t, 0);
    localparam int P1 = pred(t, 1);
    localparam int S0 = P0 >> 1, U0 = P0 & 1;
    localparam int S1 = P1 >> 1, U1 = P1 & 1;
    localparam int G0 = (U0 << 1) | int'(rsc_par(state_t'(S0), U0[0]));
    localparam int G1 = (U1 << 1) | int'(rsc_par(state_t'(S1), U1[0]));

    logic signed [WX-1:0] c0, c1;
    assign c0 = WX'(alpha_in[S0]) + WX'(gamma[G0]);
    assign c1 = WX'(alpha_in[S1]) + WX'(gamma[G1]);

    max_star_hybrid #(.W(WX), .FRAC(FRAC)) u_ms (
      .a (c0), .b (c1), .y (m[t]), .fc ()
    );
  end

  always_comb
    for (int t = 0; t < NS; t++)
      alpha_out[t] = sm_t'(sat(32'(m[t]) - 32'(m[0]), SM_W));

endmodule
