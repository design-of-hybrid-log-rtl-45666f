// backward_metric_unit: one step of the backward (beta) recursion.
//
//   beta_k(s) = max*_{u in {0,1}} [ beta_{k+1}(next(s,u)) + gamma_k(s, next(s,u)) ]
//
// Each state has two outgoing branches (input bit 0 and 1); their sums are
// merged by a max_star_hybrid unit. The results are normalised by
// subtracting the metric of state 0 (this design's choice, as in the forward
// unit). Purely combinational; the caller registers beta_out.
module backward_metric_unit
  import turbo_pkg::*;
(
  input  sm_t beta_in  [NS],   // beta_{k+1}
  input  gm_t gamma    [4],    // gamma_k, index {u, p}
  output sm_t beta_out [NS]    // beta_k
);

  localparam int WX = SM_W + 1;

  logic signed [WX-1:0] m [NS];

  for (genvar s = 0; s < NS; s++) begin : g_state
    localparam int N0 = int'(rsc_next(state_t'(s), 1'b0));
    localparam int N1 = int'(rsc_next(state_t'(s), 1'b1));
    localparam int G0 = int'(rsc_par(state_t'(s), 1'b0));
    localparam int G1 = 2 | int'(rsc_par(state_t'(s), 1'b1));

    logic signed [WX-1:0] c0, c1;
    assign c0 = WX'(beta_in[N0]) + WX'(gamma[G0]);
    assign c1 = WX'(beta_in[N1]) + WX'(gamma[G1]);

    max_star_hybrid #(.W(WX), .FRAC(FRAC)) u_ms (
      .a (c0), .b (c1), .y (m[s]), .fc ()
    );
  end

  always_comb
    for (int s = 0; s < NS; s++)
      beta_out[s] = sm_t'(sat(32'(m[s]) - 32'(m[0]), SM_W));

endmodule
