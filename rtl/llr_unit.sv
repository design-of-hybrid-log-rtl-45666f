// llr_unit: a-posteriori LLR of one information bit.
//
//   L_k = max*_{u=1} [ alpha_k(s) + gamma_k(s,s') + beta_{k+1}(s') ]
//       - max*_{u=0} [ alpha_k(s) + gamma_k(s,s') + beta_{k+1}(s') ]
//
// For each input bit value the NS branch sums of the trellis step are formed
// and reduced by a balanced tree of max_star_hybrid units (log2(NS) levels);
// the difference of the two tree outputs, saturated to LLR_W bits, is the
// LLR. Purely combinational.
module llr_unit
  import turbo_pkg::*;
(
  input  sm_t  alpha [NS],   // alpha_k: metrics of the states before bit k
  input  sm_t  beta  [NS],   // beta_{k+1}: metrics of the states after bit k
  input  gm_t  gamma [4],    // gamma_k, index {u, p}
  output llr_t llr
);

  localparam int WX = SM_W + 2;

  logic signed [WX-1:0] root [2];

  for (genvar u = 0; u < 2; u++) begin : g_bit
    logic signed [WX-1:0] leaf [NS];
    for (genvar s = 0; s < NS; s++) begin : g_leaf
      localparam int NX = int'(rsc_next(state_t'(s), u[0]));
      localparam int GI = (u << 1) | int'(rsc_par(state_t'(s), u[0]));
      assign leaf[s] = WX'(alpha[s]) + WX'(gamma[GI]) + WX'(beta[NX]);
    end

    // reduction tree, level l holds NS >> (l+1) nodes
    for (genvar l = 0; l < MEM; l++) begin : g_lvl
      logic signed [WX-1:0] v [NS >> (l + 1)];
      for (genvar i = 0; i < (NS >> (l + 1)); i++) begin : g_node
        logic signed [WX-1:0] in_a, in_b;
        if (l == 0) begin : g_first
          assign in_a = leaf[2*i];
          assign in_b = leaf[2*i+1];
        end else begin : g_next
          assign in_a = g_lvl[l-1].v[2*i];
          assign in_b = g_lvl[l-1].v[2*i+1];
        end
        max_star_hybrid #(.W(WX), .FRAC(FRAC)) u_ms (
          .a (in_a), .b (in_b), .y (v[i]), .fc ()
        );
      end
    end
    assign root[u] = g_lvl[MEM-1].v[0];
  end

  assign llr = llr_t'(sat(32'(root[1]) - 32'(root[0]), LLR_W));

endmodule
