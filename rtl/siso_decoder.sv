// siso_decoder: soft-in soft-out Log-MAP decoder of one RSC constituent code
// over a whole frame of N bits, using the hybrid max* approximation.
//
// Operation (full-frame forward-backward schedule, this design's choice):
//   Forward pass  - the frame enters one bit per in_valid, in order k = 0..N-1
//                   (a-priori LLR, systematic and parity channel LLRs). The
//                   branch metrics and one alpha recursion step are computed
//                   per bit; alpha_k and the inputs are stored in local
//                   memories. With START_KNOWN, alpha_0 starts in state 0
//                   (the encoder starts from the all-zero state); a SISO
//                   that decodes an inner segment of a frame starts with all
//                   states equally likely (START_KNOWN = 0).
//   Backward pass - starts by itself after bit N-1 and runs one bit per clock
//                   for k = N-1..0. beta starts equal for all states (the
//                   trellis is not terminated), is updated each cycle, and
//                   with the stored alpha_k and recomputed gamma_k the LLR unit
//                   gives the a-posteriori LLR L_k. The extrinsic output is
//                   Le_k = L_k - La_k - ys_k, saturated to EXT_W bits.
//
// Interface: start (one cycle, while idle) opens a frame; in_ready is high
// during the forward pass. out_valid is high for the N cycles of the backward
// pass, with out_k, out_llr and out_ext combinational from the registered
// beta, the memories and out_k; the consumer must take one result per cycle.
// done pulses in the cycle after the last result. A frame takes N input
// cycles plus N output cycles.
module siso_decoder
  import turbo_pkg::*;
#(
  parameter int N = 1024,           // bits per frame (or segment)
  parameter bit START_KNOWN = 1'b1, // first state is the all-zero state
  localparam int AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          in_ready,
  input  logic          in_valid,
  input  ext_t          in_la,
  input  ch_t           in_ys,
  input  ch_t           in_yp,
  output logic          out_valid,
  output logic [AW-1:0] out_k,
  output llr_t          out_llr,
  output ext_t          out_ext,
  output logic          done
);

  typedef enum logic [1:0] {S_IDLE, S_FWD, S_BWD} phase_t;
  phase_t phase;

  logic [AW-1:0] k;
  sm_t alpha_q [NS];
  sm_t alpha_d [NS];
  sm_t beta_q  [NS];
  sm_t beta_d  [NS];

  // frame memories written in the forward pass
  sm_t  amem  [N][NS];
  ext_t la_m  [N];
  ch_t  ys_m  [N];
  ch_t  yp_m  [N];

  // forward datapath
  gm_t gamma_f [4];
  branch_metric_unit u_bmu_f (.la(in_la), .ys(in_ys), .yp(in_yp), .gamma(gamma_f));
  forward_metric_unit u_fwd (.alpha_in(alpha_q), .gamma(gamma_f), .alpha_out(alpha_d));

  // backward datapath
  sm_t  alpha_rd [NS];
  gm_t  gamma_b [4];
  always_comb
    for (int s = 0; s < NS; s++) alpha_rd[s] = amem[k][s];
  branch_metric_unit u_bmu_b (.la(la_m[k]), .ys(ys_m[k]), .yp(yp_m[k]), .gamma(gamma_b));
  backward_metric_unit u_bwd (.beta_in(beta_q), .gamma(gamma_b), .beta_out(beta_d));
  llr_unit u_llr (.alpha(alpha_rd), .beta(beta_q), .gamma(gamma_b), .llr(out_llr));

  assign in_ready  = (phase == S_FWD);
  assign out_valid = (phase == S_BWD);
  assign out_k     = k;
  assign out_ext   = ext_t'(sat(32'(out_llr) - 32'(la_m[k]) - 32'(ys_m[k]), EXT_W));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= S_IDLE;
      k     <= '0;
      done  <= 1'b0;
      for (int s = 0; s < NS; s++) begin
        alpha_q[s] <= '0;
        beta_q[s]  <= '0;
      end
    end else begin
      done <= 1'b0;
      case (phase)
        S_IDLE: if (start) begin
          phase <= S_FWD;
          k     <= '0;
          for (int s = 0; s < NS; s++)
            alpha_q[s] <= (s == 0 || !START_KNOWN) ? sm_t'(0) : SM_NEG_INF;
        end
        S_FWD: if (in_valid) begin
          alpha_q <= alpha_d;
          if (k == AW'(N - 1)) begin
            phase <= S_BWD;
            for (int s = 0; s < NS; s++) beta_q[s] <= '0;
          end else begin
            k <= k + 1'b1;
          end
        end
        S_BWD: begin
          beta_q <= beta_d;
          if (k == '0) begin
            phase <= S_IDLE;
            done  <= 1'b1;
          end else begin
            k <= k - 1'b1;
          end
        end
        default: phase <= S_IDLE;
      endcase
    end
  end

  // frame memories (no reset: every entry is written before it is read)
  always_ff @(posedge clk)
    if (phase == S_FWD && in_valid) begin
      for (int s = 0; s < NS; s++) amem[k][s] <= alpha_q[s];
      la_m[k] <= in_la;
      ys_m[k] <= in_ys;
      yp_m[k] <= in_yp;
    end

  assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> phase == S_FWD)
    else $error("siso_decoder: input outside the forward pass");

endmodule
