// turbo_decoder: iterative turbo decoder with two constituent SISO decoders
// joined by a QPP interleaver and de-interleaver, each constituent decoder
// split into P parallel SISO lanes that work on segments of N/P bits.
//
// A frame of 3*N channel LLRs is first collected by channel_buffer. Each
// iteration then has two half-iterations:
//   Decoder 1 reads, in natural order k, the systematic LLR ys[k], parity 1
//     and the a-priori LLR La1[k] (zero in the first iteration, otherwise the
//     de-interleaved extrinsic output of decoder 2). Its extrinsic output
//     Le1[k] = L1[k] - La1[k] - ys[k] is written to the extrinsic memory at k.
//   Decoder 2 reads, in interleaved order, ys[pi(k)], parity 2 at k and
//     La2[k] = Le1[pi(k)]. Its extrinsic output Le2 is written back at pi(k),
//     which de-interleaves it for the next iteration. In the last iteration
//     its a-posteriori LLR L2 goes to hard_decision, which stores the bit at
//     pi(k) and then delivers the frame in natural order.
// The subtractions that form the extrinsic values (the adders between the
// decoders and the interleavers) sit at the SISO outputs.
//
// Parallel lanes: lane j of a decoder handles positions j*M .. j*M+M-1
// (M = N/P) and all lanes run in lock step, so a half-iteration takes 2M
// cycles instead of 2N. Every memory is split into P banks of M words
// (banked_memory). In natural order lane j only touches bank j; in
// interleaved order lane j touches bank pi(j*M+x) / M, and the QPP
// permutation guarantees that these banks differ for all lanes in every
// cycle, so no lane ever waits. One recursive QPP generator per lane,
// started at j*M, produces these addresses on the fly; the generators step
// up while decoder 2 reads its inputs and down while it writes its results.
// Lane 0 of each decoder starts from the known all-zero encoder state; the
// other lanes start their forward recursion with all states equally likely.
// One extrinsic memory serves both directions: a SISO has consumed and
// stored all of its a-priori input before it writes the first result.
//
// Interface: serial channel LLRs enter through in_valid/in_sym/in_ready;
// decoded bits leave through out_valid/out_bit/out_last in natural order.
// Timing: per iteration 2 * (1 + 2M + 1) clock cycles, the first output bit
// 3 + ITER*(4M+4) cycles after the last input, then one bit per cycle.
module turbo_decoder
  import turbo_pkg::*;
#(
  parameter int N    = 1024,  // frame length
  parameter int F1   = 31,    // QPP coefficients
  parameter int F2   = 64,
  parameter int ITER = 1,     // decoding iterations per frame
  parameter int P    = 2,     // parallel SISO lanes per constituent decoder
  localparam int AW = $clog2(N),
  localparam int M  = N / P,
  localparam int MW = (M > 1) ? $clog2(M) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  ch_t           in_sym,
  output logic          in_ready,
  output logic          out_valid,
  output logic          out_bit,
  output logic          out_last,
  output logic          busy,
  output logic [7:0]    iter_done   // iterations finished on the current frame
);

  typedef enum logic [2:0] {
    T_LOAD, T_D1_START, T_D1_RUN, T_D2_START, T_D2_RUN, T_OUT
  } tstate_t;
  tstate_t st;

  logic [MW-1:0] xloc;      // decoder 1 feed position inside a segment
  logic          first_it;
  logic          last_it;

  // ------------------------------------------------------ interleaver
  logic q_start, q_up, q_down;
  logic [AW-1:0] q_x [P], q_pi [P];

  for (genvar j = 0; j < P; j++) begin : g_qpp
    qpp_interleaver #(.N(N), .F1(F1), .F2(F2), .X0(j * M)) u_qpp (
      .clk, .rst_n, .start(q_start), .up(q_up), .down(q_down), .x(q_x[j]), .pi(q_pi[j])
    );
  end

  // ---------------------------------------------------------- decoders
  // decoder 1's a-posteriori LLR is not needed: only its extrinsic part
  // is passed on, and the hard decision is taken after decoder 2.
  logic          d1_rdy [P], d1_ov [P], d1_done [P];
  logic          d2_rdy [P], d2_ov [P], d2_done [P];
  logic [MW-1:0] d1_k [P], d2_k [P];
  llr_t          d1_llr [P], d2_llr [P];
  ext_t          d1_ext [P], d2_ext [P];
  ext_t          la1 [P], ext_rd [P];
  ch_t           ys_rd [P], p1_rd [P], p2_rd [P];
  logic d1_start, d2_start;

  for (genvar j = 0; j < P; j++) begin : g_lane
    assign la1[j] = first_it ? ext_t'(0) : ext_rd[j];

    siso_decoder #(.N(M), .START_KNOWN(j == 0)) u_dec1 (
      .clk, .rst_n, .start(d1_start), .in_ready(d1_rdy[j]),
      .in_valid(d1_rdy[j]), .in_la(la1[j]), .in_ys(ys_rd[j]), .in_yp(p1_rd[j]),
      .out_valid(d1_ov[j]), .out_k(d1_k[j]), .out_llr(d1_llr[j]), .out_ext(d1_ext[j]),
      .done(d1_done[j])
    );

    siso_decoder #(.N(M), .START_KNOWN(j == 0)) u_dec2 (
      .clk, .rst_n, .start(d2_start), .in_ready(d2_rdy[j]),
      .in_valid(d2_rdy[j]), .in_la(ext_rd[j]), .in_ys(ys_rd[j]), .in_yp(p2_rd[j]),
      .out_valid(d2_ov[j]), .out_k(d2_k[j]), .out_llr(d2_llr[j]), .out_ext(d2_ext[j]),
      .done(d2_done[j])
    );
  end

  // ------------------------------------------- addresses of the lanes
  logic          in_d2;
  logic          rd_en, ext_rd_en [P];
  logic [AW-1:0] nat_addr [P];   // natural position j*M + xloc
  logic [AW-1:0] ys_addr [P], p1_addr [P], p2_addr [P], ext_ra [P];
  logic          ext_we [P];
  logic [AW-1:0] ext_wa [P];
  logic [EXT_W-1:0] ext_wd [P], ext_rdata [P];
  logic          hd_we [P];

  assign in_d2 = (st == T_D2_RUN);
  assign rd_en = d1_rdy[0] || d2_rdy[0];

  always_comb
    for (int j = 0; j < P; j++) begin
      nat_addr[j]  = AW'(j * M) + AW'(xloc);
      ys_addr[j]   = in_d2 ? q_pi[j] : nat_addr[j];
      p1_addr[j]   = nat_addr[j];
      p2_addr[j]   = q_x[j];
      ext_rd_en[j] = (d1_rdy[0] && !first_it) || d2_rdy[0];
      ext_ra[j]    = in_d2 ? q_pi[j] : nat_addr[j];
      ext_rd[j]    = ext_t'(ext_rdata[j]);
      // decoder 1 writes in natural order, decoder 2 at pi(k)
      ext_we[j]    = d1_ov[j] || d2_ov[j];
      ext_wa[j]    = d1_ov[j] ? AW'(j * M) + AW'(d1_k[j]) : q_pi[j];
      ext_wd[j]    = d1_ov[j] ? d1_ext[j] : d2_ext[j];
      hd_we[j]     = d2_ov[j] && last_it;
    end

  // ------------------------------------------------------------ memories
  logic frame_full, release_frame;

  channel_buffer #(.N(N), .P(P)) u_buf (
    .clk, .rst_n, .in_valid, .in_sym, .in_ready,
    .full(frame_full), .release_frame, .rd_en,
    .ys_addr, .ys(ys_rd), .p1_addr, .p1(p1_rd), .p2_addr, .p2(p2_rd)
  );

  banked_memory #(.P(P), .M(M), .W(EXT_W)) u_ext (
    .clk, .rd_en(ext_rd_en), .rd_addr(ext_ra), .rd_data(ext_rdata),
    .wr_en(ext_we), .wr_addr(ext_wa), .wr_data(ext_wd)
  );

  // ------------------------------------------------------ hard decision
  logic hd_start, hd_last;
  hard_decision #(.N(N), .P(P)) u_hd (
    .clk, .rst_n,
    .wr_en(hd_we), .wr_addr(q_pi), .wr_llr(d2_llr),
    .start_out(hd_start), .out_valid, .out_bit, .out_last(hd_last), .out_idx()
  );
  assign out_last = hd_last;

  // ---------------------------------------------------------- control
  assign d1_start = (st == T_D1_START);
  assign d2_start = (st == T_D2_START);
  assign q_start  = (st == T_D2_START);
  assign q_up     = d2_rdy[0] && (q_x[0] != AW'(M - 1));
  assign q_down   = d2_ov[0]  && (q_x[0] != '0);
  assign hd_start = d2_done[0] && last_it;
  assign release_frame = hd_last;
  assign busy     = (st != T_LOAD);
  assign first_it = (iter_done == 8'd0);
  assign last_it  = (iter_done == 8'(ITER - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= T_LOAD;
      xloc      <= '0;
      iter_done <= '0;
    end else begin
      case (st)
        T_LOAD:     if (frame_full) begin
                      st        <= T_D1_START;
                      iter_done <= '0;
                    end
        T_D1_START: begin
                      st   <= T_D1_RUN;
                      xloc <= '0;
                    end
        T_D1_RUN:   begin
                      if (d1_rdy[0] && xloc != MW'(M - 1)) xloc <= xloc + 1'b1;
                      if (d1_done[0]) st <= T_D2_START;
                    end
        T_D2_START: st <= T_D2_RUN;
        T_D2_RUN:   if (d2_done[0]) begin
                      iter_done <= iter_done + 1'b1;
                      st <= last_it ? T_OUT : T_D1_START;
                    end
        T_OUT:      if (hd_last) st <= T_LOAD;
        default:    st <= T_LOAD;
      endcase
    end
  end

  // all lanes in lock step, and the interleavers in step with decoder 2
  for (genvar j = 0; j < P; j++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
      d2_ov[j] |-> q_x[j] == AW'(j * M) + AW'(d2_k[j]))
      else $error("turbo_decoder: interleaver out of step with lane %0d", j);
    assert property (@(posedge clk) disable iff (!rst_n)
      d1_ov[j] == d1_ov[0] && d2_ov[j] == d2_ov[0])
      else $error("turbo_decoder: lane %0d out of lock step", j);
  end

endmodule
