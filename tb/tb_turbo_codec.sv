// tb_turbo_codec: end-to-end test of the codec. Random frames of N = 1024
// bits go through the RTL turbo encoder, a simulated BPSK/AWGN channel and
// the RTL turbo decoder running ITER = 2 iterations. The code bits must match
// a reference encoder and the decoded bits a reference decoder with the same
// fixed-point arithmetic and the same split into P = 2 parallel lanes. The encoder loads the next frame while the decoder
// is still busy. Counts how often each mechanism occurred and fails if one
// never did: QPP steps up and down, lanes of decoder 2 reading and writing
// different memory banks in the same cycle, a non-zero de-interleaved a-priori input
// to decoder 1 (second iteration), both regions of the hybrid correction,
// saturation of extrinsic values, and encoder/decoder overlap.
`timescale 1ns/1ps
module tb_turbo_codec;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 1024, ITER = 2, FRAMES = 3;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic enc_in_valid, enc_in_bit, enc_in_ready, enc_out_valid, enc_out_bit, enc_out_last;
  logic dec_in_valid, dec_in_ready, dec_out_valid, dec_out_bit, dec_out_last, dec_busy;
  ch_t  dec_in_sym;
  logic [7:0] dec_iter_done;

  turbo_codec #(.ITER(ITER)) dut (.clk, .rst_n,
    .enc_in_valid, .enc_in_bit, .enc_in_ready, .enc_out_valid, .enc_out_bit, .enc_out_last,
    .dec_in_valid, .dec_in_sym, .dec_in_ready, .dec_out_valid, .dec_out_bit, .dec_out_last,
    .dec_busy, .dec_iter_done);

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ------------------------------------------------ mechanism counters
  int n_qpp_up = 0, n_qpp_down = 0, n_apriori = 0, n_fc_lin = 0, n_fc_step = 0;
  int n_ext_sat = 0, n_overlap = 0, n_xbank = 0;
  always @(posedge clk) if (rst_n) begin
    int d;
    if (dut.u_dec.q_up)   n_qpp_up++;
    // interleaved parallel access: lane 1 reaches into lane 0's bank
    if (dut.u_dec.d2_rdy[0] && dut.u_dec.q_pi[1] < 10'd512) n_xbank++;
    if (dut.u_dec.q_down) n_qpp_down++;
    if (dut.u_dec.d1_rdy[0] && dut.u_dec.la1[0] != 0) n_apriori++;
    if (dut.u_dec.d1_ov[0] && (dut.u_dec.d1_ext[0] == 255 || dut.u_dec.d1_ext[0] == -256)) n_ext_sat++;
    if (enc_in_valid && enc_in_ready && dec_busy) n_overlap++;
    if (dut.u_dec.d1_rdy[0]) begin
      d = int'(dut.u_dec.g_lane[1].u_dec1.u_fwd.g_state[0].u_ms.a) - int'(dut.u_dec.g_lane[1].u_dec1.u_fwd.g_state[0].u_ms.b);
      if (d < 0) d = -d;
      if (d < 12) n_fc_lin++;
      else if (d < 16) n_fc_step++;
    end
  end

  // ------------------------------------------------ frames
  bit   src  [FRAMES][];
  bit   code [FRAMES][];
  int   enc_cnt [FRAMES];

  // encoder side: load frames back to back, collect the code bits
  initial begin
    enc_in_valid = 0; enc_in_bit = 0;
    for (int f = 0; f < FRAMES; f++) begin
      src[f] = new[N]; code[f] = new[3 * N];
      foreach (src[f][k]) src[f][k] = 1'($urandom);
      enc_cnt[f] = 0;
    end
    #2 wait (rst_n);
    for (int f = 0; f < FRAMES; f++) begin
      @(posedge clk); #1;
      while (!enc_in_ready) begin @(posedge clk); #1; end
      for (int k = 0; k < N; k++) begin
        enc_in_valid <= 1; enc_in_bit <= src[f][k]; @(posedge clk);
      end
      enc_in_valid <= 0;
      while (enc_cnt[f] < 3 * N) @(posedge clk);
    end
  end

  int ef = 0;
  always @(posedge clk)
    if (enc_out_valid && ef < FRAMES) begin
      code[ef][enc_cnt[ef]] = enc_out_bit;
      enc_cnt[ef]++;
      if (enc_out_last) ef++;
    end

  // decoder side
  initial begin
    dec_in_valid = 0; dec_in_sym = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      bit p1[], p2[], dec[];
      int ys[], c1[], c2[];
      int got, nerr, berr, cerr;
      real snr;
      snr = (f == 0) ? 8.0 : 0.25 + 0.75 * f;
      while (enc_cnt[f] < 3 * N) @(posedge clk);
      // encoder output against the reference encoder
      turbo_enc_ref(N, 31, 64, src[f], p1, p2);
      cerr = 0;
      for (int k = 0; k < N; k++)
        if (code[f][3*k] != src[f][k] || code[f][3*k+1] != p1[k] || code[f][3*k+2] != p2[k]) cerr++;
      checks++;
      if (cerr != 0) begin failures++; $display("FAIL frame %0d: %0d wrong code bit triples", f, cerr); end
      // channel
      ys = new[N]; c1 = new[N]; c2 = new[N];
      for (int k = 0; k < N; k++) begin
        ys[k] = channel_llr(code[f][3*k], snr);
        c1[k] = channel_llr(code[f][3*k+1], snr);
        c2[k] = channel_llr(code[f][3*k+2], snr);
      end
      turbo_dec_ref(N, 31, 64, ITER, ys, c1, c2, dec, 2);
      #1;
      while (!dec_in_ready) begin @(posedge clk); #1; end
      for (int i = 0; i < 3 * N; i++) begin
        dec_in_valid <= 1;
        dec_in_sym <= ch_t'((i % 3 == 0) ? ys[i / 3] : (i % 3 == 1) ? c1[i / 3] : c2[i / 3]);
        @(posedge clk);
      end
      dec_in_valid <= 0;
      got = 0; nerr = 0; berr = 0;
      while (got < N) begin
        #1;
        if (dec_out_valid) begin
          checks++;
          if (dec_out_bit != dec[got] || dec_out_last != (got == N - 1)) begin
            failures++;
            if (nerr++ < 5) $display("FAIL frame %0d bit %0d", f, got);
          end
          if (dec_out_bit != src[f][got]) berr++;
          got++;
        end
        @(posedge clk);
      end
      if (f == 0) begin
        checks++;
        if (berr != 0) begin failures++; $display("FAIL %0d errors on a clean channel", berr); end
      end
      $display("frame %0d at Eb/N0 %.2f dB: %0d bit errors of %0d", f, snr, berr, N);
    end
    $display("mechanisms: qpp up %0d, qpp down %0d, a-priori to decoder 1 %0d, linear correction %0d, step correction %0d, extrinsic saturation %0d, encoder/decoder overlap %0d, cross-bank interleaved reads %0d",
             n_qpp_up, n_qpp_down, n_apriori, n_fc_lin, n_fc_step, n_ext_sat, n_overlap, n_xbank);
    checks++;
    if (n_qpp_up == 0 || n_qpp_down == 0 || n_apriori == 0 || n_fc_lin == 0 || n_fc_step == 0 ||
        n_ext_sat == 0 || n_overlap == 0 || n_xbank == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
