// tb_turbo_codec_full: the codec at its default configuration (N = 1024,
// F1 = 31, F2 = 64, one iteration, two parallel SISO lanes) over the bit-error-rate workload: Eb/N0
// from 0 to 2.5 dB in steps of 0.5 dB, FRAMES frames per point. Each frame
// is encoded by the RTL encoder (checked against a reference encoder), sent
// over a simulated BPSK/AWGN channel and decoded by the RTL decoder, whose
// output must equal a reference decoder bit for bit. The measured BER per
// point is printed; the BER at 2.5 dB must not exceed the one at 0 dB.
`timescale 1ns/1ps
module tb_turbo_codec_full;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 1024, FRAMES = 20, POINTS = 6;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic enc_in_valid, enc_in_bit, enc_in_ready, enc_out_valid, enc_out_bit, enc_out_last;
  logic dec_in_valid, dec_in_ready, dec_out_valid, dec_out_bit, dec_out_last, dec_busy;
  ch_t  dec_in_sym;
  logic [7:0] dec_iter_done;

  turbo_codec dut (.clk, .rst_n,
    .enc_in_valid, .enc_in_bit, .enc_in_ready, .enc_out_valid, .enc_out_bit, .enc_out_last,
    .dec_in_valid, .dec_in_sym, .dec_in_ready, .dec_out_valid, .dec_out_bit, .dec_out_last,
    .dec_busy, .dec_iter_done);

  initial begin
    repeat (FRAMES * POINTS * 20000 + 1000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int errs [POINTS];
    enc_in_valid = 0; enc_in_bit = 0; dec_in_valid = 0; dec_in_sym = '0;
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk);
    for (int pt = 0; pt < POINTS; pt++) begin
      real snr;
      snr = 0.5 * pt;
      errs[pt] = 0;
      for (int f = 0; f < FRAMES; f++) begin
        bit u[], p1[], p2[], code[], dec[];
        int ys[], c1[], c2[];
        int got, nerr, cerr;
        u = new[N]; code = new[3 * N];
        foreach (u[k]) u[k] = 1'($urandom);
        // encode
        #1;
        while (!enc_in_ready) begin @(posedge clk); #1; end
        got = 0;
        for (int k = 0; k < N; k++) begin
          enc_in_valid <= 1; enc_in_bit <= u[k]; @(posedge clk);
        end
        enc_in_valid <= 0;
        while (got < 3 * N) begin
          #1;
          if (enc_out_valid) begin code[got] = enc_out_bit; got++; end
          @(posedge clk);
        end
        turbo_enc_ref(N, 31, 64, u, p1, p2);
        cerr = 0;
        for (int k = 0; k < N; k++)
          if (code[3*k] != u[k] || code[3*k+1] != p1[k] || code[3*k+2] != p2[k]) cerr++;
        checks++;
        if (cerr != 0) begin failures++; $display("FAIL %0d wrong code bit triples", cerr); end
        // channel
        ys = new[N]; c1 = new[N]; c2 = new[N];
        for (int k = 0; k < N; k++) begin
          ys[k] = channel_llr(code[3*k], snr);
          c1[k] = channel_llr(code[3*k+1], snr);
          c2[k] = channel_llr(code[3*k+2], snr);
        end
        turbo_dec_ref(N, 31, 64, 1, ys, c1, c2, dec, 2);
        // decode
        #1;
        while (!dec_in_ready) begin @(posedge clk); #1; end
        for (int i = 0; i < 3 * N; i++) begin
          dec_in_valid <= 1;
          dec_in_sym <= ch_t'((i % 3 == 0) ? ys[i / 3] : (i % 3 == 1) ? c1[i / 3] : c2[i / 3]);
          @(posedge clk);
        end
        dec_in_valid <= 0;
        got = 0; nerr = 0;
        while (got < N) begin
          #1;
          if (dec_out_valid) begin
            checks++;
            if (dec_out_bit != dec[got] || dec_out_last != (got == N - 1)) begin
              failures++;
              if (nerr++ < 5) $display("FAIL point %0d frame %0d bit %0d", pt, f, got);
            end
            if (dec_out_bit != u[got]) errs[pt]++;
            got++;
          end
          @(posedge clk);
        end
      end
      $display("Eb/N0 %.1f dB: %0d bit errors in %0d bits, BER %.2e", snr, errs[pt],
               FRAMES * N, real'(errs[pt]) / (FRAMES * N));
    end
    checks++;
    if (errs[POINTS-1] > errs[0]) begin failures++; $display("FAIL BER does not fall with Eb/N0"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
