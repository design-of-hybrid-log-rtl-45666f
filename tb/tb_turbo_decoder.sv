// tb_turbo_decoder: random frames of N = 1024 bits are encoded by a
// reference turbo encoder, sent over a simulated BPSK/AWGN channel and
// decoded with ITER = 3 iterations by P = 4 parallel SISO lanes of M = 256
// bits per constituent decoder. The decoded bits must equal those of a
// procedural reference turbo decoder with the same fixed-point arithmetic
// and segmentation, the output latency must be 3 + ITER*(4M+4) cycles
// after the last input,
// and the decoder must accept the next frame afterwards. Bit errors against
// the transmitted data are reported per frame.
`timescale 1ns/1ps
module tb_turbo_decoder;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 1024, ITER = 3, P = 4, M = N / P;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid, out_bit, out_last, busy;
  ch_t in_sym;
  logic [7:0] iter_done;

  turbo_decoder #(.ITER(ITER), .P(P)) dut (.clk, .rst_n, .in_valid, .in_sym, .in_ready,
    .out_valid, .out_bit, .out_last, .busy, .iter_done);

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int max_iter_seen = 0;
  always @(posedge clk) if (rst_n && int'(iter_done) > max_iter_seen) max_iter_seen = int'(iter_done);

  initial begin
    in_valid = 0; in_sym = '0;
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk);
    for (int f = 0; f < 3; f++) begin
      bit u[], p1[], p2[], dec[];
      int ys[], c1[], c2[];
      int got, nerr, berr, t, t_first;
      real snr;
      snr = 0.5 + 0.75 * f;
      u = new[N]; ys = new[N]; c1 = new[N]; c2 = new[N];
      foreach (u[k]) u[k] = 1'($urandom);
      turbo_enc_ref(N, 31, 64, u, p1, p2);
      foreach (u[k]) begin
        ys[k] = channel_llr(u[k], snr);
        c1[k] = channel_llr(p1[k], snr);
        c2[k] = channel_llr(p2[k], snr);
      end
      turbo_dec_ref(N, 31, 64, ITER, ys, c1, c2, dec, P);
      #1;
      while (!in_ready) begin @(posedge clk); #1; end
      for (int i = 0; i < 3 * N; i++) begin
        in_valid <= 1;
        in_sym <= ch_t'((i % 3 == 0) ? ys[i / 3] : (i % 3 == 1) ? c1[i / 3] : c2[i / 3]);
        @(posedge clk);
      end
      in_valid <= 0;
      got = 0; nerr = 0; berr = 0; t = 0; t_first = -1;
      while (got < N && t < ITER * (4 * M + 4) + 2 * N) begin
        #1; t++;
        if (out_valid) begin
          if (t_first < 0) t_first = t;
          checks++;
          if (out_bit != dec[got] || out_last != (got == N - 1)) begin
            failures++;
            if (nerr++ < 5) $display("FAIL frame %0d bit %0d: %0d, reference %0d", f, got, out_bit, dec[got]);
          end
          if (out_bit != u[got]) berr++;
          got++;
        end
        @(posedge clk);
      end
      checks++;
      if (got != N || t_first != 3 + ITER * (4 * M + 4)) begin
        failures++; $display("FAIL frame %0d: %0d bits, first after %0d cycles", f, got, t_first);
      end
      $display("frame %0d at Eb/N0 %.2f dB: %0d bit errors of %0d, latency %0d cycles",
               f, snr, berr, N, t_first);
    end
    checks++;
    if (max_iter_seen != ITER) begin failures++; $display("FAIL iterations seen %0d", max_iter_seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
