// tb_siso_decoder: decodes random (7,5)-encoded frames sent over a simulated
// BPSK/AWGN channel, with random a-priori LLRs, and compares every
// a-posteriori and extrinsic output with a procedural forward-backward
// reference. A second instance with START_KNOWN = 0 (the inner segment of
// a parallel decoder, all start states equally likely) decodes the same
// input and is compared with the reference run from a uniform start.
// Checks the schedule: N input cycles, N output cycles in
// order N-1..0, done one cycle later.
`timescale 1ns/1ps
module tb_siso_decoder;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 64;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, in_ready, in_valid, out_valid, done;
  ext_t in_la, out_ext;
  ch_t in_ys, in_yp;
  logic [5:0] out_k;
  llr_t out_llr, out_llr_u;
  ext_t out_ext_u;
  logic out_valid_u, in_ready_u, done_u;
  logic [5:0] out_k_u;

  siso_decoder #(.N(N)) dut (.clk, .rst_n, .start, .in_ready, .in_valid, .in_la, .in_ys,
    .in_yp, .out_valid, .out_k, .out_llr, .out_ext, .done);
  siso_decoder #(.N(N), .START_KNOWN(1'b0)) dut_u (.clk, .rst_n, .start, .in_ready(in_ready_u),
    .in_valid, .in_la, .in_ys, .in_yp, .out_valid(out_valid_u), .out_k(out_k_u),
    .out_llr(out_llr_u), .out_ext(out_ext_u), .done(done_u));

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    start = 0; in_valid = 0; in_la = '0; in_ys = '0; in_yp = '0;
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk);
    for (int f = 0; f < 6; f++) begin
      int la[], ys[], yp[], llr[], ext[], llr_u[], ext_u[];
      int s, cyc, nerr, herr;
      bit ub[];
      real snr;
      la = new[N]; ys = new[N]; yp = new[N]; ub = new[N];
      snr = (f < 3) ? 0.5 * f : 4.0;
      s = 0;
      for (int k = 0; k < N; k++) begin
        bit u;
        u = 1'($urandom);
        ub[k] = u;
        ys[k] = channel_llr(u, snr);
        yp[k] = channel_llr(enc_par(s, u) != 0, snr);
        s = enc_next(s, u);
        la[k] = (f % 2) ? int'($urandom_range(160)) - 80 : 0;
        if (f == 5 && k < 4) la[k] = (k % 2) ? 255 : -256;   // extremes
      end
      siso_ref(N, la, ys, yp, llr, ext);
      siso_ref(N, la, ys, yp, llr_u, ext_u, 1'b0);
      start <= 1; @(posedge clk); start <= 0;
      for (int k = 0; k < N; k++) begin
        #1;
        checks++;
        if (!in_ready) begin failures++; $display("FAIL not ready at %0d", k); end
        in_valid <= 1; in_la <= ext_t'(la[k]); in_ys <= ch_t'(ys[k]); in_yp <= ch_t'(yp[k]);
        @(posedge clk);
      end
      in_valid <= 0;
      cyc = 0; nerr = 0; herr = 0;
      for (int k = N - 1; k >= 0; k--) begin
        #1;
        checks++;
        if (!out_valid || int'(out_k) != k || int'(out_llr) != llr[k] || int'(out_ext) != ext[k]) begin
          failures++;
          if (nerr++ < 5)
            $display("FAIL f=%0d k=%0d valid=%0d llr=%0d/%0d ext=%0d/%0d", f, out_k, out_valid,
                     out_llr, llr[k], out_ext, ext[k]);
        end
        checks++;
        if (!out_valid_u || int'(out_llr_u) != llr_u[k] || int'(out_ext_u) != ext_u[k]) begin
          failures++;
          if (nerr++ < 5) $display("FAIL uniform start f=%0d k=%0d llr=%0d/%0d", f, k, out_llr_u, llr_u[k]);
        end
        if ((out_llr >= 0) != ub[k]) herr++;
        @(posedge clk);
      end
      // at 4 dB without a-priori input the decisions must be error free
      if (f == 4) begin
        checks++;
        if (herr != 0) begin failures++; $display("FAIL %0d bit errors at 4 dB", herr); end
      end
      #1;
      checks++;
      if (!done || out_valid) begin failures++; $display("FAIL done not at 2N+1"); end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
