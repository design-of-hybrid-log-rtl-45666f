// tb_turbo_encoder: two random frames of N = 1024 bits through the turbo
// encoder at its default parameters; the 3N output bits are compared with a
// reference that interleaves with the direct QPP formula. Checks the cycle
// counts: 3N output cycles directly after the N load cycles.
`timescale 1ns/1ps
module tb_turbo_encoder;
  import tb_ref_pkg::*;

  localparam int N = 1024;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_bit, in_ready, out_valid, out_bit, out_last;

  turbo_encoder dut (.clk, .rst_n, .in_valid, .in_bit, .in_ready, .out_valid, .out_bit, .out_last);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in_valid = 0; in_bit = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      bit u[], p1[], p2[];
      int got, nerr, wait_c, t0;
      u = new[N];
      foreach (u[k]) u[k] = 1'($urandom);
      turbo_enc_ref(N, 31, 64, u, p1, p2);
      wait_c = 0;
      while (!in_ready) begin @(posedge clk); #1; wait_c++; end
      for (int k = 0; k < N; k++) begin
        in_valid <= 1; in_bit <= u[k]; @(posedge clk);
      end
      in_valid <= 0;
      got = 0; nerr = 0; t0 = 0;
      while (got < 3 * N && t0 < 4 * N) begin
        #1;
        if (out_valid) begin
          bit e;
          case (got % 3)
            0: e = u[got / 3];
            1: e = p1[got / 3];
            default: e = p2[got / 3];
          endcase
          checks++;
          if (out_bit != e || out_last != (got == 3 * N - 1)) begin
            failures++;
            if (nerr++ < 5) $display("FAIL frame %0d code bit %0d", f, got);
          end
          got++;
        end
        t0++;
        @(posedge clk);
      end
      checks++;
      if (got != 3 * N || t0 != 3 * N) begin
        failures++; $display("FAIL %0d code bits, last at cycle %0d", got, t0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
