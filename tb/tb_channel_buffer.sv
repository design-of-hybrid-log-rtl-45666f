// tb_channel_buffer: streams two frames of 3*N random soft values and reads
// all three memories back through the four lanes' read ports (parity 2 at
// QPP-interleaved addresses, pi(x) = (x + 4x^2) mod 16); checks in_ready/full and
// that release accepts the next frame.
`timescale 1ns/1ps
module tb_channel_buffer;
  import turbo_pkg::*;

  localparam int N = 16, P = 4, M = N / P;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, full, release_frame, rd_en;
  ch_t in_sym, ys [P], p1 [P], p2 [P];
  logic [3:0] ys_addr [P], p1_addr [P], p2_addr [P];
  int ref_v [3*N];

  channel_buffer #(.N(N), .P(P)) dut (.clk, .rst_n, .in_valid, .in_sym, .in_ready, .full,
    .release_frame, .rd_en, .ys_addr, .ys, .p1_addr, .p1, .p2_addr, .p2);

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in_valid = 0; in_sym = '0; release_frame = 0; rd_en = 0;
    for (int l = 0; l < P; l++) begin ys_addr[l] = 4'(l * M); p1_addr[l] = 4'(l * M); p2_addr[l] = 4'(l * M); end
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk);
    for (int f = 0; f < 2; f++) begin
      checks++; if (!in_ready || full) begin failures++; $display("FAIL not ready"); end
      for (int i = 0; i < 3 * N; i++) begin
        ref_v[i] = int'($urandom_range(127)) - 64;
        in_valid <= 1; in_sym <= ch_t'(ref_v[i]);
        @(posedge clk);
        if (i % 5 == 4) begin in_valid <= 0; @(posedge clk); end  // gaps
      end
      in_valid <= 0;
      @(posedge clk); #1;
      checks++; if (!full || in_ready) begin failures++; $display("FAIL not full"); end
      // a value offered while full must be ignored
      in_valid <= 1; in_sym <= 7'sd5; @(posedge clk); in_valid <= 0;
      // lane l reads segment l (systematic in natural order, parity 1
      // backwards inside the segment, parity 2 interleaved over the frame)
      rd_en = 1;
      for (int x = 0; x < M; x++) begin
        for (int l = 0; l < P; l++) begin
          ys_addr[l] = 4'(l * M + x);
          p1_addr[l] = 4'(l * M + M - 1 - x);
          p2_addr[l] = 4'(tb_ref_pkg::qpp_ref(l * M + x, N, 1, 4));
        end
        #1;
        for (int l = 0; l < P; l++) begin
          checks += 3;
          if (int'(ys[l]) != ref_v[3*(l*M + x)])             begin failures++; $display("FAIL ys lane %0d x %0d", l, x); end
          if (int'(p1[l]) != ref_v[3*(l*M + M - 1 - x) + 1]) begin failures++; $display("FAIL p1 lane %0d x %0d", l, x); end
          if (int'(p2[l]) != ref_v[3*int'(p2_addr[l]) + 2])  begin failures++; $display("FAIL p2 lane %0d x %0d", l, x); end
        end
      end
      rd_en = 0;
      release_frame <= 1; @(posedge clk); release_frame <= 0; @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
