// tb_hard_decision: four lanes write random LLRs at QPP-permuted addresses
// (N = 40, pi(x) = (3x + 10x^2) mod 40), then
// checks that the frame comes out in natural order with the right signs,
// one bit per clock, with out_last on the final bit.
`timescale 1ns/1ps
module tb_hard_decision;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 40, P = 4, M = N / P;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_en [P], start_out, out_valid, out_bit, out_last;
  logic [5:0] wr_addr [P], out_idx;
  llr_t wr_llr [P];
  bit exp_bits [N];

  hard_decision #(.N(N), .P(P)) dut (.clk, .rst_n, .wr_en, .wr_addr, .wr_llr, .start_out,
    .out_valid, .out_bit, .out_last, .out_idx);

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int got, t0;
    start_out = 0;
    for (int l = 0; l < P; l++) begin wr_en[l] = 0; wr_addr[l] = 0; wr_llr[l] = '0; end
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk);
    // P lanes write in lock step at pi(l*M + x)
    for (int x = 0; x < M; x++) begin
      for (int l = 0; l < P; l++) begin
        int p, lv;
        p = qpp_ref(l * M + x, N, 3, 10);
        lv = int'($urandom_range(400)) - 200;
        if (l == 1 && x == 3) lv = 0;
        if (l == 2 && x == 4) lv = -1;
        exp_bits[p] = (lv >= 0);
        wr_en[l] <= 1; wr_addr[l] <= 6'(p); wr_llr[l] <= llr_t'(lv);
      end
      @(posedge clk);
    end
    for (int l = 0; l < P; l++) wr_en[l] <= 0;
    start_out <= 1; @(posedge clk); start_out <= 0;
    t0 = 0; got = 0;
    while (got < N && t0 < 3 * N) begin
      #1;
      if (out_valid) begin
        checks++;
        if (out_bit !== exp_bits[got] || int'(out_idx) != got || out_last != (got == N - 1)) begin
          failures++; $display("FAIL bit %0d: %0d expected %0d", got, out_bit, exp_bits[got]);
        end
        got++;
      end
      t0++;
      @(posedge clk);
    end
    checks++;
    if (got != N || t0 != N + 1) begin
      failures++; $display("FAIL got %0d bits in %0d cycles", got, t0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
