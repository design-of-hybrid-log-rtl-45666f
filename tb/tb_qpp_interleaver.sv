// tb_qpp_interleaver: walks the recursive generator up through a whole block
// and back down, comparing every address with (F1*x + F2*x^2) mod N and
// checking that the addresses form a permutation. Runs the default
// N = 1024 (F1 = 31, F2 = 64) and the smallest LTE size N = 40 (3, 10).
`timescale 1ns/1ps
module tb_qpp_interleaver;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, up, down;
  logic [9:0] x, pi;
  logic [5:0] xs, pis;

  qpp_interleaver dut (.clk, .rst_n, .start, .up, .down, .x, .pi);
  qpp_interleaver #(.N(40), .F1(3), .F2(10)) dut40 (.clk, .rst_n, .start, .up, .down, .x(xs), .pi(pis));

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic walk(int n, int f1, int f2, bit big);
    bit seen [];
    seen = new[n];
    start <= 1; up <= 0; down <= 0;
    @(posedge clk); start <= 0; up <= 1;
    for (int i = 0; i < n; i++) begin
      int xv, pv;
      if (i == n - 1) up <= 0;
      #1;
      xv = big ? int'(x) : int'(xs); pv = big ? int'(pi) : int'(pis);
      checks++;
      if (xv != i || pv != qpp_ref(i, n, f1, f2) || seen[pv]) begin
        failures++; $display("FAIL up N=%0d x=%0d pi=%0d", n, xv, pv);
      end
      seen[pv] = 1;
      @(posedge clk);
    end
    down <= 1;
    for (int i = n - 1; i >= 0; i--) begin
      int xv, pv;
      if (i == 0) down <= 0;
      #1;
      xv = big ? int'(x) : int'(xs); pv = big ? int'(pi) : int'(pis);
      checks++;
      if (xv != i || pv != qpp_ref(i, n, f1, f2)) begin
        failures++; $display("FAIL down N=%0d x=%0d pi=%0d", n, xv, pv);
      end
      @(posedge clk);
    end
  endtask

  initial begin
    start = 0; up = 0; down = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    walk(1024, 31, 64, 1);
    walk(40, 3, 10, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
