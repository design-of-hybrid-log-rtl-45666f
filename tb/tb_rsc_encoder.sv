// tb_rsc_encoder: random bit stream through the RSC encoder, compared with
// an explicit (7,5) shift-register model; clear must return to state 0.
`timescale 1ns/1ps
module tb_rsc_encoder;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clear, in_valid, in_bit, out_sys, out_par;
  state_t state;

  rsc_encoder dut (.clk, .rst_n, .clear, .in_valid, .in_bit, .out_sys, .out_par, .state);

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int s;
    clear = 0; in_valid = 0; in_bit = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    s = 0;
    for (int i = 0; i < 2000; i++) begin
      bit u, v;
      u = 1'($urandom); v = ($urandom_range(3) != 0);
      if (i == 1000) begin
        clear <= 1; @(posedge clk); clear <= 0; s = 0;
      end
      in_valid <= v; in_bit <= u;
      #1;
      checks++;
      if (out_sys != u || int'(out_par) != enc_par(s, u) || int'(state) != s) begin
        failures++; $display("FAIL i=%0d u=%0d par=%0d state=%0d ref %0d", i, u, out_par, state, s);
      end
      @(posedge clk);
      if (v) s = enc_next(s, u);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
