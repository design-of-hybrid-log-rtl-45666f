// tb_max_star_hybrid: checks the hybrid max* unit against the correction
// term evaluated in floating point, over an exhaustive sweep of |a-b| and
// random operands, and checks that the result stays within 0.3 of the exact
// ln(e^a + e^b). Counts how often each correction region was used.
`timescale 1ns/1ps
module tb_max_star_hybrid;
  import tb_ref_pkg::*;

  localparam int W = 12;
  logic signed [W-1:0] a, b, y;
  logic [3:0] fc;
  int checks = 0, failures = 0;
  int n_lin = 0, n_step = 0, n_zero = 0;

  max_star_hybrid #(.W(W), .FRAC(3)) dut (.a, .b, .y, .fc);

  task automatic check(int av, int bv);
    int exp_y, d;
    real exact;
    a = W'(av); b = W'(bv);
    #1;
    exp_y = maxstar_ref(av, bv);
    d = (av > bv) ? av - bv : bv - av;
    checks++;
    if (int'(y) != exp_y) begin
      failures++;
      $display("FAIL a=%0d b=%0d y=%0d expected %0d", av, bv, y, exp_y);
    end
    exact = $ln($exp(av / 8.0) + $exp(bv / 8.0));
    if (d < 200) begin
      checks++;
      if ((y / 8.0 - exact) > 0.3 || (exact - y / 8.0) > 0.3) begin
        failures++;
        $display("FAIL accuracy a=%0d b=%0d y=%0d exact %f", av, bv, y, exact * 8.0);
      end
    end
    if (fc != 0 && d < 12) n_lin++;
    else if (fc != 0) n_step++;
    else n_zero++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // exhaustive over the difference, both orders
    for (int d = 0; d < 80; d++) begin
      check(37, 37 - d);
      check(-100 - d, -100);
    end
    // points of the correction term worked by hand (Q3):
    // x=0 -> 0.693 -> 6, x=1.5 -> 0.0847 -> 1, x=2 -> 0.042 -> 0
    a = 0; b = 0; #1; checks++; if (y != 6)  begin failures++; $display("FAIL x=0"); end
    a = 12; b = 0; #1; checks++; if (y != 13) begin failures++; $display("FAIL x=1.5"); end
    a = 16; b = 0; #1; checks++; if (y != 16) begin failures++; $display("FAIL x=2"); end
    for (int i = 0; i < 2000; i++)
      check(int'($urandom_range(1200)) - 600, int'($urandom_range(1200)) - 600);
    checks++;
    if (n_lin == 0 || n_step == 0 || n_zero == 0) begin
      failures++;
      $display("FAIL a correction region was never used: %0d %0d %0d", n_lin, n_step, n_zero);
    end
    $display("linear region %0d, step region %0d, no correction %0d", n_lin, n_step, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
