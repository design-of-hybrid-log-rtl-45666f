// tb_llr_unit: random alpha, beta and branch inputs; the LLR is compared with
// a reference that forms the branch sums over the (7,5) trellis and merges
// them pairwise with the floating-point-derived max*.
`timescale 1ns/1ps
module tb_llr_unit;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  ext_t la; ch_t ys, yp; gm_t gamma [4];
  sm_t al [NS]; sm_t be [NS]; llr_t llr;
  int checks = 0, failures = 0;

  branch_metric_unit u_bmu (.la, .ys, .yp, .gamma);
  llr_unit dut (.alpha(al), .beta(be), .gamma, .llr);

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int lv, sv, pv, a[4], b[4], e;
      lv = int'($urandom_range(511)) - 256;
      sv = int'($urandom_range(127)) - 64;
      pv = int'($urandom_range(127)) - 64;
      for (int s = 0; s < 4; s++) begin
        a[s] = int'($urandom_range(400)) - 200;
        b[s] = int'($urandom_range(400)) - 200;
        al[s] = sm_t'(a[s]); be[s] = sm_t'(b[s]);
      end
      la = ext_t'(lv); ys = ch_t'(sv); yp = ch_t'(pv);
      #1;
      e = llr_ref(a, b, lv, sv, pv);
      checks++;
      if (int'(llr) != e) begin
        failures++;
        $display("FAIL i=%0d llr=%0d expected %0d", i, llr, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
