// tb_forward_metric_unit: random state metrics and branch inputs; the next
// alpha vector is compared with a reference recursion over the (7,5) trellis
// written with explicit shift-register taps.
`timescale 1ns/1ps
module tb_forward_metric_unit;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  ext_t la; ch_t ys, yp; gm_t gamma [4];
  sm_t ain [NS]; sm_t aout [NS];
  int checks = 0, failures = 0;

  branch_metric_unit u_bmu (.la, .ys, .yp, .gamma);
  forward_metric_unit dut (.alpha_in(ain), .gamma, .alpha_out(aout));

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int lv, sv, pv, a[4], e[4];
      lv = int'($urandom_range(511)) - 256;
      sv = int'($urandom_range(127)) - 64;
      pv = int'($urandom_range(127)) - 64;
      for (int s = 0; s < 4; s++) a[s] = (i < 10) ? ((s == 0) ? 0 : -512)
                                                  : int'($urandom_range(400)) - 200;
      la = ext_t'(lv); ys = ch_t'(sv); yp = ch_t'(pv);
      for (int s = 0; s < 4; s++) ain[s] = sm_t'(a[s]);
      #1;
      fwd_ref(a, lv, sv, pv, e);
      for (int s = 0; s < 4; s++) begin
        checks++;
        if (int'(aout[s]) != e[s]) begin
          failures++;
          $display("FAIL i=%0d state %0d: %0d expected %0d", i, s, aout[s], e[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
