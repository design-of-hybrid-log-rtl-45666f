// tb_branch_metric_unit: random a-priori and channel LLRs, compared with
// floor((xs*(La+ys) + xp*yp)/2) for all four labels.
`timescale 1ns/1ps
module tb_branch_metric_unit;
  import turbo_pkg::*;
  import tb_ref_pkg::*;

  ext_t la; ch_t ys, yp; gm_t gamma [4];
  int checks = 0, failures = 0;

  branch_metric_unit dut (.la, .ys, .yp, .gamma);

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int lv, sv, pv;
      lv = int'($urandom_range(511)) - 256;
      sv = int'($urandom_range(127)) - 64;
      pv = int'($urandom_range(127)) - 64;
      if (i == 0) begin lv = 255; sv = 63; pv = 63; end
      if (i == 1) begin lv = -256; sv = -64; pv = -64; end
      la = ext_t'(lv); ys = ch_t'(sv); yp = ch_t'(pv);
      #1;
      for (int g = 0; g < 4; g++) begin
        checks++;
        if (int'(gamma[g]) != gamma_ref(lv, sv, pv, g >> 1, g & 1)) begin
          failures++;
          $display("FAIL la=%0d ys=%0d yp=%0d g%0d=%0d", lv, sv, pv, g, gamma[g]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
