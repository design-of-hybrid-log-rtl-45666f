// tb_banked_memory: four lanes over a 64-word frame in four banks. Lanes
// write their own segments in natural order, then read back at QPP-
// interleaved positions pi(l*M + x) with pi(x) = (7x + 16x^2) mod 64 while
// writing new data at interleaved positions, and finally read everything
// back in natural order. Every read is compared with a model of the frame;
// the test also confirms that the interleaved lanes hit distinct banks in
// every cycle and that some lanes really reached other lanes' banks.
`timescale 1ns/1ps
module tb_banked_memory;
  import tb_ref_pkg::*;

  localparam int P = 4, M = 16, N = P * M, W = 9;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_cross = 0;

  logic         rd_en [P], wr_en [P];
  logic [5:0]   rd_addr [P], wr_addr [P];
  logic [W-1:0] rd_data [P], wr_data [P];
  int model [N];

  banked_memory #(.P(P), .M(M), .W(W)) dut (.clk, .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data);

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check_reads();
    #1;
    for (int l = 0; l < P; l++) begin
      checks++;
      if (int'(rd_data[l]) != model[rd_addr[l]]) begin
        failures++; $display("FAIL lane %0d addr %0d: %0d expected %0d", l, rd_addr[l], rd_data[l], model[rd_addr[l]]);
      end
    end
  endtask

  initial begin
    for (int l = 0; l < P; l++) begin rd_en[l] = 0; wr_en[l] = 0; rd_addr[l] = 0; wr_addr[l] = 0; wr_data[l] = 0; end
    @(posedge clk);
    // natural-order writes
    for (int x = 0; x < M; x++) begin
      for (int l = 0; l < P; l++) begin
        int v;
        v = int'($urandom_range(511));
        wr_en[l] <= 1; wr_addr[l] <= 6'(l * M + x); wr_data[l] <= W'(v);
        model[l * M + x] = v;
      end
      @(posedge clk);
    end
    // interleaved reads, interleaved writes one position behind
    for (int x = 0; x <= M; x++) begin
      bit used [P];
      #1;
      for (int l = 0; l < P; l++) used[l] = 0;
      for (int l = 0; l < P; l++) begin
        int a;
        a = qpp_ref(l * M + x, N, 7, 16);
        rd_en[l] = (x < M); rd_addr[l] = 6'(a);
        if (x < M) begin
          checks++;
          if (used[a / M]) begin failures++; $display("FAIL bank conflict at x=%0d", x); end
          used[a / M] = 1;
          if (a / M != l) n_cross++;
        end
      end
      if (x < M) check_reads();
      for (int l = 0; l < P; l++) begin
        int a, v;
        a = qpp_ref(l * M + x - 1, N, 7, 16);
        v = int'($urandom_range(511));
        wr_en[l] = (x > 0); wr_addr[l] = 6'(a); wr_data[l] = W'(v);
      end
      @(posedge clk);
      for (int l = 0; l < P; l++) if (wr_en[l]) model[wr_addr[l]] = int'(wr_data[l]);
    end
    #1;
    for (int l = 0; l < P; l++) wr_en[l] = 0;
    // natural-order read-back
    for (int x = 0; x < M; x++) begin
      for (int l = 0; l < P; l++) begin rd_en[l] = 1; rd_addr[l] = 6'(l * M + x); end
      check_reads();
      @(posedge clk); #1;
    end
    checks++;
    if (n_cross == 0) begin failures++; $display("FAIL no lane left its own bank"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
