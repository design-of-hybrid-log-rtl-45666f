// banked_memory: frame memory split into P banks of M words for P parallel
// SISO lanes.
//
// A word at frame address a (0 .. P*M-1) lives in bank a / M at offset
// a mod M. Each bank has one read and one write port. In a cycle every lane
// may read one word and write one word anywhere in the frame; a crossbar
// routes each lane's request to the bank that holds the address and the
// read data back to the lane. This works only if no two active lanes hit
// the same bank in the same cycle. Lanes that walk their own segments in
// natural order (lane j at j*M + x) satisfy this trivially; lanes that walk
// QPP-interleaved positions pi(j*M + x) satisfy it because a quadratic
// permutation polynomial interleaver is contention-free for any P that
// divides N. Two assertions check the property.
//
// Reads are combinational, writes take effect at the clock edge. Memory
// contents are not reset.
module banked_memory #(
  parameter int P = 2,      // banks = lanes
  parameter int M = 512,    // words per bank
  parameter int W = 9,      // word width
  localparam int AW = $clog2(P * M),
  localparam int BW = (P > 1) ? $clog2(P) : 1,
  localparam int OW = (M > 1) ? $clog2(M) : 1
) (
  input  logic          clk,
  input  logic          rd_en   [P],
  input  logic [AW-1:0] rd_addr [P],
  output logic [W-1:0]  rd_data [P],
  input  logic          wr_en   [P],
  input  logic [AW-1:0] wr_addr [P],
  input  logic [W-1:0]  wr_data [P]
);

  function automatic logic [BW-1:0] bank_of(logic [AW-1:0] a);
    return BW'(int'(a) / M);
  endfunction

  function automatic logic [OW-1:0] off_of(logic [AW-1:0] a);
    return OW'(int'(a) % M);
  endfunction

  logic [W-1:0]  bank_rd_data [P];
  logic          bank_we      [P];
  logic [OW-1:0] bank_wr_off  [P];
  logic [W-1:0]  bank_wr_data [P];

  // crossbar: lane requests to bank ports
  always_comb begin
    for (int b = 0; b < P; b++) begin
      bank_we[b]      = 1'b0;
      bank_wr_off[b]  = '0;
      bank_wr_data[b] = '0;
    end
    for (int l = 0; l < P; l++) begin
      if (wr_en[l]) begin
        bank_we[bank_of(wr_addr[l])]      = 1'b1;
        bank_wr_off[bank_of(wr_addr[l])]  = off_of(wr_addr[l]);
        bank_wr_data[bank_of(wr_addr[l])] = wr_data[l];
      end
    end
  end

  // crossbar: bank read data back to the lanes
  always_comb
    for (int l = 0; l < P; l++) rd_data[l] = bank_rd_data[bank_of(rd_addr[l])];

  for (genvar b = 0; b < P; b++) begin : g_bank
    logic [W-1:0]  mem [M];
    logic [OW-1:0] rd_off;
    always_comb begin
      rd_off = '0;
      for (int l = 0; l < P; l++)
        if (rd_en[l] && bank_of(rd_addr[l]) == BW'(b)) rd_off = off_of(rd_addr[l]);
      bank_rd_data[b] = mem[rd_off];
    end
    always_ff @(posedge clk)
      if (bank_we[b]) mem[bank_wr_off[b]] <= bank_wr_data[b];
  end

  // contention-free access: at most one active lane per bank and cycle
  for (genvar l1 = 0; l1 < P; l1++) begin : g_chk
    for (genvar l2 = l1 + 1; l2 < P; l2++) begin : g_pair
      assert property (@(posedge clk)
        !(rd_en[l1] && rd_en[l2] && bank_of(rd_addr[l1]) == bank_of(rd_addr[l2])))
        else $error("banked_memory: read contention between lanes %0d and %0d", l1, l2);
      assert property (@(posedge clk)
        !(wr_en[l1] && wr_en[l2] && bank_of(wr_addr[l1]) == bank_of(wr_addr[l2])))
        else $error("banked_memory: write contention between lanes %0d and %0d", l1, l2);
    end
  end

endmodule
