// channel_buffer: serial-to-parallel input stage and frame memory of the
// turbo decoder.
//
// The soft demodulator delivers one channel LLR per in_valid, three per
// information bit in the order systematic, parity 1, parity 2 (rate 1/3;
// the order is this design's choice). The buffer splits this serial stream
// into three frame memories of N entries, so the decoders can read the
// systematic value at any (natural or interleaved) address and the parity
// of their own code in order. The whole frame is stored before decoding
// starts. Each memory is a banked_memory of P banks, so the P parallel SISO
// lanes can each read one value per cycle without contention.
//
// Interface: in_ready is high while the frame is being filled; full rises
// after the 3*N-th value and stays high until release, which empties the
// buffer for the next frame. The P-lane read ports are combinational and
// take frame addresses; rd_en marks the cycles in which the lanes read.
module channel_buffer
  import turbo_pkg::*;
#(
  parameter int N = 1024,
  parameter int P = 2,
  localparam int AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  ch_t           in_sym,
  output logic          in_ready,
  output logic          full,
  input  logic          release_frame,
  input  logic          rd_en,
  input  logic [AW-1:0] ys_addr [P],
  output ch_t           ys      [P],
  input  logic [AW-1:0] p1_addr [P],
  output ch_t           p1      [P],
  input  logic [AW-1:0] p2_addr [P],
  output ch_t           p2      [P]
);

  localparam int M = N / P;

  logic [AW-1:0] k;
  logic [1:0]    sel;   // 0: systematic, 1: parity 1, 2: parity 2

  assign in_ready = !full;

  // serial writes use lane 0 of each memory
  logic          rd_en_v [P];
  logic          we      [3][P];
  logic [AW-1:0] wa      [P];
  logic [CH_W-1:0] wd    [P];
  logic [CH_W-1:0] rd_ys [P], rd_p1 [P], rd_p2 [P];

  always_comb begin
    for (int l = 0; l < P; l++) begin
      rd_en_v[l] = rd_en;
      wa[l]      = k;
      wd[l]      = in_sym;
      for (int m = 0; m < 3; m++) we[m][l] = (l == 0) && in_valid && !full && (int'(sel) == m);
    end
    for (int l = 0; l < P; l++) begin
      ys[l] = ch_t'(rd_ys[l]);
      p1[l] = ch_t'(rd_p1[l]);
      p2[l] = ch_t'(rd_p2[l]);
    end
  end

  banked_memory #(.P(P), .M(M), .W(CH_W)) u_ys (.clk, .rd_en(rd_en_v), .rd_addr(ys_addr),
    .rd_data(rd_ys), .wr_en(we[0]), .wr_addr(wa), .wr_data(wd));
  banked_memory #(.P(P), .M(M), .W(CH_W)) u_p1 (.clk, .rd_en(rd_en_v), .rd_addr(p1_addr),
    .rd_data(rd_p1), .wr_en(we[1]), .wr_addr(wa), .wr_data(wd));
  banked_memory #(.P(P), .M(M), .W(CH_W)) u_p2 (.clk, .rd_en(rd_en_v), .rd_addr(p2_addr),
    .rd_data(rd_p2), .wr_en(we[2]), .wr_addr(wa), .wr_data(wd));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k    <= '0;
      sel  <= '0;
      full <= 1'b0;
    end else if (release_frame) begin
      k    <= '0;
      sel  <= '0;
      full <= 1'b0;
    end else if (in_valid && !full) begin
      if (sel == 2'd2) begin
        sel <= '0;
        if (k == AW'(N - 1)) begin
          k    <= '0;
          full <= 1'b1;
        end else begin
          k <= k + 1'b1;
        end
      end else begin
        sel <= sel + 1'b1;
      end
    end
  end

endmodule
