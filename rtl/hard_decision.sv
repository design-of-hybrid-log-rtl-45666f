// hard_decision: slices the final a-posteriori LLRs into bits and delivers
// the decoded frame in natural order.
//
// The second SISO decoder works in interleaved order, so its LLR for
// interleaved position k belongs to information bit pi(k). Each write
// stores the decision (1 when the LLR is >= 0, since bit 1 is sent as +1)
// at the de-interleaving address wr_addr = pi(k) of a bit memory; this is
// the de-interleaver on the decoder output. The bit memory is a
// banked_memory with one write lane per parallel SISO lane. After the frame, start_out
// reads the memory out in order, one bit per clock: out_valid for N cycles,
// out_last with the final bit. The tie at LLR = 0 going to 1 is this
// design's choice.
module hard_decision
  import turbo_pkg::*;
#(
  parameter int N = 1024,
  parameter int P = 2,
  localparam int AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en   [P],
  input  logic [AW-1:0] wr_addr [P],
  input  llr_t          wr_llr  [P],
  input  logic          start_out,
  output logic          out_valid,
  output logic          out_bit,
  output logic          out_last,
  output logic [AW-1:0] out_idx
);

  logic [AW-1:0] rd;
  logic          active;

  logic          rd_en   [P];
  logic [AW-1:0] rd_addr [P];
  logic [0:0]    rd_data [P];
  logic [0:0]    wr_bit  [P];

  always_comb
    for (int l = 0; l < P; l++) begin
      rd_en[l]   = (l == 0) && active;
      rd_addr[l] = (l == 0) ? rd : AW'(l * (N / P));
      wr_bit[l]  = !wr_llr[l][LLR_W-1];
    end

  banked_memory #(.P(P), .M(N / P), .W(1)) u_bits (.clk, .rd_en, .rd_addr, .rd_data,
    .wr_en, .wr_addr, .wr_data(wr_bit));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active    <= 1'b0;
      rd        <= '0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
      out_last  <= 1'b0;
      out_idx   <= '0;
    end else begin
      out_valid <= active;
      out_bit   <= rd_data[0][0];
      out_idx   <= rd;
      out_last  <= active && (rd == AW'(N - 1));
      if (start_out && !active) begin
        active <= 1'b1;
        rd     <= '0;
      end else if (active) begin
        if (rd == AW'(N - 1)) active <= 1'b0;
        else                  rd <= rd + 1'b1;
      end
    end
  end

endmodule
