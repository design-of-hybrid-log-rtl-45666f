// turbo_encoder: rate-1/3 parallel concatenated turbo encoder.
//
// Two identical RSC encoders: the first encodes the information bits in
// natural order, the second encodes them in the order given by the QPP
// interleaver, u[pi(k)]. The frame is loaded serially (N bits, in_valid /
// in_bit / in_ready); encoder 1 runs while it loads and its parity bits are
// kept in a frame memory. Then the encoder emits, for k = 0..N-1, the three
// code bits u[k], p1[k], p2[k] one per clock (out_valid/out_bit, out_last on
// the final bit), with encoder 2 and the QPP generator stepping once per
// information bit. The serial order matches channel_buffer. No tail bits.
// Timing: N load cycles, then 3N output cycles starting in the cycle after
// the last input bit, then one cycle before the next frame can load.
module turbo_encoder
  import turbo_pkg::*;
#(
  parameter int N  = 1024,
  parameter int F1 = 31,
  parameter int F2 = 64,
  localparam int AW = $clog2(N)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_bit,
  output logic in_ready,
  output logic out_valid,
  output logic out_bit,
  output logic out_last
);

  typedef enum logic [1:0] {E_LOAD, E_START, E_EMIT} estate_t;
  estate_t st;

  logic u_m  [N];
  logic p1_m [N];
  logic [AW-1:0] k;
  logic [1:0]    sel;
  logic          p2_q;

  logic [AW-1:0] q_x, q_pi;
  logic q_start, q_up;

  logic e1_par, e2_par, e1_sys, e2_sys;
  state_t e1_state, e2_state;

  rsc_encoder u_enc1 (
    .clk, .rst_n, .clear(st == E_START), .in_valid(in_valid && in_ready),
    .in_bit, .out_sys(e1_sys), .out_par(e1_par), .state(e1_state)
  );

  rsc_encoder u_enc2 (
    .clk, .rst_n, .clear(st == E_START), .in_valid(st == E_EMIT && sel == 2'd0),
    .in_bit(u_m[q_pi]), .out_sys(e2_sys), .out_par(e2_par), .state(e2_state)
  );

  qpp_interleaver #(.N(N), .F1(F1), .F2(F2)) u_qpp (
    .clk, .rst_n, .start(q_start), .up(q_up), .down(1'b0), .x(q_x), .pi(q_pi)
  );

  assign in_ready = (st == E_LOAD);
  assign q_start  = (st == E_START);
  assign q_up     = (st == E_EMIT) && (sel == 2'd2) && (q_x != AW'(N - 1));
  assign out_valid = (st == E_EMIT);
  always_comb
    case (sel)
      2'd0:    out_bit = u_m[q_x];
      2'd1:    out_bit = p1_m[q_x];
      default: out_bit = p2_q;
    endcase
  assign out_last = (st == E_EMIT) && (sel == 2'd2) && (q_x == AW'(N - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= E_START;
      k    <= '0;
      sel  <= '0;
      p2_q <= 1'b0;
    end else begin
      case (st)
        E_START: begin
          st  <= E_LOAD;
          k   <= '0;
          sel <= '0;
        end
        E_LOAD: if (in_valid) begin
          if (k == AW'(N - 1)) st <= E_EMIT;
          else                 k <= k + 1'b1;
        end
        E_EMIT: begin
          if (sel == 2'd0) p2_q <= e2_par;
          if (sel == 2'd2) begin
            sel <= '0;
            if (q_x == AW'(N - 1)) st <= E_START;
          end else begin
            sel <= sel + 1'b1;
          end
        end
        default: st <= E_START;
      endcase
    end
  end

  always_ff @(posedge clk)
    if (in_valid && in_ready) begin
      u_m[k]  <= in_bit;
      p1_m[k] <= e1_par;
    end

endmodule
