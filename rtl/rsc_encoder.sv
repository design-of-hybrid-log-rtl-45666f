// rsc_encoder: recursive systematic convolutional (RSC) constituent encoder.
//
// A shift register of MEM cells with feedback polynomial FB_POLY and
// feed-forward polynomial FF_POLY (turbo_pkg; constraint length MEM+1). For
// every input bit the systematic output equals the bit and the parity output
// follows from the current state; both are combinational from in_bit and the
// state. The state advances on in_valid. clear returns it to the all-zero
// state at the start of a frame; the trellis is not terminated (no tail
// bits), which is this design's choice. out_sys is a plain copy of in_bit;
// it is kept as a port so the encoder has the usual systematic/parity pair
// of outputs, and synthesis sees it as a wire.
module rsc_encoder
  import turbo_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic in_valid,
  input  logic in_bit,
  output logic out_sys,
  output logic out_par,
  output state_t state
);

  assign out_sys = in_bit;
  assign out_par = rsc_par(state, in_bit);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        state <= '0;
    else if (clear)    state <= '0;
    else if (in_valid) state <= rsc_next(state, in_bit);

endmodule
