// qpp_interleaver: recursive quadratic permutation polynomial (QPP) address
// generator.
//
// The interleaver maps position x of a block of N bits to
//   pi(x) = (F1*x + F2*x^2) mod N.
// Instead of multiplying, the generator walks the sequence with two
// registers, pi(x) and the first difference g(x) = pi(x+1) - pi(x):
//   step up:    pi(x+1) = pi(x) + g(x),      g(x+1) = g(x) + 2*F2
//   step down:  g(x-1)  = g(x) - 2*F2,       pi(x-1) = pi(x) - g(x-1)
// all modulo N, so each step is two modular additions (add, compare,
// subtract). The addresses are produced on the fly and nothing of the block
// has to be stored. The same generator serves as de-interleaver: while
// data is read at pi(x), x is the address it came from and is output too.
// Stepping down is this design's addition; it lets a SISO decoder that
// processes a frame forwards and then backwards reuse the generator.
//
// For a decoder split into parallel segments, one generator per segment
// starts at the segment's first position X0; pi(X0) and g(X0) are worked out
// at elaboration, so all generators step together, each producing the
// address its own SISO needs in that cycle.
//
// Interface: start loads x = X0, pi(X0), g(X0). up / down step by one in the
// following cycle; start has priority, up and down must not both be set.
// Outputs are registered.
module qpp_interleaver #(
  parameter int N  = 1024,  // block length
  parameter int F1 = 31,    // linear coefficient (odd)
  parameter int F2 = 64,    // quadratic coefficient (even)
  parameter int X0 = 0,     // position loaded by start
  localparam int AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          up,
  input  logic          down,
  output logic [AW-1:0] x,     // natural (de-interleaving) address
  output logic [AW-1:0] pi     // interleaved address pi(x)
);

  function automatic longint qpp(longint xv);
    return (longint'(F1) * xv + longint'(F2) * xv * xv) % longint'(N);
  endfunction

  localparam logic [AW-1:0] P0 = AW'(qpp(longint'(X0)));
  localparam logic [AW:0]   G0 = (AW+1)'((qpp(longint'(X0) + 1) - qpp(longint'(X0)) + longint'(N)) % longint'(N));
  localparam logic [AW:0] D2  = (AW+1)'((2 * F2) % N);
  localparam logic [AW:0] NN  = (AW+1)'(N);

  logic [AW:0] g;

  function automatic logic [AW:0] add_mod(logic [AW:0] a, logic [AW:0] b);
    logic [AW+1:0] s;
    s = {1'b0, a} + {1'b0, b};
    if (s >= {1'b0, NN}) s = s - {1'b0, NN};
    return s[AW:0];
  endfunction

  function automatic logic [AW:0] sub_mod(logic [AW:0] a, logic [AW:0] b);
    return (a >= b) ? a - b : a + NN - b;
  endfunction

  logic [AW:0] g_dn;
  assign g_dn = sub_mod(g, D2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x  <= AW'(X0);
      pi <= P0;
      g  <= G0;
    end else if (start) begin
      x  <= AW'(X0);
      pi <= P0;
      g  <= G0;
    end else if (up) begin
      x  <= x + 1'b1;
      pi <= AW'(add_mod({1'b0, pi}, g));
      g  <= add_mod(g, D2);
    end else if (down) begin
      x  <= x - 1'b1;
      pi <= AW'(sub_mod({1'b0, pi}, g_dn));
      g  <= g_dn;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(up && down))
    else $error("qpp_interleaver: up and down together");

endmodule
