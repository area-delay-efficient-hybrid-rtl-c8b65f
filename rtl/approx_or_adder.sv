// approx_or_adder: the approximate low part of the hybrid adders.
//
// Each sum bit is the logical OR of the two operand bits, so no carry ripples
// inside the part and its delay is a single gate. Whenever both operand bits
// of a position are 1 the true sum bit is 0 with a carry that the OR drops;
// the one exception is the top position, whose carry is passed on as cout.
// Counting cout as weight 2^N, the result differs from the exact low sum by
// (a&b)[N-2:0] - 2^(N-1)*(a[N-1]&b[N-1]), which lies in
// [-2^(N-1), 2^(N-1) - 1].
//
// The carry handed to the exact upper part (C7 for N = 8) is the AND of the
// top operand bits, a[N-1] & b[N-1]: the carry that position N-1 would
// generate by itself. Using OR for the sum bits follows the design
// description; the form of this carry is this implementation's choice, as the
// description names the carry but not its logic.
//
// Interface: purely combinational, no clock. a, b: N-bit operands;
// s: N approximate sum bits; cout: carry into the next part.
module approx_or_adder #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s,
  output logic         cout
);

  assign s    = a | b;
  assign cout = a[N-1] & b[N-1];

endmodule
