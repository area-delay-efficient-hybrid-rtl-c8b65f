// hybrid_lks_adder: the proposed 32-bit hybrid Ling-Kogge-Stone adder.
//
// The operand is cut in two. The low APPROX_BITS bits (0..7) are added
// approximately by approx_or_adder: each sum bit is a_i | b_i, and the carry
// C7 = a7 & b7 is passed up. The high WIDTH-APPROX_BITS bits (8..31) are
// added exactly by ling_ks_adder, a Kogge-Stone prefix tree with a Ling first
// stage, taking C7 as its carry-in and producing Cout. The low part has no
// carry chain at all, so the critical path is the 24-bit prefix tree
// (five levels including the carry-in node) instead of a 32-bit one, and the
// error is confined to the low part. The exact low sum is
// (a|b) + (a&b) over bits 0..7, while the hybrid takes (a|b) + 256*(a7&b7),
// so the error (a + b) - {cout, sum} equals (a&b)[6:0] - 128*(a7&b7) and
// always lies in [-2^(APPROX_BITS-1), 2^(APPROX_BITS-1) - 1], i.e. within
// -128..+127 for the 8-bit low part.
//
// The 8 + 24 split, the OR sum bits, the C7 hand-over and the exact
// Kogge-Stone upper part follow the design description; the Ling first stage
// follows its summary. The logic of C7 is this implementation's choice (see
// approx_or_adder).
//
// Interface: purely combinational, no clock and no registers. a, b: operands;
// sum: S0..S31; c7: carry between the parts (brought out for observation);
// cout: carry out of bit 31.
module hybrid_lks_adder
  import lks_pkg::LKS_WIDTH, lks_pkg::LKS_APPROX_BITS;
#(
  parameter int unsigned WIDTH       = LKS_WIDTH,
  parameter int unsigned APPROX_BITS = LKS_APPROX_BITS
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output logic             c7,
  output logic             cout
);

  approx_or_adder #(.N(APPROX_BITS)) u_approx (
    .a    (a[APPROX_BITS-1:0]),
    .b    (b[APPROX_BITS-1:0]),
    .s    (sum[APPROX_BITS-1:0]),
    .cout (c7)
  );

  ling_ks_adder #(.N(WIDTH - APPROX_BITS)) u_exact (
    .a    (a[WIDTH-1:APPROX_BITS]),
    .b    (b[WIDTH-1:APPROX_BITS]),
    .cin  (c7),
    .s    (sum[WIDTH-1:APPROX_BITS]),
    .cout (cout)
  );

endmodule
