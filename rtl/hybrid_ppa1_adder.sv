// hybrid_ppa1_adder: the three-phase 32-bit Hybrid PPA1.
//
// Bits 0..7 are added approximately (OR sum bits, carry C7 = a7 & b7, see
// approx_or_adder). Bits 8..19 are added exactly by a 12-bit Kogge-Stone
// tree (ling_ks_adder with N = 12) with C7 as carry-in, producing C19.
// Bits 20..31 are added exactly by a 12-bit Ladner-Fischer tree (lf_adder)
// with C19 as carry-in, producing Cout. The Ladner-Fischer top phase trades
// the Kogge-Stone tree's wiring for fewer prefix cells.
//
// The segment widths, their order and the C7 / C19 hand-over follow the
// design description. Using the Ling form of the Kogge-Stone tree for the
// middle phase (so that both hybrid adders share one Kogge-Stone block) and
// the logic of C7 are this implementation's choices. Note that C19 ripples
// into the Ladner-Fischer phase, so the two exact phases are in series.
//
// Interface: purely combinational. a, b: operands; sum: S0..S31;
// c7, c19: carries between the phases; cout: carry out of bit 31.
module hybrid_ppa1_adder
  import lks_pkg::*;
(
  input  logic [LKS_WIDTH-1:0] a,
  input  logic [LKS_WIDTH-1:0] b,
  output logic [LKS_WIDTH-1:0] sum,
  output logic                   c7,
  output logic                   c19,
  output logic                   cout
);

  localparam int unsigned KS_LO = LKS_APPROX_BITS;                 // 8
  localparam int unsigned LF_LO = LKS_APPROX_BITS + PPA1_KS_BITS;  // 20

  approx_or_adder #(.N(LKS_APPROX_BITS)) u_approx (
    .a    (a[KS_LO-1:0]),
    .b    (b[KS_LO-1:0]),
    .s    (sum[KS_LO-1:0]),
    .cout (c7)
  );

  ling_ks_adder #(.N(PPA1_KS_BITS)) u_ks (
    .a    (a[LF_LO-1:KS_LO]),
    .b    (b[LF_LO-1:KS_LO]),
    .cin  (c7),
    .s    (sum[LF_LO-1:KS_LO]),
    .cout (c19)
  );

  lf_adder #(.N(PPA1_LF_BITS)) u_lf (
    .a    (a[LKS_WIDTH-1:LF_LO]),
    .b    (b[LKS_WIDTH-1:LF_LO]),
    .cin  (c19),
    .s    (sum[LKS_WIDTH-1:LF_LO]),
    .cout (cout)
  );

endmodule
