// lks_top: the two proposed hybrid adders side by side.
//
// The main design is the 32-bit hybrid Ling-Kogge-Stone adder
// (hybrid_lks_adder: 8 approximate OR bits + 24 exact Ling-Kogge-Stone bits).
// Next to it stands the three-phase Hybrid PPA1 (hybrid_ppa1_adder:
// 8 approximate + 12 Kogge-Stone + 12 Ladner-Fischer bits). The two do not
// share operands; each has its own ports so either can be used or measured
// on its own.
//
// Interface: purely combinational, no clock. lks_*: the hybrid LKS adder;
// ppa1_*: the Hybrid PPA1 adder. *_c7 and ppa1_c19 are the carries passed
// between the parts, brought out so the hand-over can be observed.
module lks_top
  import lks_pkg::LKS_WIDTH, lks_pkg::LKS_APPROX_BITS;
(
  input  logic [LKS_WIDTH-1:0] lks_a,
  input  logic [LKS_WIDTH-1:0] lks_b,
  output logic [LKS_WIDTH-1:0] lks_sum,
  output logic                   lks_c7,
  output logic                   lks_cout,

  input  logic [LKS_WIDTH-1:0] ppa1_a,
  input  logic [LKS_WIDTH-1:0] ppa1_b,
  output logic [LKS_WIDTH-1:0] ppa1_sum,
  output logic                   ppa1_c7,
  output logic                   ppa1_c19,
  output logic                   ppa1_cout
);

  hybrid_lks_adder u_lks (
    .a    (lks_a),
    .b    (lks_b),
    .sum  (lks_sum),
    .c7   (lks_c7),
    .cout (lks_cout)
  );

  hybrid_ppa1_adder u_ppa1 (
    .a    (ppa1_a),
    .b    (ppa1_b),
    .sum  (ppa1_sum),
    .c7   (ppa1_c7),
    .c19  (ppa1_c19),
    .cout (ppa1_cout)
  );

endmodule
