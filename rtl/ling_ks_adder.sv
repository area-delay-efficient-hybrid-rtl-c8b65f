// ling_ks_adder: exact N-bit Kogge-Stone adder built on Ling pseudo-carries.
//
// The adder works on N+1 prefix nodes: node 0 stands for the carry-in and
// node k (k = 1..N) for operand bit k-1. With g = a & b and t = a | b per
// bit (g_0 = t_0 = cin for the carry-in node), the Ling pseudo-carry
//   H_k = g_k | t_{k-1} & H_{k-1}
// is a prefix over the pairs (g_k, t_{k-1}) and the real carry out of node k
// is recovered as c_k = t_k & H_k. The gain is in the first prefix level:
// because g_{k-1} already implies t_{k-1}, the first black cell reduces to
//   H = g_k | g_{k-1},   T = t_{k-1} & t_{k-2}
// so the first stage of the tree is a plain OR instead of an AND-OR.
// The remaining levels are the regular Kogge-Stone network: at level l every
// node k >= 2^l is combined with node k - 2^l, so every node output drives at
// most two cells of the next level. For N = 24 plus the carry-in that is
// ceil(log2(25)) = 5 levels. Sum bit j is (a_j ^ b_j) ^ t_j & H_j, i.e. the
// propagate XORed with the carry into bit j.
//
// Following the design description: the exact 24-bit Kogge-Stone upper part
// that takes C7 as its carry-in, the Ling first stage, five prefix levels and
// fan-out two. Feeding the carry-in through an extra prefix node is this
// implementation's choice.
//
// Interface: purely combinational. a, b: N-bit operands; cin: carry in;
// s: exact sum; cout: carry out of bit N-1.
module ling_ks_adder
  import lks_pkg::gp_t, lks_pkg::black_cell, lks_pkg::prefix_levels;
#(
  parameter int unsigned N = 24
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);

  localparam int unsigned LEVELS = prefix_levels(N + 1);

  logic [N:0] g;   // per-node generate, node 0 = carry-in
  logic [N:0] t;   // per-node transmit (a | b)
  logic [N:0] h;   // Ling pseudo-carry of node k over nodes k..0
  logic [N:0] c;   // real carry out of node k

  assign g = {a & b, cin};
  assign t = {a | b, cin};

  always_comb begin
    gp_t node [N+1];
    // Level 1: Ling simplified cell, a single OR for the pseudo-carry.
    node[0] = '{g: g[0], p: 1'b0};
    for (int unsigned k = 1; k <= N; k++) begin
      node[k].g = g[k] | g[k-1];
      node[k].p = (k >= 2) ? (t[k-1] & t[k-2]) : 1'b0;
    end
    // Levels 2..LEVELS: Kogge-Stone black cells at distance 2, 4, 8, ...
    // Nodes are visited from the top so that node k-d still holds the
    // previous level's value when node k reads it.
    for (int unsigned l = 1; l < LEVELS; l++) begin
      for (int k = N; k >= 0; k--) begin
        if (k >= (1 << l)) node[k] = black_cell(node[k], node[k - (1 << l)]);
      end
    end
    for (int unsigned k = 0; k <= N; k++) h[k] = node[k].g;
  end

  assign c    = t & h;
  assign s    = (a ^ b) ^ c[N-1:0];
  assign cout = c[N];

endmodule
