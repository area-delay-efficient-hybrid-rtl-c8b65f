// lf_adder: exact N-bit Ladner-Fischer parallel prefix adder.
//
// Prefix nodes: node 0 is the carry-in (g = cin, p = 0) and node k
// (k = 1..N) is operand bit k-1 with g = a & b, p = a ^ b. The tree follows
// the Ladner-Fischer shape: the first level combines every odd node with the
// even node below it; a Sklansky network then completes the odd nodes
// (at level l an odd node whose pair index m = (k-1)/2 has bit l set takes the
// last odd node of the preceding block of 2^l pairs), and a final level gives
// every even node its group term from the odd node just below it. Only half
// the nodes take part in the middle levels, which is where the area saving
// over Kogge-Stone comes from, at the cost of higher fan-out. Carry into bit j
// is the group generate of node j; sum bit j is p_j ^ G_j.
//
// The Ladner-Fischer tree shape follows the design description; placing the
// carry-in at node 0 is this implementation's choice.
//
// Interface: purely combinational. a, b: N-bit operands; cin: carry in;
// s: exact sum; cout: carry out of bit N-1.
module lf_adder
  import lks_pkg::gp_t, lks_pkg::black_cell, lks_pkg::prefix_levels;
#(
  parameter int unsigned N = 12
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);

  localparam int unsigned NODES = N + 1;
  localparam int unsigned PAIRS = NODES / 2;             // odd nodes 1, 3, ...
  localparam int unsigned SK_LEVELS = prefix_levels(PAIRS);

  logic [N:0] p;   // per-node propagate
  logic [N:0] gc;  // group generate of node k over nodes k..0 = carry out

  assign p = {a ^ b, 1'b0};

  always_comb begin
    gp_t node [NODES];
    int  m_src;
    node[0] = '{g: cin, p: 1'b0};
    for (int unsigned k = 1; k <= N; k++) node[k] = '{g: a[k-1] & b[k-1], p: p[k]};
    // Level 1: odd node k takes even node k-1.
    for (int unsigned k = 1; k <= N; k += 2) node[k] = black_cell(node[k], node[k-1]);
    // Sklansky levels over the odd nodes, pair index m <-> node 2m+1.
    for (int unsigned l = 0; l < SK_LEVELS; l++) begin
      for (int m = PAIRS - 1; m >= 0; m--) begin
        if (m[l]) begin
          m_src = ((m >> l) << l) - 1;
          node[2*m+1] = black_cell(node[2*m+1], node[2*m_src+1]);
        end
      end
    end
    // Final level: even nodes take the completed odd node below them.
    for (int unsigned k = 2; k <= N; k += 2) node[k] = black_cell(node[k], node[k-1]);
    for (int unsigned k = 0; k <= N; k++) gc[k] = node[k].g;
  end

  assign s    = p[N:1] ^ gc[N-1:0];
  assign cout = gc[N];

endmodule
