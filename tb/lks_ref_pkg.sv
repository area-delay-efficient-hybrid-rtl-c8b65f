// lks_ref_pkg: reference arithmetic for the hybrid adder testbenches.
//
// The models here are written with plain integer arithmetic, not with prefix
// trees, so they check the RTL independently of how it is built.
//   exact_sum(a, b, cin)        : a + b + cin as a 33-bit value {cout, sum}
//   hybrid_ref(a, b, k)         : the hybrid adder's specified result: bits
//                                 below k are a|b, the carry into bit k is
//                                 a[k-1] & b[k-1], bits k..31 are exact.
package lks_ref_pkg;

  function automatic logic [32:0] exact_sum(logic [31:0] a, logic [31:0] b, logic cin);
    longint unsigned r;
    r = longint'(a) + longint'(b) + longint'(cin);
    return r[32:0];
  endfunction

  function automatic logic [32:0] hybrid_ref(logic [31:0] a, logic [31:0] b, int unsigned k);
    longint unsigned hi, lo_mask;
    logic            ck;
    lo_mask = (64'd1 << k) - 1;
    ck      = a[k-1] & b[k-1];
    hi      = (longint'(a) >> k) + (longint'(b) >> k) + longint'(ck);
    return 33'((hi << k) | ((longint'(a) | longint'(b)) & lo_mask));
  endfunction

endpackage
