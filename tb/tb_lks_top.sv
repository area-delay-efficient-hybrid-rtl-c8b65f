// tb_lks_top: end-to-end test of both hybrid adders at their default sizes.
//
// Both adders of the top are driven with the same stream of operands (the
// reference pair 8AB87B67 + B788ABDA, directed carry cases and random
// words) and compared with the reference model. For the reference pair the
// test also reconstructs the exact sum 1_42412741 from the hybrid result and
// the predicted error (a&b)[6:0] - 128*(a7&b7).
//
// The test counts how often each mechanism of the design occurred and fails
// if one never did: the OR part undercounting (positive error), the C7
// carry overshooting (negative error), a C7 hand-over, a carry rippling from
// C7 through all exact bits to Cout, a carry out, and a C19 hand-over
// between the two exact phases of Hybrid PPA1.
module tb_lks_top;

  import lks_ref_pkg::*;

  logic [31:0] lks_a, lks_b, lks_sum, ppa1_a, ppa1_b, ppa1_sum;
  logic        lks_c7, lks_cout, ppa1_c7, ppa1_c19, ppa1_cout;
  int unsigned checks = 0, failures = 0;
  int unsigned n_pos_err = 0, n_neg_err = 0, n_c7 = 0, n_full_ripple = 0;
  int unsigned n_cout = 0, n_c19 = 0;

  lks_top dut (
    .lks_a(lks_a), .lks_b(lks_b), .lks_sum(lks_sum), .lks_c7(lks_c7), .lks_cout(lks_cout),
    .ppa1_a(ppa1_a), .ppa1_b(ppa1_b), .ppa1_sum(ppa1_sum), .ppa1_c7(ppa1_c7),
    .ppa1_c19(ppa1_c19), .ppa1_cout(ppa1_cout)
  );

  initial begin : watchdog
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [31:0] x, logic [31:0] y);
    logic [32:0] r, e;
    longint      err, pred_err;
    lks_a = x; lks_b = y; ppa1_a = x; ppa1_b = y;
    #1;
    r = hybrid_ref(x, y, 8);
    e = exact_sum(x, y, 1'b0);
    err = longint'(e) - longint'({lks_cout, lks_sum});
    pred_err = longint'({57'b0, x[6:0] & y[6:0]}) - 128 * longint'({63'b0, x[7] & y[7]});
    checks++;
    if ({lks_cout, lks_sum} !== r || err != pred_err) begin
      failures++;
      if (failures < 10) $display("FAIL LKS %h+%h got %b_%h exp %h", x, y, lks_cout, lks_sum, r);
    end
    checks++;
    if ({ppa1_cout, ppa1_sum} !== r || ppa1_c7 !== lks_c7) begin
      failures++;
      if (failures < 10) $display("FAIL PPA1 %h+%h got %b_%h exp %h", x, y, ppa1_cout, ppa1_sum, r);
    end
    if (err > 0) n_pos_err++;
    if (err < 0) n_neg_err++;
    if (lks_c7) n_c7++;
    if (lks_c7 && ((x[31:8] ^ y[31:8]) == 24'hFFFFFF)) n_full_ripple++;
    if (lks_cout) n_cout++;
    if (ppa1_c19) n_c19++;
  endtask

  task automatic need(string what, int unsigned n);
    $display("%-28s %0d", what, n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    apply(32'h8AB87B67, 32'hB788ABDA);
    checks++;
    // a7 = 0 and (a&b)[6:0] = 42h for this pair
    if (longint'({lks_cout, lks_sum}) + 64'h42 != 64'h1_42412741) begin
      failures++;
      $display("FAIL exact sum of the reference pair not recovered");
    end
    apply(32'hFFFFFF80, 32'h00000080);  // C7 ripples to Cout
    apply(32'h0F0F0F80, 32'hF0F0F080);
    apply(32'h000FFF80, 32'h00000080);  // C7 ripples into the LF phase via C19
    apply(32'h00000080, 32'h00000080);  // overshoot of 128
    apply(32'h0000007F, 32'h0000007F);  // undercount of 127
    repeat (100000) apply($urandom, $urandom);
    need("positive error (OR part)", n_pos_err);
    need("negative error (C7)", n_neg_err);
    need("C7 hand-over", n_c7);
    need("C7 ripple to Cout", n_full_ripple);
    need("carry out", n_cout);
    need("C19 hand-over (PPA1)", n_c19);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
