// tb_hybrid_ppa1_adder: checks the three-phase Hybrid PPA1 adder.
//
// The specified result is the same as for the two-part hybrid: bits 0..7
// are a|b, the carry into bit 8 is a7 & b7 and bits 8..31 are exact. The
// test also checks the carry between the Kogge-Stone and Ladner-Fischer
// phases, C19, against the carry out of an integer addition of bits 8..19
// with C7, and includes operands whose carry runs from bit 8 through both
// exact phases.
module tb_hybrid_ppa1_adder;

  import lks_ref_pkg::*;

  logic [31:0] a, b, sum;
  logic        c7, c19, cout;
  int unsigned checks = 0, failures = 0;

  hybrid_ppa1_adder dut (.a(a), .b(b), .sum(sum), .c7(c7), .c19(c19), .cout(cout));

  initial begin : watchdog
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] x, logic [31:0] y);
    logic [32:0] r;
    int unsigned mid;
    a = x; b = y;
    #1;
    r = hybrid_ref(x, y, 8);
    mid = int'(x[19:8]) + int'(y[19:8]) + int'(x[7] & y[7]);
    checks++;
    if ({cout, sum} !== r || c7 !== (x[7] & y[7]) || c19 !== (mid >= 4096)) begin
      failures++;
      if (failures < 10) $display("FAIL %h+%h got %b_%h c7=%b c19=%b exp %h", x, y, cout, sum, c7, c19, r);
    end
  endtask

  initial begin
    check(32'h8AB87B67, 32'hB788ABDA);
    checks++;
    if ({cout, sum} !== 33'h1_424126FF) begin
      failures++;
      $display("FAIL reference pair got %b_%h", cout, sum);
    end
    check(32'hFFFFFF80, 32'h00000080);
    check(32'h000FFF80, 32'h00000080);
    check(32'hFFFFFFFF, 32'hFFFFFFFF);
    check(32'h00000000, 32'h00000000);
    repeat (200000) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
