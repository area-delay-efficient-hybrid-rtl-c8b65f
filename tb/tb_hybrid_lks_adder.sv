// tb_hybrid_lks_adder: checks the 32-bit hybrid Ling-Kogge-Stone adder.
//
// Reference (lks_ref_pkg::hybrid_ref): bits 0..7 are a|b, the carry into
// bit 8 is a7 & b7, and bits 8..31 plus cout are the exact sum of the upper
// operand bits and that carry. Besides random operands the test applies the
// operand pair 8AB87B67 + B788ABDA, whose exact sum is 1_42412741 and whose
// hybrid result is 1_424126FF, and checks that the hybrid error
// (a + b) - {cout, sum} stays within -128..127. A second instance with a
// 16-bit width and 4 approximate bits checks the parameters.
module tb_hybrid_lks_adder;

  import lks_ref_pkg::*;

  logic [31:0] a, b, sum;
  logic        c7, cout;
  logic [15:0] a16, b16, sum16;
  logic        c3_16, cout16;
  int unsigned checks = 0, failures = 0;

  hybrid_lks_adder dut (.a(a), .b(b), .sum(sum), .c7(c7), .cout(cout));
  hybrid_lks_adder #(.WIDTH(16), .APPROX_BITS(4)) dut16 (
    .a(a16), .b(b16), .sum(sum16), .c7(c3_16), .cout(cout16));

  initial begin : watchdog
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] x, logic [31:0] y);
    logic [32:0] r, e;
    longint      err;
    a = x; b = y;
    #1;
    r = hybrid_ref(x, y, 8);
    e = exact_sum(x, y, 1'b0);
    err = longint'(e) - longint'({cout, sum});
    checks++;
    if ({cout, sum} !== r || c7 !== (x[7] & y[7])) begin
      failures++;
      if (failures < 10) $display("FAIL %h+%h got %b_%h c7=%b exp %h", x, y, cout, sum, c7, r);
    end
    checks++;
    if (err < -128 || err > 127) begin
      failures++;
      if (failures < 10) $display("FAIL error %0d for %h+%h", err, x, y);
    end
  endtask

  initial begin
    logic [32:0] r16;
    a16 = '0; b16 = '0;
    check(32'h8AB87B67, 32'hB788ABDA);
    checks++;
    if ({cout, sum} !== 33'h1_424126FF) begin
      failures++;
      $display("FAIL reference pair got %b_%h", cout, sum);
    end
    check(32'hFFFFFF80, 32'h00000080);   // C7 ripples through all 24 exact bits
    check(32'hFFFFFFFF, 32'hFFFFFFFF);
    check(32'h00000000, 32'h00000000);
    check(32'h000000FF, 32'h00000001);   // carry lost inside the low part
    repeat (200000) check($urandom, $urandom);
    repeat (50000) begin
      a16 = 16'($urandom); b16 = 16'($urandom);
      #1;
      r16 = hybrid_ref({16'h0, a16}, {16'h0, b16}, 4);
      checks++;
      if ({cout16, sum16} !== r16[16:0]) begin
        failures++;
        if (failures < 10) $display("FAIL W16 %h+%h", a16, b16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
