// tb_ling_ks_adder: checks the Ling Kogge-Stone adder against integer addition.
//
// The 24-bit default instance gets corner cases (all-ones chains with and
// without carry-in, alternating patterns, single generate at the bottom)
// and 200000 random operand/carry-in triples. Small instances (N = 5 and
// N = 12) are checked exhaustively or densely, which covers node counts that
// are and are not powers of two.
module tb_ling_ks_adder;

  import lks_ref_pkg::*;

  logic [23:0] a24, b24, s24;
  logic        cin24, cout24;
  logic [4:0]  a5, b5, s5;
  logic        cin5, cout5;
  logic [11:0] a12, b12, s12;
  logic        cin12, cout12;
  int unsigned checks = 0, failures = 0;

  ling_ks_adder dut24 (.a(a24), .b(b24), .cin(cin24), .s(s24), .cout(cout24));
  ling_ks_adder #(.N(5))  dut5  (.a(a5),  .b(b5),  .cin(cin5),  .s(s5),  .cout(cout5));
  ling_ks_adder #(.N(12)) dut12 (.a(a12), .b(b12), .cin(cin12), .s(s12), .cout(cout12));

  initial begin : watchdog
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check24(logic [23:0] x, logic [23:0] y, logic c);
    logic [32:0] e;
    a24 = x; b24 = y; cin24 = c;
    #1;
    e = exact_sum({8'h0, x}, {8'h0, y}, c);
    checks++;
    if ({cout24, s24} !== e[24:0]) begin
      failures++;
      if (failures < 10) $display("FAIL N=24 %h+%h+%b got %b_%h exp %h", x, y, c, cout24, s24, e[24:0]);
    end
  endtask

  initial begin
    logic [32:0] e;
    a5 = '0; b5 = '0; cin5 = 0; a12 = '0; b12 = '0; cin12 = 0;
    // corner cases at N = 24
    check24(24'hFFFFFF, 24'h000000, 1'b1);
    check24(24'hFFFFFF, 24'h000000, 1'b0);
    check24(24'hFFFFFE, 24'h000001, 1'b1);
    check24(24'h7FFFFF, 24'h000001, 1'b0);
    check24(24'hFFFFFF, 24'hFFFFFF, 1'b1);
    check24(24'hAAAAAA, 24'h555555, 1'b1);
    check24(24'h800000, 24'h800000, 1'b0);
    check24(24'h000000, 24'h000000, 1'b1);
    for (int k = 0; k < 24; k++) check24(~(24'h1 << k), 24'h1, 1'b0);
    repeat (200000) check24(24'($urandom), 24'($urandom), 1'($urandom));
    // exhaustive at N = 5
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++)
        for (int c = 0; c < 2; c++) begin
          a5 = 5'(i); b5 = 5'(j); cin5 = 1'(c);
          #1;
          checks++;
          if ({cout5, s5} !== 6'(i + j + c)) begin
            failures++;
            if (failures < 10) $display("FAIL N=5 %0d+%0d+%0d got %b_%h", i, j, c, cout5, s5);
          end
        end
    // random at N = 12
    repeat (100000) begin
      a12 = 12'($urandom); b12 = 12'($urandom); cin12 = 1'($urandom);
      #1;
      e = exact_sum({20'h0, a12}, {20'h0, b12}, cin12);
      checks++;
      if ({cout12, s12} !== e[12:0]) begin
        failures++;
        if (failures < 10) $display("FAIL N=12 %h+%h+%b", a12, b12, cin12);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
