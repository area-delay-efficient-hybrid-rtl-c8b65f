// tb_lf_adder: checks the Ladner-Fischer adder against integer addition.
//
// The 12-bit default instance gets long-carry corner cases and 200000
// random operand/carry-in triples. Instances with N = 4, 7 and 8 (odd and
// even node counts, full and partial Sklansky blocks) are checked
// exhaustively.
module tb_lf_adder;

  import lks_ref_pkg::*;

  logic [11:0] a12, b12, s12;
  logic        cin12, cout12;
  logic [3:0]  a4, b4, s4;
  logic        cin4, cout4;
  logic [6:0]  a7, b7, s7;
  logic        cin7, cout7;
  logic [7:0]  a8, b8, s8;
  logic        cin8, cout8;
  int unsigned checks = 0, failures = 0;

  lf_adder dut12 (.a(a12), .b(b12), .cin(cin12), .s(s12), .cout(cout12));
  lf_adder #(.N(4)) dut4 (.a(a4), .b(b4), .cin(cin4), .s(s4), .cout(cout4));
  lf_adder #(.N(7)) dut7 (.a(a7), .b(b7), .cin(cin7), .s(s7), .cout(cout7));
  lf_adder #(.N(8)) dut8 (.a(a8), .b(b8), .cin(cin8), .s(s8), .cout(cout8));

  initial begin : watchdog
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check12(logic [11:0] x, logic [11:0] y, logic c);
    logic [32:0] e;
    a12 = x; b12 = y; cin12 = c;
    #1;
    e = exact_sum({20'h0, x}, {20'h0, y}, c);
    checks++;
    if ({cout12, s12} !== e[12:0]) begin
      failures++;
      if (failures < 10) $display("FAIL N=12 %h+%h+%b got %b_%h exp %h", x, y, c, cout12, s12, e[12:0]);
    end
  endtask

  initial begin
    a4 = '0; b4 = '0; cin4 = 0; a7 = '0; b7 = '0; cin7 = 0; a8 = '0; b8 = '0; cin8 = 0;
    check12(12'hFFF, 12'h000, 1'b1);
    check12(12'hFFF, 12'hFFF, 1'b1);
    check12(12'hAAA, 12'h555, 1'b1);
    check12(12'h800, 12'h800, 1'b0);
    for (int k = 0; k < 12; k++) check12(~(12'h1 << k), 12'h1, 1'b0);
    repeat (200000) check12(12'($urandom), 12'($urandom), 1'($urandom));
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        for (int c = 0; c < 2; c++) begin
          a4 = 4'(i); b4 = 4'(j); cin4 = 1'(c);
          a7 = 7'(i); b7 = 7'(j); cin7 = 1'(c);
          a8 = 8'(i); b8 = 8'(j); cin8 = 1'(c);
          #1;
          checks++;
          if (i < 16 && j < 16 && {cout4, s4} !== 5'(i + j + c)) begin
            failures++;
            if (failures < 10) $display("FAIL N=4 %0d+%0d+%0d", i, j, c);
          end
          checks++;
          if (i < 128 && j < 128 && {cout7, s7} !== 8'(i + j + c)) begin
            failures++;
            if (failures < 10) $display("FAIL N=7 %0d+%0d+%0d", i, j, c);
          end
          checks++;
          if ({cout8, s8} !== 9'(i + j + c)) begin
            failures++;
            if (failures < 10) $display("FAIL N=8 %0d+%0d+%0d", i, j, c);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
