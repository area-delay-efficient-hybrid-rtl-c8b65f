// tb_workload_sizes: the hybrid adder at the sizes its comparisons use.
//
// Instances of hybrid_lks_adder at 8, 16 and 32 bits are driven with the
// same random operands (truncated to each width). Every result is compared
// with the reference model, and for each size the test reports
//   error rate : fraction of additions whose result differs from a + b
//   MED        : mean of |(a + b) - {cout, sum}|
// and checks every error against the bound [-2^(k-1), 2^(k-1) - 1] for k
// approximate bits. The split of the 8- and 16-bit versions (4 and 8
// approximate bits) is an illustration: only the 32-bit 8 + 24 split is
// defined by the design.
module tb_workload_sizes;

  import lks_ref_pkg::*;

  localparam int unsigned SAMPLES = 100000;

  logic [7:0]  a8, b8, s8;
  logic [15:0] a16, b16, s16a, s16b;
  logic [31:0] a32, b32, s32;
  logic        c8, c16a, c16b, c32, co8, co16a, co16b, co32;
  int unsigned checks = 0, failures = 0;

  hybrid_lks_adder #(.WIDTH(8),  .APPROX_BITS(4)) dut8   (.a(a8),  .b(b8),  .sum(s8),   .c7(c8),   .cout(co8));
  hybrid_lks_adder #(.WIDTH(16), .APPROX_BITS(4)) dut16a (.a(a16), .b(b16), .sum(s16a), .c7(c16a), .cout(co16a));
  hybrid_lks_adder #(.WIDTH(16), .APPROX_BITS(8)) dut16b (.a(a16), .b(b16), .sum(s16b), .c7(c16b), .cout(co16b));
  hybrid_lks_adder dut32 (.a(a32), .b(b32), .sum(s32), .c7(c32), .cout(co32));

  initial begin : watchdog
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    string       name;
    int unsigned width;
    int unsigned k;
    longint      n_wrong;
    longint      sum_abs;
  } stat_t;

  stat_t st [4];

  task automatic score(int idx, logic [31:0] x, logic [31:0] y, logic [32:0] got);
    logic [32:0] r, e;
    longint      err, lo, hi;
    int unsigned k;
    k = st[idx].k;
    r = hybrid_ref(x, y, k);
    e = exact_sum(x, y, 1'b0);
    err = longint'(e) - longint'(got);
    lo = -(longint'(1) << (k - 1));
    hi = (longint'(1) << (k - 1)) - 1;
    checks++;
    if (got !== r || err < lo || err > hi) begin
      failures++;
      if (failures < 10) $display("FAIL %s %h+%h got %h exp %h", st[idx].name, x, y, got, r);
    end
    if (err != 0) st[idx].n_wrong++;
    st[idx].sum_abs += (err < 0) ? -err : err;
  endtask

  initial begin
    logic [31:0] x, y;
    st[0] = '{"8-bit (4+4)", 8, 4, 0, 0};
    st[1] = '{"16-bit (4+12)", 16, 4, 0, 0};
    st[2] = '{"16-bit (8+8)", 16, 8, 0, 0};
    st[3] = '{"32-bit (8+24)", 32, 8, 0, 0};
    repeat (SAMPLES) begin
      x = $urandom;
      y = $urandom;
      a8 = x[7:0];   b8 = y[7:0];
      a16 = x[15:0]; b16 = y[15:0];
      a32 = x;       b32 = y;
      #1;
      score(0, {24'h0, x[7:0]},  {24'h0, y[7:0]},  {24'h0, co8, s8});
      score(1, {16'h0, x[15:0]}, {16'h0, y[15:0]}, {16'h0, co16a, s16a});
      score(2, {16'h0, x[15:0]}, {16'h0, y[15:0]}, {16'h0, co16b, s16b});
      score(3, x, y, {co32, s32});
    end
    for (int i = 0; i < 4; i++)
      $display("%-14s error rate %0.4f  MED %0.3f", st[i].name,
               real'(st[i].n_wrong) / SAMPLES, real'(st[i].sum_abs) / SAMPLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
