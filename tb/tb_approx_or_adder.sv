// tb_approx_or_adder: exhaustive check of the 8-bit approximate OR part.
//
// Every one of the 65536 operand pairs is applied. Each sum bit is compared
// with the OR of its operand bits (computed bit by bit here), the carry with
// the AND of the top bits, and the error against the exact 8-bit sum is
// checked to stay inside [-128, 127] with the carry weighted 256.
module tb_approx_or_adder;

  localparam int unsigned N = 8;

  logic [N-1:0] a, b, s;
  logic         cout;
  int unsigned  checks = 0, failures = 0;

  approx_or_adder #(.N(N)) dut (.a(a), .b(b), .s(s), .cout(cout));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int err;
    logic [N-1:0] exp_s;
    for (int i = 0; i < (1 << N); i++) begin
      for (int j = 0; j < (1 << N); j++) begin
        a = N'(i);
        b = N'(j);
        #1;
        for (int k = 0; k < N; k++) exp_s[k] = (i >> k) % 2 == 1 || (j >> k) % 2 == 1;
        checks++;
        if (s !== exp_s || cout !== ((i >= 128) && (j >= 128))) begin
          failures++;
          if (failures < 10) $display("FAIL a=%h b=%h s=%h cout=%b", a, b, s, cout);
        end
        err = (i + j) - (int'(s) + 256 * int'(cout));
        checks++;
        if (err < -128 || err > 127) begin
          failures++;
          if (failures < 10) $display("FAIL error %0d out of range a=%h b=%h", err, a, b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
