// tb_csa3_row: exhaustive check of the 5-bit three-operand carry-save row.
// For every operand triple the sum vector must be the column parities, the
// carry vector the column majorities, and s + 2*c the arithmetic sum.
module tb_csa3_row;
  localparam int N = 5;
  logic [N-1:0] x1, x2, x3, s, c;
  int checks = 0, failures = 0;

  csa3_row #(.N(N)) dut (.x1(x1), .x2(x2), .x3(x3), .s(s), .c(c));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (3*N)); v++) begin
      int sum_ref;
      {x1, x2, x3} = (3*N)'(v);
      #1;
      sum_ref = int'(x1) + int'(x2) + int'(x3);
      checks++;
      if (int'(s) + 2*int'(c) != sum_ref) begin
        failures++;
        if (failures < 10) $display("FAIL sum %0d+%0d+%0d: s=%0d c=%0d", x1, x2, x3, s, c);
      end
      for (int i = 0; i < N; i++) begin
        int cnt;
        cnt = int'(x1[i]) + int'(x2[i]) + int'(x3[i]);
        checks++;
        if (s[i] != cnt[0] || c[i] != (cnt >= 2)) begin
          failures++;
          if (failures < 10) $display("FAIL column %0d of %0d,%0d,%0d", i, x1, x2, x3);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
