// tb_mo_add8_tree: checks the eight-operand 16-bit carry-save tree. For
// random and corner operand sets the output pair must add up to the sum of
// the eight operands, c4 must end in 0, and the maximum input must give the
// maximum sum 8*(2^N - 1).
module tb_mo_add8_tree;
  localparam int N = 16;
  logic [N-1:0] a [8];
  logic [N+1:0] s4, c4;
  int checks = 0, failures = 0;

  mo_add8_tree #(.N(N)) dut (.a(a), .s4(s4), .c4(c4));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    longint ref_sum = 0;
    #1;
    for (int k = 0; k < 8; k++) ref_sum += longint'(a[k]);
    checks += 2;
    if (longint'(s4) + longint'(c4) != ref_sum) begin
      failures++;
      if (failures < 10) $display("FAIL s4=%h c4=%h sum %0d expected %0d", s4, c4, longint'(s4) + longint'(c4), ref_sum);
    end
    if (c4[0] != 1'b0) begin
      failures++;
      $display("FAIL c4[0] set");
    end
  endtask

  initial begin
    for (int k = 0; k < 8; k++) a[k] = '1;
    check();
    for (int k = 0; k < 8; k++) a[k] = '0;
    check();
    for (int j = 0; j < 8; j++) begin
      for (int k = 0; k < 8; k++) a[k] = (k == j) ? '1 : '0;
      check();
    end
    for (int v = 0; v < 20000; v++) begin
      for (int k = 0; k < 8; k++) a[k] = N'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
