// tb_cpa: random and corner-case check of the 18-bit carry-chain adder
// against integer addition, including carry-in and carry-out.
module tb_cpa;
  localparam int N = 18;
  logic [N-1:0] a, b;
  logic         ci;
  logic [N:0]   sum;
  int checks = 0, failures = 0;
  int couts = 0;

  cpa #(.N(N)) dut (.a(a), .b(b), .ci(ci), .sum(sum));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    longint ref_sum;
    #1;
    ref_sum = longint'(a) + longint'(b) + longint'(ci);
    checks++;
    if (longint'(sum) != ref_sum) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h + %0d = %h, expected %h", a, b, ci, sum, ref_sum);
    end
    if (sum[N]) couts++;
  endtask

  initial begin
    // Corners: full-length carry ripple and maximum values.
    a = '1; b = '0; ci = 1'b1; check();
    a = '1; b = '1; ci = 1'b1; check();
    a = '0; b = '0; ci = 1'b0; check();
    a = N'(1); b = '1; ci = 1'b0; check();
    for (int k = 0; k < 20000; k++) begin
      a  = N'($urandom);
      b  = N'($urandom);
      ci = 1'($urandom);
      check();
    end
    checks++;
    if (couts == 0) begin
      failures++;
      $display("FAIL carry out never seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
