// tb_csa4_cc: checks the carry-chain four-operand unit at the word lengths
// 4, 5, 8, 16 and 32 bits side by side. For random and corner operands and
// carry-in it checks, independently of the unit's structure:
//   - c is the bitwise majority of we[0], we[1], we[2] (full-adder row),
//   - s is (we[0] ^ we[1] ^ we[2]) + we[3] + d (the chain addition),
//   - s + 2*c equals the arithmetic sum of all inputs.
// It also counts chain carry outs and carries crossing a segment boundary,
// and fails if either never happened at a size with more than one segment.
module tb_csa4_cc;
  localparam int NSIZES = 5;
  localparam int SIZES [NSIZES] = '{4, 5, 8, 16, 32};
  localparam int VECTORS = 4000;

  int checks = 0, failures = 0;
  logic [NSIZES-1:0] done = '0;

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NSIZES; g++) begin : g_size
    localparam int N = SIZES[g];
    logic [N-1:0] we [4];
    logic         d;
    logic [N:0]   s;
    logic [N-1:0] c;
    int couts = 0, crossings = 0;

    csa4_cc #(.N(N)) dut (.we(we), .d(d), .s(s), .c(c));

    task automatic check();
      logic [N-1:0] maj, par;
      longint total, chain_ref;
      #1;
      maj = (we[0] & we[1]) | (we[0] & we[2]) | (we[1] & we[2]);
      par = we[0] ^ we[1] ^ we[2];
      chain_ref = longint'(par) + longint'(we[3]) + longint'(d);
      total = longint'(we[0]) + longint'(we[1]) + longint'(we[2]) + longint'(we[3]) + longint'(d);
      checks += 3;
      if (c != maj) begin
        failures++;
        if (failures < 10) $display("FAIL N=%0d c=%h expected %h", N, c, maj);
      end
      if (longint'(s) != chain_ref) begin
        failures++;
        if (failures < 10) $display("FAIL N=%0d s=%h expected %h", N, s, chain_ref);
      end
      if (longint'(s) + 2 * longint'(c) != total) begin
        failures++;
        if (failures < 10) $display("FAIL N=%0d s+2c=%0d expected %0d", N, longint'(s) + 2 * longint'(c), total);
      end
      if (s[N]) couts++;
      // Carry out of bit 3 into a following segment.
      if (N > 4 && ((longint'(par[3:0]) + longint'(we[3][3:0]) + longint'(d)) >> 4) != 0) crossings++;
    endtask

    initial begin
      for (int k = 0; k < 4; k++) we[k] = '1;
      d = 1'b1;
      check();
      for (int k = 0; k < 4; k++) we[k] = '0;
      d = 1'b0;
      check();
      // Row sum all ones, chain operand 1: carry ripples the whole word.
      we[0] = '1; we[1] = '0; we[2] = '0; we[3] = N'(1); d = 1'b0;
      check();
      for (int v = 0; v < VECTORS; v++) begin
        for (int k = 0; k < 4; k++) we[k] = N'({$urandom, $urandom});
        d = 1'($urandom);
        check();
      end
      checks++;
      if (couts == 0 || (N > 4 && crossings == 0)) begin
        failures++;
        $display("FAIL N=%0d: couts=%0d crossings=%0d", N, couts, crossings);
      end
      $display("N=%0d: chain carry outs %0d, segment crossings %0d", N, couts, crossings);
      done[g] = 1'b1;
    end
  end

  initial begin
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
