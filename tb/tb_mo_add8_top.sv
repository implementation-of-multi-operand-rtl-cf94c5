// tb_mo_add8_top: end-to-end test of the pipelined eight-operand adder at
// its default width (N = 16).
//
// A stream of operand sets is presented with in_valid, mostly back to back
// and with random idle cycles. A reference queue holds the expected sum of
// each set; every out_valid must pop a matching entry exactly three clock
// edges after the set went in (two edges for the carry-save pair, which is
// checked too). The test counts how often each mechanism of the datapath
// occurred and fails if one never did:
//   - carry out of a first-level carry-chain unit,
//   - carry out of the second-level unit,
//   - carry out of the final adder's chain into the top sum bit,
//   - a carry crossing a 4-bit carry-chain segment boundary in the final adder,
//   - back-to-back operand sets and idle cycles between sets.
// It also sends the all-ones and all-zeros sets and checks the reset state.
module tb_mo_add8_top;
  localparam int N = 16;
  localparam int SETS = 5000;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         in_valid = 1'b0;
  logic [N-1:0] a [8];
  logic         cs_valid, out_valid;
  logic [N+1:0] s_cs, c_cs;
  logic [N+2:0] sum;

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_l1_cout = 0, n_l2_cout = 0, n_cpa_cout = 0, n_seg_cross = 0;
  int n_back_to_back = 0, n_idle = 0, n_out = 0;

  typedef struct {
    longint value;
    int     cycle_in;
  } exp_t;
  exp_t expq [$];   // sets waiting for sum
  exp_t csq  [$];   // sets waiting for the carry-save pair

  mo_add8_top dut (
    .clk, .rst_n, .in_valid, .a,
    .cs_valid, .s_cs, .c_cs, .out_valid, .sum
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (SETS * 4 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle <= cycle + 1;

  // Mechanism counters, sampled from inside the datapath.
  always @(posedge clk) if (rst_n) begin
    if (dut.u_tree.lvl1_s[0][N] || dut.u_tree.lvl1_s[1][N]) n_l1_cout++;
    if (dut.s_tree[N+1]) n_l2_cout++;
    if (dut.sum_d[N+2]) n_cpa_cout++;
    if (dut.u_cpa.carry_o[3] && dut.u_cpa.prop[4]) n_seg_cross++;
  end

  // Output checker.
  always @(posedge clk) if (rst_n) begin
    if (cs_valid) begin
      exp_t e;
      checks += 2;
      if (csq.size() == 0) begin
        failures++;
        $display("FAIL cs_valid with nothing outstanding");
      end else begin
        e = csq.pop_front();
        if (longint'(s_cs) + longint'(c_cs) != e.value) begin
          failures++;
          if (failures < 10) $display("FAIL s_cs+c_cs=%0d expected %0d", longint'(s_cs) + longint'(c_cs), e.value);
        end
        if (cycle - e.cycle_in != 2) begin
          failures++;
          $display("FAIL carry-save latency %0d cycles, expected 2", cycle - e.cycle_in);
        end
      end
    end
    if (out_valid) begin
      exp_t e;
      checks += 2;
      n_out++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL out_valid with nothing outstanding");
      end else begin
        e = expq.pop_front();
        if (longint'(sum) != e.value) begin
          failures++;
          if (failures < 10) $display("FAIL sum=%0d expected %0d", sum, e.value);
        end
        if (cycle - e.cycle_in != 3) begin
          failures++;
          $display("FAIL latency %0d cycles, expected 3", cycle - e.cycle_in);
        end
      end
    end
  end

  task automatic send(input logic [N-1:0] ops [8]);
    longint total = 0;
    for (int k = 0; k < 8; k++) total += longint'(ops[k]);
    a = ops;
    in_valid = 1'b1;
    @(posedge clk);
    expq.push_back('{total, cycle});
    csq.push_back('{total, cycle});
    #1 in_valid = 1'b0;
  endtask

  initial begin
    logic [N-1:0] ops [8];
    logic         prev_valid = 1'b0;
    for (int k = 0; k < 8; k++) a[k] = '0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (cs_valid || out_valid || sum != '0) begin
      failures++;
      $display("FAIL outputs not cleared by reset");
    end
    rst_n = 1'b1;

    for (int k = 0; k < 8; k++) ops[k] = '1;
    send(ops);
    for (int k = 0; k < 8; k++) ops[k] = '0;
    send(ops);

    for (int v = 0; v < SETS; v++) begin
      if ($urandom_range(0, 4) == 0) begin
        @(posedge clk);
        #1;
        n_idle++;
        prev_valid = 1'b0;
      end
      for (int k = 0; k < 8; k++) ops[k] = N'($urandom);
      if (prev_valid) n_back_to_back++;
      send(ops);
      prev_valid = 1'b1;
    end
    repeat (6) @(posedge clk);

    checks += 2;
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL %0d results never came out", expq.size());
    end
    if (n_out != SETS + 2) begin
      failures++;
      $display("FAIL %0d results, expected %0d", n_out, SETS + 2);
    end
    $display("mechanisms: level-1 chain carry out %0d, level-2 chain carry out %0d, final carry out %0d, segment crossings %0d, back-to-back sets %0d, idle cycles %0d",
             n_l1_cout, n_l2_cout, n_cpa_cout, n_seg_cross, n_back_to_back, n_idle);
    checks++;
    if (n_l1_cout == 0 || n_l2_cout == 0 || n_cpa_cout == 0 || n_seg_cross == 0 ||
        n_back_to_back == 0 || n_idle == 0) begin
      failures++;
      $display("FAIL a datapath mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
