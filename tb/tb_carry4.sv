// tb_carry4: exhaustive check of the 4-bit carry-chain segment. Any select
// and data pattern is the chain for a = di, b = di ^ sel, so the outputs
// must equal a + b + ci: o the low four bits, co[i] the carry out of bit i.
module tb_carry4;
  logic       ci;
  logic [3:0] di, sel, o, co;
  int checks = 0, failures = 0;

  carry4 dut (.ci(ci), .di(di), .sel(sel), .o(o), .co(co));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      logic [3:0] a, b;
      int total;
      {ci, di, sel} = 9'(v);
      a = di;
      b = di ^ sel;
      #1;
      total = int'(a) + int'(b) + int'(ci);
      checks++;
      if (o != total[3:0]) begin
        failures++;
        $display("FAIL o: ci=%0d di=%h sel=%h o=%h expected %h", ci, di, sel, o, total[3:0]);
      end
      for (int i = 0; i < 4; i++) begin
        int part;
        part = int'(a & 4'((1 << (i+1)) - 1)) + int'(b & 4'((1 << (i+1)) - 1)) + int'(ci);
        checks++;
        if (co[i] != part[i+1]) begin
          failures++;
          $display("FAIL co[%0d]: ci=%0d di=%h sel=%h", i, ci, di, sel);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
