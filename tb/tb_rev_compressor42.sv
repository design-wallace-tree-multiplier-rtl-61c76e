// tb_rev_compressor42: exhaustive check of the 4:2 compressor against the
// published truth table. Expected SUM and CARRY for abcd = 0000 .. 1111 are
// typed in from the table, row 0000 leftmost. The test also confirms the
// table's meaning: the output 2*carry + sum equals the number of ones for
// 0..3 ones, and is 2 for four ones.
module tb_rev_compressor42;
  logic a, b, c, d, sum, carry;
  int checks = 0, failures = 0;
  localparam logic [0:15] EXP_SUM   = 16'b0110_1001_1001_0110;
  localparam logic [0:15] EXP_CARRY = 16'b0001_0111_0111_1111;

  rev_compressor42 dut (.a(a), .b(b), .c(c), .d(d), .sum(sum), .carry(carry));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    for (int i = 0; i < 16; i++) begin
      {a, b, c, d} = 4'(i);
      #1;
      checks++;
      if ({sum, carry} !== {EXP_SUM[i], EXP_CARRY[i]}) begin
        failures++;
        $display("FAIL abcd=%b got sum=%b carry=%b exp %b %b", {a, b, c, d}, sum, carry,
                 EXP_SUM[i], EXP_CARRY[i]);
      end
      ones = $countones(4'(i));
      checks++;
      if (2 * int'(carry) + int'(sum) != ((ones == 4) ? 2 : ones)) begin
        failures++;
        $display("FAIL abcd=%b weighted output %0d for %0d ones", {a, b, c, d},
                 2 * int'(carry) + int'(sum), ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
