// tb_rev_half_adder: exhaustive check of the half adder: {carry, sum} must
// equal a + b for all four input pairs.
module tb_rev_half_adder;
  logic a, b, sum, carry;
  int checks = 0, failures = 0;

  rev_half_adder dut (.a(a), .b(b), .sum(sum), .carry(carry));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if ({carry, sum} !== 2'(a) + 2'(b)) begin
        failures++;
        $display("FAIL a=%b b=%b got carry,sum=%b%b", a, b, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
