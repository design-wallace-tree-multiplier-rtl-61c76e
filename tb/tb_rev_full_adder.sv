// tb_rev_full_adder: exhaustive check of the full adder: {carry, sum} must
// equal a + b + cin for all eight input combinations.
module tb_rev_full_adder;
  logic a, b, cin, sum, carry;
  int checks = 0, failures = 0;

  rev_full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .carry(carry));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, cin} = 3'(i);
      #1;
      checks++;
      if ({carry, sum} !== 2'(a) + 2'(b) + 2'(cin)) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b got carry,sum=%b%b", a, b, cin, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
