// tb_rev_cnot: exhaustive check of the CNOT gate against its truth table.
// The expected (p, q) for inputs ab = 00, 01, 10, 11 are typed in from the
// gate's table: 00, 01, 11, 10.
module tb_rev_cnot;
  logic a, b, p, q;
  int checks = 0, failures = 0;
  localparam logic [1:0] EXP [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  rev_cnot dut (.a(a), .b(b), .p(p), .q(q));

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
      if ({p, q} !== EXP[i]) begin
        failures++;
        $display("FAIL ab=%b got pq=%b exp %b", {a, b}, {p, q}, EXP[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
