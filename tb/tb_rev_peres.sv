// tb_rev_peres: exhaustive check of the Peres gate against its truth table.
// Expected outputs for inputs abc = 000 .. 111 are typed in from the table,
// one bit per row, row 000 leftmost.
module tb_rev_peres;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  localparam logic [0:7] EXP_P = 8'b00001111;
  localparam logic [0:7] EXP_Q = 8'b00111100;
  localparam logic [0:7] EXP_R = 8'b01010110;

  rev_peres dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      checks++;
      if ({p, q, r} !== {EXP_P[i], EXP_Q[i], EXP_R[i]}) begin
        failures++;
        $display("FAIL abc=%b got pqr=%b exp %b", {a, b, c}, {p, q, r},
                 {EXP_P[i], EXP_Q[i], EXP_R[i]});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
