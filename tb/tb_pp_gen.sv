// tb_pp_gen: checks the partial-product AND array at the default 8x8 size.
// For every pair of operands, each bit must be a[k] & b[r], and the weighted
// sum of all rows must equal a * b.
module tb_pp_gen;
  logic [7:0] a, b;
  logic [7:0][7:0] pp;
  int checks = 0, failures = 0;

  pp_gen dut (.a(a), .b(b), .pp(pp));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned total;
    int bitfail;
    for (int i = 0; i < 65536; i++) begin
      {a, b} = 16'(i);
      #1;
      bitfail = 0;
      total = 0;
      for (int r = 0; r < 8; r++) begin
        for (int k = 0; k < 8; k++) begin
          if (pp[r][k] !== (a[k] & b[r])) bitfail++;
        end
        total += int'(pp[r]) << r;
      end
      checks++;
      if (bitfail != 0) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d b=%0d: %0d wrong bits", a, b, bitfail);
      end
      checks++;
      if (total != int'(a) * int'(b)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d b=%0d: rows sum to %0d", a, b, total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
