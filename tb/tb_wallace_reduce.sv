// tb_wallace_reduce: checks the two-stage reduction against the column model
// in wallace_ref_pkg. The matrices are made from operand pairs and also drawn
// at random bit by bit, which reaches patterns no operand pair gives. Both
// output rows must match the model bit for bit. Where no compressor saw four
// ones, the two rows must add up to the exact weighted sum of the input
// matrix. The test also counts four-ones events in each stage. If either
// stage never sees one, that counts as a failure.
module tb_wallace_reduce;
  import wallace_ref_pkg::*;

  logic [7:0][7:0] pp;
  logic [15:0]     row0;
  logic [14:3]     row1;
  int checks = 0, failures = 0;
  int n_sat1 = 0, n_sat2 = 0, n_exact = 0;

  wallace_reduce dut (.pp(pp), .row0(row0), .row1(row1));

  task automatic check();
    ref_result_t m;
    int unsigned exact, got;
    #1;
    m = reduce(pp);
    exact = 0;
    for (int r = 0; r < 8; r++) exact += int'(pp[r]) << r;
    got = int'(row0) + (int'(row1) << 3);
    checks++;
    if (row0 !== m.row0 || row1 !== m.row1[14:3] || m.row1[2:0] != 0 || m.row1[15]
        || m.max_height > 2) begin
      failures++;
      if (failures < 10) $display("FAIL pp=%h rows %h %h model %h %h", pp, row0, row1,
                                  m.row0, m.row1);
    end
    if (m.sat[0] > 0) n_sat1++;
    if (m.sat[1] > 0) n_sat2++;
    if (m.sat[0] == 0 && m.sat[1] == 0) begin
      n_exact++;
      checks++;
      if (got != exact) begin
        failures++;
        if (failures < 10) $display("FAIL pp=%h rows add to %0d, exact %0d", pp, got, exact);
      end
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pp = '0; check();
    pp = '1; check();
    for (int i = 0; i < 4000; i++) begin
      pp = partial_products(8'($urandom), 8'($urandom));
      check();
    end
    for (int i = 0; i < 4000; i++) begin
      pp = {$urandom, $urandom};
      check();
    end
    checks++;
    if (n_sat1 == 0 || n_sat2 == 0 || n_exact == 0) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("four ones in stage 1: %0d, in stage 2: %0d, exact: %0d", n_sat1, n_sat2, n_exact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
