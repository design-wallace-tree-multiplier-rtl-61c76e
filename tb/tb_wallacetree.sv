// tb_wallacetree: end-to-end test of the 8x8 multiplier at its default size,
// over all 65536 operand pairs.
// For every pair:
//   - y must equal the column model of the reduction (wallace_ref_pkg),
//   - y must never exceed a * b,
//   - y must equal a * b exactly whenever no compressor sees four ones.
// It counts each mechanism of the design: exact products, four-ones
// (approximate) compressor events in stage 1 and in stage 2, a carry that
// ripples through at least 8 positions of the final adder, and columns 0-2,
// which bypass the adder. A mechanism that never happens counts as a failure.
// It also prints the error statistics of the approximate product.
module tb_wallacetree;
  import wallace_ref_pkg::*;

  logic [7:0]  a, b;
  logic [16:0] y;
  int checks = 0, failures = 0;
  int n_exact = 0, n_approx = 0, n_sat1 = 0, n_sat2 = 0, n_ripple8 = 0, n_low = 0;
  longint err_sum = 0;
  int err_max = 0;

  wallacetree dut (.a(a), .b(b), .y(y));

  // Longest run of positions a carry travels in the final adder (columns 3..15).
  function automatic int ripple_len(input logic [15:0] r0, input logic [15:0] r1);
    int run = 0, best = 0;
    logic cy = 1'b0;
    for (int c = 3; c <= 15; c++) begin
      logic s2;
      s2 = (int'(r0[c]) + int'(r1[c]) + int'(cy)) >= 2;
      if (cy && s2) run++;
      else if (!cy && s2) run = 1;
      else run = 0;
      if (run > best) best = run;
      cy = s2;
    end
    return best;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_result_t m;
    int unsigned p;
    for (int i = 0; i < 65536; i++) begin
      {a, b} = 16'(i);
      #1;
      p = int'(a) * int'(b);
      m = reduce(partial_products(a, b));
      checks++;
      if (int'(y) != m.value) begin
        failures++;
        if (failures < 10) $display("FAIL %0d * %0d = %0d, model %0d", a, b, y, m.value);
      end
      checks++;
      if (int'(y) > p) begin
        failures++;
        if (failures < 10) $display("FAIL %0d * %0d = %0d above exact %0d", a, b, y, p);
      end
      if (m.sat[0] == 0 && m.sat[1] == 0) begin
        checks++;
        n_exact++;
        if (int'(y) != p) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d, exact %0d", a, b, y, p);
        end
      end
      if (int'(y) != p) begin
        n_approx++;
        err_sum += longint'(p) - longint'(y);
        if (int'(p - int'(y)) > err_max) err_max = int'(p - int'(y));
      end
      if (m.sat[0] > 0) n_sat1++;
      if (m.sat[1] > 0) n_sat2++;
      if (ripple_len(m.row0, m.row1) >= 8) n_ripple8++;
      if (y[2:0] != 0) n_low++;
    end
    // directed: the published example operands are not given; check a few by hand
    a = 8'd3;   b = 8'd5;   #1; checks++; if (y != 17'd15)    failures++;
    a = 8'd200; b = 8'd100; #1; checks++; if (y != 17'd20000) failures++;
    a = 8'd15;  b = 8'd15;  #1; checks++; if (y != 17'd209)   failures++;  // 225 exact
    a = 8'd255; b = 8'd255; #1; checks++; if (y != 17'd56593) failures++;  // 65025 exact
    checks++;
    if (n_exact == 0 || n_sat1 == 0 || n_sat2 == 0 || n_ripple8 == 0 || n_low == 0) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("exact %0d, approximate %0d (max error %0d, mean error over all %0.2f)",
             n_exact, n_approx, err_max, real'(err_sum) / 65536.0);
    $display("four ones in stage 1: %0d, stage 2: %0d; carry ripple >= 8: %0d; low bits set: %0d",
             n_sat1, n_sat2, n_ripple8, n_low);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
