// tb_final_rca: checks the ripple-carry adder at its default width (13).
// s must equal x + y. Runs directed corner cases (all ones, a carry that
// ripples through every position) and random operands, and counts how often
// the carry out and a full-length carry ripple occur.
module tb_final_rca;
  localparam int W = 13;
  logic [W-1:0] x;
  logic [W-2:0] y;
  logic [W:0]   s;
  int checks = 0, failures = 0;
  int n_cout = 0, n_long = 0;

  final_rca #(.W(W)) dut (.x(x), .y(y), .s(s));

  task automatic check();
    logic [W:0] e;
    #1;
    e = (W+1)'(x) + (W+1)'(y);
    checks++;
    if (s !== e) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d y=%0d got %0d exp %0d", x, y, s, e);
    end
    if (s[W]) n_cout++;
    // carry generated at position 0 and propagated to the top
    if (x[0] && y[0] && (x[W-2:1] ^ y[W-2:1]) == '1 && x[W-1]) n_long++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '1; y = '1; check();
    x = '0; y = '0; check();
    // carry born at position 0, propagated through all others, out at the top
    x = {1'b1, {(W-2){1'b0}}, 1'b1}; y = '1; check();
    for (int i = 0; i < 20000; i++) begin
      x = W'($urandom);
      y = (W-1)'($urandom);
      check();
    end
    checks++;
    if (n_cout == 0 || n_long == 0) begin
      failures++;
      $display("FAIL coverage: carry out %0d, full ripple %0d", n_cout, n_long);
    end
    $display("carry out %0d times, full-length ripple %0d times", n_cout, n_long);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
