// mult2x2_tb: exhaustive check of both forms of the 2x2 block against the
// modified Karnaugh map: the approximate block equals a * b except 3 * 3 = 7;
// the exact block equals a * b everywhere. Over the 16 input pairs the
// approximate block must be wrong exactly once (error rate 1/16) with a
// largest relative error of 2/9 (22.2 %).
module mult2x2_tb;
  logic [1:0] a, b;
  logic [3:0] pa, pe;
  logic       clk = 1'b0;
  int         checks = 0, failures = 0, cycles = 0;
  int         exp_a;
  int         n_wrong = 0;
  real        max_rel = 0.0;

  mult2x2 #(.APPROX(1'b1)) dut_udm   (.a(a), .b(b), .p(pa));
  mult2x2 #(.APPROX(1'b0)) dut_exact (.a(a), .b(b), .p(pe));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 1000) begin
      failures++;
      $display("approximate block: %0d of 16 wrong, largest relative error %0.4f", n_wrong, max_rel);
    checks += 2;
    if (n_wrong != 1) begin failures++; $display("FAIL error rate not 1/16"); end
    if (max_rel < 0.2222 || max_rel > 0.2223) begin failures++; $display("FAIL max error not 2/9"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a, b} = 4'(v);
      #1;
      exp_a = (a == 2'd3 && b == 2'd3) ? 7 : int'(a) * int'(b);
      checks += 2;
      if (int'(pa) != exp_a) begin
        failures++;
        $display("FAIL udm %0d*%0d -> %0d exp %0d", a, b, pa, exp_a);
      end
      if (int'(pa) != int'(a) * int'(b)) begin
        n_wrong++;
        if (real'(int'(a) * int'(b) - int'(pa)) / real'(int'(a) * int'(b)) > max_rel)
          max_rel = real'(int'(a) * int'(b) - int'(pa)) / real'(int'(a) * int'(b));
      end
      if (int'(pe) != int'(a) * int'(b)) begin
        failures++;
        $display("FAIL exact %0d*%0d -> %0d", a, b, pe);
      end
    end
    $display("approximate block: %0d of 16 wrong, largest relative error %0.4f", n_wrong, max_rel);
    checks += 2;
    if (n_wrong != 1) begin failures++; $display("FAIL error rate not 1/16"); end
    if (max_rel < 0.2222 || max_rel > 0.2223) begin failures++; $display("FAIL max error not 2/9"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
