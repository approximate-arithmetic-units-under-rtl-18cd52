// sfa_cell_tb: exhaustive check of the simplified full adder against its
// error table: the result {cout, s} equals a + b + cin except for
// (a, b, cin) = (0,1,1) and (1,0,1), where it is 1 instead of 2.
module sfa_cell_tb;
  logic a, b, cin, s, cout;
  logic clk = 1'b0;
  int   checks = 0, failures = 0, cycles = 0;
  int   exp_v;

  sfa_cell dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 1000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      exp_v = (v == 3 || v == 5) ? 1 : int'(a) + int'(b) + int'(cin);
      checks++;
      if (int'({cout, s}) != exp_v) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d -> %0d expected %0d", a, b, cin, {cout, s}, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
