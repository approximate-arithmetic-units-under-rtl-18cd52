// full_adder_tb: exhaustive check of the exact full adder cell against
// integer addition a + b + cin for all eight input combinations.
module full_adder_tb;
  logic a, b, cin, s, cout;
  logic clk = 1'b0;
  int   checks = 0, failures = 0, cycles = 0;

  full_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

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
      checks++;
      if ({cout, s} != 2'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d -> cout=%0d s=%0d", a, b, cin, cout, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
