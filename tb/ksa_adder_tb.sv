// ksa_adder_tb: checks the Kogge-Stone adder against integer addition:
// the default 16-bit adder on corner cases and 50000 random pairs, and an
// 8-bit instance exhaustively.
module ksa_adder_tb;
  logic [15:0] a, b;
  logic [16:0] s;
  logic [7:0]  a8, b8;
  logic [8:0]  s8;
  logic        clk = 1'b0;
  int          checks = 0, failures = 0, cycles = 0;

  ksa_adder dut (.a(a), .b(b), .s(s));
  ksa_adder #(.W(8)) dut8 (.a(a8), .b(b8), .s(s8));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 100000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic check16(logic [15:0] x, logic [15:0] y);
    a = x; b = y;
    #1;
    checks++;
    if (s != 17'(x) + 17'(y)) begin
      failures++;
      if (failures < 10) $display("FAIL ksa16 %0d + %0d -> %0d", x, y, s);
    end
  endtask

  initial begin
    check16(16'h0000, 16'h0000);
    check16(16'hFFFF, 16'h0001);
    check16(16'hFFFF, 16'hFFFF);
    check16(16'h7FFF, 16'h0001);
    check16(16'h00FF, 16'h0001);
    check16(16'h5555, 16'hAAAA);
    for (int i = 0; i < 50000; i++) check16(16'($urandom), 16'($urandom));
    for (int v = 0; v < 65536; v++) begin
      {a8, b8} = 16'(v);
      #1;
      checks++;
      if (s8 != 9'(a8) + 9'(b8)) begin
        failures++;
        if (failures < 10) $display("FAIL ksa8 %0d + %0d -> %0d", a8, b8, s8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
