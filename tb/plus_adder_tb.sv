// plus_adder_tb: checks the '+' adder against a bit-serial ripple sum
// computed in the testbench, on corner cases and 20000 random pairs.
module plus_adder_tb;
  logic [15:0] a, b;
  logic [16:0] s, e;
  logic        clk = 1'b0;
  int          checks = 0, failures = 0, cycles = 0;

  plus_adder dut (.a(a), .b(b), .s(s));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 100000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  function automatic logic [16:0] ripple(logic [15:0] x, logic [15:0] y);
    logic c;
    logic [16:0] r;
    c = 1'b0;
    for (int i = 0; i < 16; i++) begin
      r[i] = x[i] ^ y[i] ^ c;
      c    = (x[i] & y[i]) | (c & (x[i] ^ y[i]));
    end
    r[16] = c;
    return r;
  endfunction

  task automatic check(logic [15:0] x, logic [15:0] y);
    a = x; b = y;
    #1;
    e = ripple(x, y);
    checks++;
    if (s != e) begin
      failures++;
      if (failures < 10) $display("FAIL %0d + %0d -> %0d exp %0d", x, y, s, e);
    end
  endtask

  initial begin
    check(16'h0000, 16'h0000);
    check(16'hFFFF, 16'h0001);
    check(16'hFFFF, 16'hFFFF);
    check(16'h8000, 16'h7FFF);
    for (int i = 0; i < 20000; i++) check(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
