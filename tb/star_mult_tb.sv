// star_mult_tb: checks the '*' multiplier against a shift-and-add product
// computed in the testbench, on corner cases and 20000 random pairs.
module star_mult_tb;
  logic [15:0] a, b;
  logic [31:0] p, e;
  logic        clk = 1'b0;
  int          checks = 0, failures = 0, cycles = 0;

  star_mult dut (.a(a), .b(b), .p(p));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 100000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  function automatic logic [31:0] shift_add(logic [15:0] x, logic [15:0] y);
    logic [31:0] acc;
    acc = '0;
    for (int i = 0; i < 16; i++) if (y[i]) acc += 32'(x) << i;
    return acc;
  endfunction

  task automatic check(logic [15:0] x, logic [15:0] y);
    a = x; b = y;
    #1;
    e = shift_add(x, y);
    checks++;
    if (p != e) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d -> %0d exp %0d", x, y, p, e);
    end
  endtask

  initial begin
    check(16'h0000, 16'hFFFF);
    check(16'hFFFF, 16'hFFFF);
    check(16'h0001, 16'h8001);
    check(16'h8000, 16'h8000);
    for (int i = 0; i < 20000; i++) check(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
