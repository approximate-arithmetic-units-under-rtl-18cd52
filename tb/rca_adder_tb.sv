// rca_adder_tb: checks the ripple-carry adder.
//  - dut  : default 16-bit exact adder, compared with integer a + b + cin on
//           corner cases and 20000 random operand pairs.
//  - dut8 : 8-bit adder with a simplified full adder at bit 4, checked
//           exhaustively (all a, b, cin) against the reference model in which
//           bit 4 gives (a^b)|c and passes on only a&b.
module rca_adder_tb
  import approx_ref_pkg::*;
;
  logic [15:0] a, b, s;
  logic        cin, cout;
  logic [7:0]  a8, b8, s8;
  logic        cin8, cout8;
  logic        clk = 1'b0;
  int          checks = 0, failures = 0, cycles = 0;
  int          sfa_diff = 0;
  longint unsigned exp_v;

  rca_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));
  rca_adder #(.W(8), .SFA_POS(4)) dut8 (.a(a8), .b(b8), .cin(cin8), .s(s8), .cout(cout8));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 100000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic check16(logic [15:0] x, logic [15:0] y, logic c);
    a = x; b = y; cin = c;
    #1;
    checks++;
    if ({cout, s} != 17'(x) + 17'(y) + 17'(c)) begin
      failures++;
      $display("FAIL rca16 %0d + %0d + %0d -> %0d", x, y, c, {cout, s});
    end
  endtask

  initial begin
    check16(16'h0000, 16'h0000, 1'b0);
    check16(16'hFFFF, 16'h0001, 1'b0);
    check16(16'hFFFF, 16'h0000, 1'b1);
    check16(16'hFFFF, 16'hFFFF, 1'b1);
    check16(16'h8000, 16'h8000, 1'b0);
    check16(16'h5555, 16'hAAAA, 1'b1);
    for (int i = 0; i < 20000; i++) check16(16'($urandom), 16'($urandom), 1'($urandom));

    for (int v = 0; v < 2 * 256 * 256; v++) begin
      {cin8, a8, b8} = 17'(v);
      #1;
      exp_v = sfa_add_ref(64'(a8), 64'(b8), 9, 4, cin8);
      checks++;
      if ({cout8, s8} != 9'(exp_v)) begin
        failures++;
        if (failures < 10) $display("FAIL rca8/sfa4 %0d + %0d + %0d -> %0d exp %0d",
                                    a8, b8, cin8, {cout8, s8}, exp_v);
      end
      if (9'(exp_v) != 9'(a8) + 9'(b8) + 9'(cin8)) sfa_diff++;
    end
    // the SFA must really change some sums: 011/101 at bit 4 happens often
    checks++;
    if (sfa_diff == 0) begin
      failures++;
      $display("FAIL reference never differs from exact");
    end
    $display("rca8 with SFA at bit 4: %0d of %0d sums differ from exact", sfa_diff, 2 * 65536);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
