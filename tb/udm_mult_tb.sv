// udm_mult_tb: checks the recursive block multiplier in its four settings
// (Mult16, UDM16, UDM16_SFA, UDM16_SFA_SW) against the integer reference
// model udm_ref:
//  - 16-bit instances on corner cases and 30000 random pairs;
//  - 8-bit and 4-bit instances of every setting exhaustively;
//  - the exact setting must equal a * b; no approximate product may exceed
//    a * b; the SFA settings in both adder shapes must agree; and the
//    under-designed blocks and the SFA cells must each change some products.
module udm_mult_tb
  import approx_ref_pkg::*;
;
  logic [15:0] a, b;
  logic [31:0] p16 [4];
  logic [31:0] p_def;
  logic [7:0]  a8, b8;
  logic [15:0] p8 [4];
  logic [3:0]  a4, b4;
  logic [7:0]  p4 [4];
  logic        clk = 1'b0;
  int          checks = 0, failures = 0, cycles = 0;
  int          udm_effect = 0, sfa_effect = 0;

  localparam bit CA [4] = '{1'b0, 1'b1, 1'b1, 1'b1};  // APPROX
  localparam bit CS [4] = '{1'b0, 1'b0, 1'b1, 1'b1};  // SFA
  localparam bit CW [4] = '{1'b0, 1'b0, 1'b0, 1'b1};  // SW_FORM

  for (genvar i = 0; i < 4; i++) begin : g_dut
    udm_mult #(.N(16), .APPROX(CA[i]), .SFA(CS[i]), .SW_FORM(CW[i])) d16 (.a(a),  .b(b),  .p(p16[i]));
    udm_mult #(.N(8),  .APPROX(CA[i]), .SFA(CS[i]), .SW_FORM(CW[i])) d8  (.a(a8), .b(b8), .p(p8[i]));
    udm_mult #(.N(4),  .APPROX(CA[i]), .SFA(CS[i]), .SW_FORM(CW[i])) d4  (.a(a4), .b(b4), .p(p4[i]));
  end
  udm_mult dut_def (.a(a), .b(b), .p(p_def));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 1000000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic cmp(longint unsigned got, longint unsigned exp_v, string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 12) $display("FAIL %s: got %0d exp %0d", what, got, exp_v);
    end
  endtask

  task automatic apply16(logic [15:0] x, logic [15:0] y);
    longint unsigned exact;
    a = x; b = y;
    #1;
    exact = 64'(x) * 64'(y);
    cmp(64'(p16[0]), exact, $sformatf("Mult16 %0d*%0d", x, y));
    for (int i = 1; i < 4; i++) begin
      cmp(64'(p16[i]), udm_ref(64'(x), 64'(y), 16, CA[i], CS[i]), $sformatf("cfg%0d %0d*%0d", i, x, y));
      checks++;
      if (64'(p16[i]) > exact) begin
        failures++;
        $display("FAIL cfg%0d product above exact", i);
      end
    end
    cmp(64'(p16[3]), 64'(p16[2]), "SFA shapes differ");
    cmp(64'(p_def), 64'(p16[2]), "default instance");
    if (p16[1] != exact[31:0]) udm_effect++;
    if (p16[2] != p16[1]) sfa_effect++;
  endtask

  initial begin
    apply16(16'h0000, 16'h0000);
    apply16(16'hFFFF, 16'hFFFF);
    apply16(16'h0003, 16'h0003);
    apply16(16'h3333, 16'h3333);
    apply16(16'h8000, 16'h0001);
    for (int n = 0; n < 30000; n++) apply16(16'($urandom), 16'($urandom));
    for (int v = 0; v < 65536; v++) begin
      {a8, b8} = 16'(v);
      {a4, b4} = 8'(v);
      #1;
      for (int i = 0; i < 4; i++) begin
        cmp(64'(p8[i]), udm_ref(64'(a8), 64'(b8), 8, CA[i], CS[i]), $sformatf("n8 cfg%0d %0d*%0d", i, a8, b8));
        if (v < 256)
          cmp(64'(p4[i]), udm_ref(64'(a4), 64'(b4), 4, CA[i], CS[i]), $sformatf("n4 cfg%0d %0d*%0d", i, a4, b4));
      end
    end
    $display("16-bit random: UDM blocks changed %0d products, SFA cells changed %0d more",
             udm_effect, sfa_effect);
    checks += 2;
    if (udm_effect == 0) begin failures++; $display("FAIL UDM blocks never changed a product"); end
    if (sfa_effect == 0) begin failures++; $display("FAIL SFA cells never changed a product"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
