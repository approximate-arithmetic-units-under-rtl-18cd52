// arith_top_tb: end-to-end test of arith_top at its default parameters.
//
// A new operand pair is applied to the adders and to the multipliers on
// every clock cycle (back-to-back issue). Every result must appear exactly
// two clock edges after its operands and must equal the reference model:
// exact sums for the ripple-carry, Kogge-Stone and '+' adders, gear_ref for
// the ten GeAr-family adders, a * b for Mult16 and '*', udm_ref for the
// three approximate multipliers. Half of the multiplier operands have the
// half-precision-mantissa shape the study's software model used (11-bit
// mantissa with its hidden 1, one operand shifted left by 4, the other by 5);
// the rest are uniform 16-bit values.
// Mechanisms counted, each of which must happen at least once: a carry-
// prediction miss in each of the ten approximate adders, a product changed
// by the under-designed 2x2 blocks in each approximate multiplier, a product
// further changed by the simplified full adders in each SFA multiplier, and
// a run of back-to-back results on consecutive cycles.
module arith_top_tb
  import approx_arith_pkg::*;
  import approx_ref_pkg::*;
;
  localparam int NCYC = 40000;

  logic              clk = 1'b0;
  logic [OP_W-1:0]   add_a, add_b, mul_a, mul_b;
  logic [SUM_W-1:0]  add_sum  [NUM_ADDERS];
  logic [PROD_W-1:0] mul_prod [NUM_MULTS];

  int checks = 0, failures = 0, cycles = 0;
  int carry_miss [NUM_GEAR];
  int udm_change [NUM_MULTS];
  int sfa_change [NUM_MULTS];
  int back_to_back = 0, mantissa_ops = 0;

  logic [OP_W-1:0] ha [NCYC+2], hb [NCYC+2], hma [NCYC+2], hmb [NCYC+2];

  arith_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > NCYC + 1000) begin
      failures++;
      $display("watchdog expired");
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

  // results of the pair applied at negedge n are on the outputs at negedge n+2
  task automatic check_pair(int n);
    longint unsigned x, y, exact, e;
    gear_cfg_t gc;
    x = 64'(ha[n]); y = 64'(hb[n]);
    exact = x + y;
    for (int i = 0; i < NUM_GEAR; i++) begin
      gc = gear_cfg(i);
      e  = gear_ref(x, y, 16, int'(gc.r), int'(gc.p));
      cmp(64'(add_sum[i]), e, $sformatf("%s pair %0d", adder_e'(i), n));
      if (e != exact) carry_miss[i]++;
    end
    cmp(64'(add_sum[ADD_RCA]),  exact, "RCA");
    cmp(64'(add_sum[ADD_KSA]),  exact, "KSA");
    cmp(64'(add_sum[ADD_PLUS]), exact, "PLUS");

    x = 64'(hma[n]); y = 64'(hmb[n]);
    exact = x * y;
    cmp(64'(mul_prod[MUL_MULT16]), exact, "Mult16");
    cmp(64'(mul_prod[MUL_STAR]),   exact, "STAR");
    for (int i = 1; i < NUM_BLOCKM; i++) begin
      mult_cfg_t mc;
      mc = mult_cfg(i);
      e  = udm_ref(x, y, 16, mc.approx, mc.sfa);
      cmp(64'(mul_prod[i]), e, $sformatf("%s pair %0d", mult_e'(i), n));
      if (udm_ref(x, y, 16, 1'b1, 1'b0) != exact) udm_change[i]++;
      if (mc.sfa && e != udm_ref(x, y, 16, 1'b1, 1'b0)) sfa_change[i]++;
    end
  endtask

  initial begin
    foreach (carry_miss[i]) carry_miss[i] = 0;
    foreach (udm_change[i]) begin udm_change[i] = 0; sfa_change[i] = 0; end
    for (int n = 0; n < NCYC + 2; n++) begin
      @(negedge clk);
      if (n >= 2) begin
        check_pair(n - 2);
        if (n >= 3) back_to_back++;
      end
      if (n < NCYC) begin
        ha[n] = 16'($urandom);
        hb[n] = 16'($urandom);
        if (n % 2 == 0) begin
          // half-precision mantissas: {1, 10 fraction bits}, shifted into 16 bits
          hma[n] = {1'b0, 1'b1, 10'($urandom), 4'b0000};
          hmb[n] = {1'b1, 10'($urandom), 5'b00000};
          mantissa_ops++;
        end else begin
          hma[n] = 16'($urandom);
          hmb[n] = 16'($urandom);
        end
      end else begin
        ha[n] = '0; hb[n] = '0; hma[n] = '0; hmb[n] = '0;
      end
      add_a = ha[n]; add_b = hb[n]; mul_a = hma[n]; mul_b = hmb[n];
    end

    // latency: one pair followed by zeros must show up after exactly 2 edges
    @(negedge clk);
    add_a = 16'hFFFF; add_b = 16'h0001; mul_a = 16'h00FF; mul_b = 16'h0101;
    @(negedge clk);
    add_a = '0; add_b = '0; mul_a = '0; mul_b = '0;
    checks++;
    if (add_sum[ADD_RCA] != 17'h0 || mul_prod[MUL_STAR] != 32'h0) begin
      failures++;
      $display("FAIL result visible after one edge");
    end
    @(negedge clk);
    cmp(64'(add_sum[ADD_RCA]), 64'h10000, "latency 2 adder");
    cmp(64'(mul_prod[MUL_STAR]), 64'h00FF * 64'h0101, "latency 2 multiplier");

    for (int i = 0; i < NUM_GEAR; i++) begin
      $display("%-16s carry-prediction misses: %0d of %0d", adder_e'(i), carry_miss[i], NCYC);
      checks++;
      if (carry_miss[i] == 0) begin failures++; $display("FAIL no miss in %s", adder_e'(i)); end
    end
    for (int i = 1; i < NUM_BLOCKM; i++) begin
      $display("%-16s UDM-changed products: %0d, SFA-changed: %0d", mult_e'(i), udm_change[i], sfa_change[i]);
      checks++;
      if (udm_change[i] == 0) begin failures++; $display("FAIL no UDM effect in %s", mult_e'(i)); end
      if (mult_cfg(i).sfa) begin
        checks++;
        if (sfa_change[i] == 0) begin failures++; $display("FAIL no SFA effect in %s", mult_e'(i)); end
      end
    end
    $display("back-to-back results: %0d, mantissa-shaped multiplications: %0d", back_to_back, mantissa_ops);
    checks += 2;
    if (back_to_back == 0) begin failures++; $display("FAIL no back-to-back results"); end
    if (mantissa_ops == 0) begin failures++; $display("FAIL no mantissa-shaped operands"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
