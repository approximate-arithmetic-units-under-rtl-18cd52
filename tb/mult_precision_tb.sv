// mult_precision_tb: the study's two multiplier data sets, run on arith_top
// at a clock period long enough for no timing errors.
//
// Data set 0, "random": NOPS uniformly random 16-bit operand pairs.
// Data set 1, "mantissa": NOPS pairs shaped like the neural-network software
// model's half-precision multiplications: each operand is an 11-bit mantissa
// {1, 10 random fraction bits}; the first is placed at bits 14..4 (one 0
// above, four 0s below), the second at bits 15..5 (five 0s below).
// Data set 2, "11-bit": every pair of operands from 1 to 2^11 - 1, the
// exhaustive check the study ran on its exact multipliers.
// For each multiplier and data set the testbench counts exact products
// (precision, in %) and the mean relative error over all operations,
// MRE = (1/NOPS) * sum |exact - approx| / exact (pairs with a zero exact
// product add nothing; MRE is divided by the size of the data set). Checks: Mult16 and '*' are always exact; no
// approximate product exceeds the exact one; UDM16_SFA and UDM16_SFA_SW give
// the same products; UDM16 (one source of approximation) is more precise
// than the SFA multipliers (two sources) on both data sets.
module mult_precision_tb
  import approx_arith_pkg::*;
;
  localparam int NOPS  = 10_000_000;       // data sets 0 and 1
  localparam int M11   = (1 << 11) - 1;    // data set 2 operand range 1 .. M11
  localparam int NSET  = 3;

  logic              clk = 1'b0;
  logic [OP_W-1:0]   add_a = '0, add_b = '0, mul_a = '0, mul_b = '0;
  logic [SUM_W-1:0]  add_sum  [NUM_ADDERS];
  logic [PROD_W-1:0] mul_prod [NUM_MULTS];

  int     checks = 0, failures = 0;
  longint cycles = 0;
  int     right  [NSET][NUM_MULTS];
  real    rel    [NSET][NUM_MULTS];
  int     above = 0, sw_diff = 0;
  logic [31:0] exact_q [2];

  arith_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 2 * longint'(NOPS) + longint'(M11 * M11) + 1000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  function automatic int set_size(int d);
    return (d == 2) ? M11 * M11 : NOPS;
  endfunction

  initial begin
    real mre, prec;
    foreach (right[d, i]) begin right[d][i] = 0; rel[d][i] = 0.0; end
    for (int d = 0; d < NSET; d++) begin
      for (int n = 0; n < set_size(d) + 2; n++) begin
        @(negedge clk);
        if (n >= 2) begin
          for (int i = 0; i < NUM_MULTS; i++) begin
            if (mul_prod[i] == exact_q[0]) right[d][i]++;
            else if (mul_prod[i] > exact_q[0]) above++;
            else rel[d][i] += real'(exact_q[0] - mul_prod[i]) / real'(exact_q[0]);
          end
          if (mul_prod[MUL_UDM16_SFA] != mul_prod[MUL_UDM16_SFA_SW]) sw_diff++;
        end
        exact_q[0] = exact_q[1];
        if (n < set_size(d)) begin
          if (d == 2) begin
            mul_a = 16'(n / M11 + 1);
            mul_b = 16'(n % M11 + 1);
          end else if (d == 0) begin
            mul_a = 16'($urandom);
            mul_b = 16'($urandom);
          end else begin
            mul_a = {1'b0, 1'b1, 10'($urandom), 4'b0000};
            mul_b = {1'b1, 10'($urandom), 5'b00000};
          end
        end
        exact_q[1] = 32'(mul_a) * 32'(mul_b);
      end
    end

    for (int d = 0; d < NSET; d++) begin
      for (int i = 0; i < NUM_MULTS; i++) begin
        prec = 100.0 * real'(right[d][i]) / real'(set_size(d));
        mre  = 100.0 * rel[d][i] / real'(set_size(d));
        $display("%-8s %-17s precision %9.5f %%  MRE %10.6f %%",
                 d == 0 ? "random" : d == 1 ? "mantissa" : "11-bit", mult_e'(i), prec, mre);
      end
      checks += 3;
      if (right[d][MUL_MULT16] != set_size(d) || right[d][MUL_STAR] != set_size(d)) begin
        failures++;
        $display("FAIL exact multiplier wrong on data set %0d", d);
      end
      if (right[d][MUL_UDM16] <= right[d][MUL_UDM16_SFA]) begin
        failures++;
        $display("FAIL UDM16 not more precise than UDM16_SFA on data set %0d", d);
      end
      if (right[d][MUL_UDM16] == set_size(d)) begin
        failures++;
        $display("FAIL UDM16 never approximated on data set %0d", d);
      end
    end
    checks += 2;
    if (above != 0)   begin failures++; $display("FAIL %0d products above exact", above); end
    if (sw_diff != 0) begin failures++; $display("FAIL %0d SFA/SFA_SW mismatches", sw_diff); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
