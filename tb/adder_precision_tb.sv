// adder_precision_tb: the study's random-operand adder experiment at a clock
// period long enough for no timing errors, run on arith_top.
//
// NOPS uniformly random 16-bit operand pairs go through all thirteen adders,
// one pair per clock. For each adder the testbench counts exact and wrong
// sums and sorts every error (exact - approximate) into power-of-two mag_cnt.
// It checks: the three exact adders are never wrong; each approximate
// adder's precision is within 0.05 percentage points of the published value
// for 10 million pairs; every error is a positive power of two between 2^8
// and 2^15; and each bin count is within 5 % (plus 30) of the published
// count, scaled to NOPS.
module adder_precision_tb
  import approx_arith_pkg::*;
;
  localparam int NOPS = 10_000_000;

  logic              clk = 1'b0;
  logic [OP_W-1:0]   add_a = '0, add_b = '0, mul_a = '0, mul_b = '0;
  logic [SUM_W-1:0]  add_sum  [NUM_ADDERS];
  logic [PROD_W-1:0] mul_prod [NUM_MULTS];

  int checks = 0, failures = 0;
  longint cycles = 0;
  int wrong [NUM_ADDERS];
  int mag_cnt  [NUM_ADDERS][8];   // error 2^(8+k)
  int odd   [NUM_ADDERS];      // errors outside the mag_cnt
  logic [16:0] exact_q [3];    // exact sums of the last three pairs

  // published error counts per 10^7 pairs, mag_cnt 2^8 .. 2^15, per setting
  int pub_mag [5][8] = '{
    '{19661, 19619, 19603, 19419, 19439, 19452, 19405, 19654},   // ACA-I
    '{293147, 0, 0, 0, 292892, 0, 0, 0},                         // ACA-II
    '{0, 0, 14773, 0, 14754, 0, 14764, 0},                       // GeAr2
    '{0, 0, 0, 0, 18454, 0, 0, 0},                               // GeAr4
    '{0, 0, 0, 0, 0, 0, 19395, 0}                                // GeAr6
  };
  real pub_prec [5] = '{98.43748, 94.13961, 99.55709, 99.81546, 99.80605};

  arith_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > longint'(NOPS) + 1000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    int err, k;
    real prec;
    foreach (wrong[i]) begin wrong[i] = 0; odd[i] = 0; end
    foreach (mag_cnt[i, j]) mag_cnt[i][j] = 0;
    for (int n = 0; n < NOPS + 2; n++) begin
      @(negedge clk);
      if (n >= 2) begin
        for (int i = 0; i < NUM_ADDERS; i++) begin
          err = int'(exact_q[0]) - int'(add_sum[i]);
          if (err != 0) begin
            wrong[i]++;
            k = $clog2(err);
            if (err > 0 && $countones(err) == 1 && k >= 8 && k <= 15) mag_cnt[i][k-8]++;
            else odd[i]++;
          end
        end
      end
      exact_q[0] = exact_q[1];
      if (n < NOPS) begin
        add_a = 16'($urandom);
        add_b = 16'($urandom);
      end
      exact_q[1] = 17'(add_a) + 17'(add_b);
    end

    for (int i = 0; i < NUM_ADDERS; i++) begin
      prec = 100.0 * real'(NOPS - wrong[i]) / real'(NOPS);
      $display("%-14s right %9d wrong %8d precision %9.5f %%  mag_cnt 2^8..2^15: %0d %0d %0d %0d %0d %0d %0d %0d",
               adder_e'(i), NOPS - wrong[i], wrong[i], prec,
               mag_cnt[i][0], mag_cnt[i][1], mag_cnt[i][2], mag_cnt[i][3],
               mag_cnt[i][4], mag_cnt[i][5], mag_cnt[i][6], mag_cnt[i][7]);
      checks++;
      if (odd[i] != 0) begin
        failures++;
        $display("FAIL %s: %0d errors are not a power of two in 2^8..2^15", adder_e'(i), odd[i]);
      end
      if (i >= NUM_GEAR) begin
        checks++;
        if (wrong[i] != 0) begin failures++; $display("FAIL exact adder %s wrong", adder_e'(i)); end
      end else begin
        checks++;
        if (prec > pub_prec[i/2] + 0.05 || prec < pub_prec[i/2] - 0.05) begin
          failures++;
          $display("FAIL %s precision %f, published %f", adder_e'(i), prec, pub_prec[i/2]);
        end
        for (int j = 0; j < 8; j++) begin
          real want, tol;
          want = real'(pub_mag[i/2][j]) * real'(NOPS) / 1.0e7;
          tol  = 0.05 * want + 30.0;
          checks++;
          if (real'(mag_cnt[i][j]) > want + tol || real'(mag_cnt[i][j]) < want - tol) begin
            failures++;
            $display("FAIL %s bin 2^%0d: %0d, published %0.0f", adder_e'(i), j + 8, mag_cnt[i][j], want);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
