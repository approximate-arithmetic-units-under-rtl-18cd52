// gear_adder_tb: checks the GeAr approximate adder in all ten settings of
// the study (ACA-I, ACA-II, GeAr2, GeAr4, GeAr6, each with '+' and with
// ripple-carry sub-adders) plus the default instance.
//  - every sum is compared with the window-by-window reference gear_ref;
//  - both sub-adder styles of a setting must give identical sums;
//  - every error (exact - approximate) must be one of the magnitudes the
//    setting can produce (2^(R*j+P)), and each such magnitude must occur;
//  - the fraction of exact sums over 100000 random pairs must match the
//    published precision of the setting within 0.3 percentage points
//    (ACA-I 98.437 %, ACA-II 94.140 %, GeAr2 99.557 %, GeAr4 99.815 %,
//    GeAr6 99.806 %);
//  - two further settings at other widths, GeAr(12, 2, 6) and ACA-I on
//    20-bit operands (R = 1, P = 5), are compared with gear_ref as well.
module gear_adder_tb
  import approx_arith_pkg::*;
  import approx_ref_pkg::*;
;
  localparam int NS = 100000;

  logic [15:0] a, b;
  logic [16:0] s     [NUM_GEAR];
  logic [16:0] s_def;
  logic        clk = 1'b0;
  int          checks = 0, failures = 0, cycles = 0;
  int          wrong  [NUM_GEAR];
  int          mag_seen [NUM_GEAR][16];

  for (genvar i = 0; i < NUM_GEAR; i++) begin : g_dut
    localparam gear_cfg_t CFG = gear_cfg(i);
    gear_adder #(.N(16), .R(int'(CFG.r)), .P(int'(CFG.p)), .SUB_RCA(CFG.sub_rca))
      dut (.a(a), .b(b), .s(s[i]));
  end
  gear_adder dut_def (.a(a), .b(b), .s(s_def));

  logic [11:0] a12, b12;
  logic [12:0] s12;
  logic [19:0] a20, b20;
  logic [20:0] s20;
  gear_adder #(.N(12), .R(2), .P(6), .SUB_RCA(1'b1)) dut12 (.a(a12), .b(b12), .s(s12));
  gear_adder #(.N(20), .R(1), .P(5), .SUB_RCA(1'b0)) dut20 (.a(a20), .b(b20), .s(s20));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 1000000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // 1 if an error of 2^k is possible for this setting: k = R*j + P, j >= 1
  function automatic bit mag_allowed(int idx, int k);
    gear_cfg_t c;
    c = gear_cfg(idx);
    for (int j = 1; j < 16; j++)
      if (int'(c.r) * j + int'(c.p) == k && int'(c.r) * (j - 1) + int'(c.p) < 16) return 1'b1;
    return 1'b0;
  endfunction

  function automatic real paper_precision(int idx);
    case (idx / 2)
      0: return 98.43748;
      1: return 94.13961;
      2: return 99.55709;
      3: return 99.81546;
      default: return 99.80605;
    endcase
  endfunction

  task automatic apply(logic [15:0] x, logic [15:0] y, bit count);
    longint unsigned exp_v, err;
    gear_cfg_t c;
    a = x; b = y;
    #1;
    for (int i = 0; i < NUM_GEAR; i++) begin
      c     = gear_cfg(i);
      exp_v = gear_ref(64'(x), 64'(y), 16, int'(c.r), int'(c.p));
      checks++;
      if (64'(s[i]) != exp_v) begin
        failures++;
        if (failures < 10) $display("FAIL cfg %0d: %0d + %0d -> %0d exp %0d", i, x, y, s[i], exp_v);
      end
      err = 64'(x) + 64'(y) - 64'(s[i]);
      if (err != 0) begin
        if (count) wrong[i]++;
        checks++;
        if ($countones(err) != 1 || !mag_allowed(i, $clog2(err))) begin
          failures++;
          if (failures < 10) $display("FAIL cfg %0d: error %0d not an allowed magnitude", i, err);
        end else mag_seen[i][$clog2(err)]++;
      end
      if (i % 2 == 1) begin
        checks++;
        if (s[i] != s[i-1]) begin
          failures++;
          if (failures < 10) $display("FAIL cfg %0d: _RCA and _Gen differ", i);
        end
      end
    end
    checks++;
    if (64'(s_def) != gear_ref(64'(x), 64'(y), 16, 4, 8)) begin
      failures++;
      if (failures < 10) $display("FAIL default instance %0d + %0d -> %0d", x, y, s_def);
    end
  endtask

  initial begin
    real prec;
    foreach (wrong[i]) wrong[i] = 0;
    foreach (mag_seen[i, k]) mag_seen[i][k] = 0;
    apply(16'h0000, 16'h0000, 1'b0);
    apply(16'hFFFF, 16'hFFFF, 1'b0);
    apply(16'hFFFF, 16'h0001, 1'b0);
    apply(16'h00FF, 16'h0001, 1'b0);
    apply(16'h0FFF, 16'h0001, 1'b0);
    for (int n = 0; n < NS; n++) apply(16'($urandom), 16'($urandom), 1'b1);
    for (int n = 0; n < 20000; n++) begin
      a12 = 12'($urandom); b12 = 12'($urandom);
      a20 = 20'($urandom); b20 = 20'($urandom);
      #1;
      checks += 2;
      if (64'(s12) != gear_ref(64'(a12), 64'(b12), 12, 2, 6)) begin
        failures++;
        if (failures < 10) $display("FAIL GeAr(12,2,6) %0d + %0d -> %0d", a12, b12, s12);
      end
      if (64'(s20) != gear_ref(64'(a20), 64'(b20), 20, 1, 5)) begin
        failures++;
        if (failures < 10) $display("FAIL GeAr(20,1,5) %0d + %0d -> %0d", a20, b20, s20);
      end
    end
    for (int i = 0; i < NUM_GEAR; i++) begin
      prec = 100.0 * real'(NS - wrong[i]) / real'(NS);
      $display("%s precision %8.4f %% (published %8.4f %%)", adder_e'(i), prec, paper_precision(i));
      checks++;
      if (prec > paper_precision(i) + 0.3 || prec < paper_precision(i) - 0.3) begin
        failures++;
        $display("FAIL cfg %0d precision off", i);
      end
      for (int k = 0; k < 16; k++) if (mag_allowed(i, k)) begin
        checks++;
        if (mag_seen[i][k] == 0) begin
          failures++;
          $display("FAIL cfg %0d: error magnitude 2^%0d never seen", i, k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
