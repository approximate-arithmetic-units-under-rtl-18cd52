// arith_top: the thirteen adders and five multipliers of the study side by
// side, each between an input register and an output register.
//
// Every unit is purely combinational; as in the set-up used to measure them,
// each sits between a rank of input flip-flops and a rank of output
// flip-flops, so the whole operand-to-result path of a unit is one clock
// period. The adders share one registered operand pair (add_a, add_b), the
// multipliers another (mul_a, mul_b).
//   add_sum[i]  : 17-bit sum (carry out in bit 16) of adder i, i = adder_e
//                 (ten GeAr-family approximate adders, then ripple-carry,
//                 Kogge-Stone and '+').
//   mul_prod[i] : 32-bit product of multiplier i, i = mult_e (Mult16,
//                 UDM16, UDM16_SFA, UDM16_SFA_SW, then '*').
// Timing: operands applied before clock edge n appear on the outputs after
// edge n+1 (two-register latency); a new operand pair can be applied every
// cycle. The registers carry data only and have no reset; outputs are valid
// from the second edge after the first operands. Sharing the operand
// registers among the units is this design's choice; the study measured each
// unit alone in the same register frame.
module arith_top
  import approx_arith_pkg::*;
(
  input  logic              clk,
  input  logic [OP_W-1:0]   add_a,
  input  logic [OP_W-1:0]   add_b,
  output logic [SUM_W-1:0]  add_sum  [NUM_ADDERS],
  input  logic [OP_W-1:0]   mul_a,
  input  logic [OP_W-1:0]   mul_b,
  output logic [PROD_W-1:0] mul_prod [NUM_MULTS]
);
  logic [OP_W-1:0]   add_a_q, add_b_q, mul_a_q, mul_b_q;
  logic [SUM_W-1:0]  sum_c  [NUM_ADDERS];
  logic [PROD_W-1:0] prod_c [NUM_MULTS];

  // input register rank
  always_ff @(posedge clk) begin
    add_a_q <= add_a;
    add_b_q <= add_b;
    mul_a_q <= mul_a;
    mul_b_q <= mul_b;
  end

  // ten approximate adders: five GeAr settings x two sub-adder styles
  for (genvar i = 0; i < NUM_GEAR; i++) begin : g_gear
    localparam gear_cfg_t CFG = gear_cfg(i);
    gear_adder #(
      .N      (OP_W),
      .R      (int'(CFG.r)),
      .P      (int'(CFG.p)),
      .SUB_RCA(CFG.sub_rca)
    ) u_add (
      .a(add_a_q), .b(add_b_q), .s(sum_c[i]));
  end

  // three exact adders
  rca_adder #(.W(OP_W)) u_rca (
    .a(add_a_q), .b(add_b_q), .cin(1'b0),
    .s(sum_c[ADD_RCA][OP_W-1:0]), .cout(sum_c[ADD_RCA][OP_W]));
  ksa_adder  #(.W(OP_W)) u_ksa  (.a(add_a_q), .b(add_b_q), .s(sum_c[ADD_KSA]));
  plus_adder #(.W(OP_W)) u_plus (.a(add_a_q), .b(add_b_q), .s(sum_c[ADD_PLUS]));

  // four multipliers built from 2x2 blocks
  for (genvar i = 0; i < NUM_BLOCKM; i++) begin : g_blockm
    localparam mult_cfg_t CFG = mult_cfg(i);
    udm_mult #(
      .N      (OP_W),
      .APPROX (CFG.approx),
      .SFA    (CFG.sfa),
      .SW_FORM(CFG.sw_form)
    ) u_mul (
      .a(mul_a_q), .b(mul_b_q), .p(prod_c[i]));
  end

  // exact multiplier left to synthesis
  star_mult #(.W(OP_W)) u_star (.a(mul_a_q), .b(mul_b_q), .p(prod_c[MUL_STAR]));

  // output register rank
  always_ff @(posedge clk) begin
    add_sum  <= sum_c;
    mul_prod <= prod_c;
  end
endmodule
