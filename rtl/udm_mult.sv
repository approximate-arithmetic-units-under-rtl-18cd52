// udm_mult: recursive N x N unsigned multiplier built from 2x2 blocks, exact
// or approximate (under-designed multiplier, UDM).
//
// Each operand is split into a high and a low half of H = N/2 bits. The four
// half-size products HH, HL (a_hi * b_lo), LH and LL are made by udm_mult
// blocks of size H, down to mult2x2 blocks at N = 2, and added with shifts:
//   t1 = LL + (HL << H),  t2 = t1 + (LH << H),  p = t2 + (HH << N).
// Approximation rule: in an approximate block (APPROX = 1) the HH product
// holds the most significant bits and is computed entirely exactly (exact
// 2x2 blocks and exact adders at every level below); HL, LH and LL are
// approximate blocks again, so approximate 2x2 blocks appear everywhere
// except in HH paths.
// SFA = 1 (only meaningful with APPROX = 1) puts one simplified full adder
// (sfa_cell) in each of the three additions of an approximate block, at bit
// weight N, the middle bit of the 2N-bit result; all other adder cells are
// exact. SW_FORM selects the adder shapes: 1 makes each addition a full
// 2N-bit ripple adder, as in the software model of the multiplier; 0 lets the
// low bits that are only added to zeros go straight to the result and keeps
// the adders as narrow as the operands allow. The SFA stays at weight N in
// both shapes, so both compute the same products; only the structure differs.
// Settings of the study: Mult16 (0,0,x), UDM16 (1,0,0), UDM16_SFA (1,1,0),
// UDM16_SFA_SW (1,1,1). The split, the exact HH rule and the SFA in the
// middle bit follow the study; the order of the three additions and keeping
// the SFA at weight N in the narrow form are this design's choices.
// Purely combinational; N must be a power of two, at least 2.
// Lint note: the module instantiates itself. When it is linted as a top of
// its own, Verilator also checks a copy of the module with the recursive
// instances removed and reports pp_hh .. pp_ll as undriven and a, b as
// unused in that copy; the elaborated hierarchy drives them all, as
// simulation and the other front end confirm.
module udm_mult #(
  parameter int unsigned N       = 16,
  parameter bit          APPROX  = 1'b1,
  parameter bit          SFA     = 1'b1,
  parameter bit          SW_FORM = 1'b0
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  if (N == 2) begin : g_leaf
    mult2x2 #(.APPROX(APPROX)) u_m2 (.a(a), .b(b), .p(p));
  end else begin : g_node
    localparam int unsigned H   = N / 2;
    localparam int          POS = (APPROX && SFA) ? int'(N) : -1;  // SFA weight

    logic [N-1:0] pp_hh, pp_hl, pp_lh, pp_ll;

    udm_mult #(.N(H), .APPROX(1'b0),   .SFA(1'b0), .SW_FORM(SW_FORM)) u_hh (
      .a(a[N-1:H]), .b(b[N-1:H]), .p(pp_hh));
    udm_mult #(.N(H), .APPROX(APPROX), .SFA(SFA),  .SW_FORM(SW_FORM)) u_hl (
      .a(a[N-1:H]), .b(b[H-1:0]), .p(pp_hl));
    udm_mult #(.N(H), .APPROX(APPROX), .SFA(SFA),  .SW_FORM(SW_FORM)) u_lh (
      .a(a[H-1:0]), .b(b[N-1:H]), .p(pp_lh));
    udm_mult #(.N(H), .APPROX(APPROX), .SFA(SFA),  .SW_FORM(SW_FORM)) u_ll (
      .a(a[H-1:0]), .b(b[H-1:0]), .p(pp_ll));

    if (SW_FORM) begin : g_wide
      // three full-width additions, SFA (if any) in the middle bit N
      logic [2*N-1:0] t1, t2;
      logic [2:0]     co_unused;

      rca_adder #(.W(2*N), .SFA_POS(POS)) u_add1 (
        .a({{N{1'b0}}, pp_ll}), .b({{H{1'b0}}, pp_hl, {H{1'b0}}}),
        .cin(1'b0), .s(t1), .cout(co_unused[0]));
      rca_adder #(.W(2*N), .SFA_POS(POS)) u_add2 (
        .a(t1), .b({{H{1'b0}}, pp_lh, {H{1'b0}}}),
        .cin(1'b0), .s(t2), .cout(co_unused[1]));
      rca_adder #(.W(2*N), .SFA_POS(POS)) u_add3 (
        .a(t2), .b({pp_hh, {N{1'b0}}}),
        .cin(1'b0), .s(p), .cout(co_unused[2]));
    end else begin : g_narrow
      // low bits that meet only zeros bypass the adders; weight N sits at
      // index H of the first two adders and index 0 of the last one
      localparam int POS12 = (POS < 0) ? -1 : int'(H);
      localparam int POS3  = (POS < 0) ? -1 : 0;

      logic [H+N:0]   t1;   // LL + (HL << H), bits 0 .. H+N
      logic [H+N+1:0] t2;   // t1 + (LH << H), bits 0 .. H+N+1
      logic           co_unused;

      assign t1[H-1:0] = pp_ll[H-1:0];
      rca_adder #(.W(N), .SFA_POS(POS12)) u_add1 (
        .a({{H{1'b0}}, pp_ll[N-1:H]}), .b(pp_hl),
        .cin(1'b0), .s(t1[H+N-1:H]), .cout(t1[H+N]));

      assign t2[H-1:0] = t1[H-1:0];
      rca_adder #(.W(N+1), .SFA_POS(POS12)) u_add2 (
        .a(t1[H+N:H]), .b({1'b0, pp_lh}),
        .cin(1'b0), .s(t2[H+N:H]), .cout(t2[H+N+1]));

      assign p[N-1:0] = t2[N-1:0];
      rca_adder #(.W(N), .SFA_POS(POS3)) u_add3 (
        .a({{(N-H-2){1'b0}}, t2[H+N+1:N]}), .b(pp_hh),
        .cin(1'b0), .s(p[2*N-1:N]), .cout(co_unused));
    end
  end
endmodule
