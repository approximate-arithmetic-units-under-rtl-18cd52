// gear_adder: generic accuracy-configurable approximate adder GeAr(N, R, P).
//
// The N-bit addition is cut into overlapping sub-adders of L = R + P bits,
// all working in parallel, so no carry travels further than L bits.
//  - Sub-adder 0 adds bits 0 .. L-1 exactly and gives result bits 0 .. L-1.
//  - Sub-adder j (j >= 1) adds bits R*j .. R*j + L - 1. Its P low bits only
//    rebuild the carry coming into bit R*j + P ("carry prediction"); it gives
//    the R result bits R*j + P .. R*j + P + R - 1.
//  - The last sub-adder is cut at bit N-1 when the window passes it, and its
//    carry out is result bit N.
// The sum is wrong when a carry born below bit R*j would have had to ripple
// through all P prediction bits; the error is then exactly 2^(R*j + P). The
// number of sub-adders is K = ceil((N - L) / R) + 1.
// SUB_RCA = 0 writes each sub-adder as '+', leaving its structure to
// synthesis (the "_Gen" versions); SUB_RCA = 1 uses ripple-carry sub-adders
// (rca_adder, the "_RCA" versions). Both compute the same function.
// Named settings: ACA-I = (16,1,7), ACA-II = (16,4,4), GeAr2 = (16,2,8),
// GeAr4 = (16,4,8), GeAr6 = (16,6,8). Cutting the last window at N-1 (needed
// for GeAr6, where (N-L)/R is not an integer) and taking its carry as bit N
// are this design's reading. Purely combinational.
module gear_adder #(
  parameter int unsigned N       = 16,
  parameter int unsigned R       = 4,
  parameter int unsigned P       = 8,
  parameter bit          SUB_RCA = 1'b1
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N:0]   s
);
  localparam int unsigned L = R + P;
  localparam int unsigned K = (L >= N) ? 1 : ((N - L + R - 1) / R) + 1;

  for (genvar j = 0; j < K; j++) begin : g_sub
    localparam int unsigned LO   = R * j;                       // lowest input bit
    localparam int unsigned HI   = (LO + L > N) ? N : LO + L;   // one past the top input bit
    localparam int unsigned WD   = HI - LO;                     // sub-adder width
    localparam bit          LAST = (j == K - 1);
    localparam int unsigned SKIP = (j == 0) ? 0 : P;            // prediction bits not used

    logic [WD:0] part;  // sub-adder sum with its carry out

    if (SUB_RCA) begin : g_rca
      rca_adder #(.W(WD)) u_add (
        .a   (a[HI-1:LO]),
        .b   (b[HI-1:LO]),
        .cin (1'b0),
        .s   (part[WD-1:0]),
        .cout(part[WD])
      );
    end else begin : g_gen
      assign part = {1'b0, a[HI-1:LO]} + {1'b0, b[HI-1:LO]};
    end

    if (LAST) begin : g_top
      // result bits LO+SKIP .. N, carry out included
      assign s[N:LO+SKIP] = part[WD:SKIP];
    end else begin : g_mid
      localparam int unsigned NB = (j == 0) ? L : R;  // result bits given
      assign s[LO+SKIP+NB-1:LO+SKIP] = part[SKIP+NB-1:SKIP];
    end
  end
endmodule
