// mult2x2: 2x2-bit multiplier block, exact or under-designed.
//
// With APPROX = 1 this is the under-designed multiplier (UDM) block: its
// Karnaugh map is changed so that 3 * 3 gives 7 (binary 111) instead of 9
// (1001), and the result fits in three bits. It is right for 15 of the 16
// input pairs and off by 2 for the other. Written as sum-of-products:
//   p0 = a0 b0,  p1 = a1 b0 | a0 b1,  p2 = a1 b1,  p3 = 0.
// With APPROX = 0 the block is the exact 2x2 multiplier, whose p1 needs an
// XOR and whose p3 = a0 a1 b0 b1. Purely combinational; p is always four bits
// wide so both forms fit the same partial-product tree. The parameter
// selecting the two forms is this design's choice.
module mult2x2 #(
  parameter bit APPROX = 1'b1
) (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  if (APPROX) begin : g_udm
    assign p[0] = a[0] & b[0];
    assign p[1] = (a[1] & b[0]) | (a[0] & b[1]);
    assign p[2] = a[1] & b[1];
    assign p[3] = 1'b0;
  end else begin : g_exact
    logic t;  // a0 a1 b0 b1: the only case with a carry into p2
    assign t    = a[0] & a[1] & b[0] & b[1];
    assign p[0] = a[0] & b[0];
    assign p[1] = (a[1] & b[0]) ^ (a[0] & b[1]);
    assign p[2] = (a[1] & b[1]) & ~t;
    assign p[3] = t;
  end
endmodule
