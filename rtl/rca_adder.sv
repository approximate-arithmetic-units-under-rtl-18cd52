// rca_adder: W-bit ripple-carry adder built from one-bit cells.
//
// Cell i adds a[i], b[i] and the carry of cell i-1; the carry ripples from
// cin to cout through all W cells. With SFA_POS = -1 (the default) every cell
// is an exact full_adder and the adder is exact: this is the accurate
// ripple-carry adder of the study and the ripple sub-adder of the "_RCA"
// approximate adders. With 0 <= SFA_POS < W, cell SFA_POS is a simplified
// full adder (sfa_cell), which breaks the carry chain there; the block
// multipliers use that form for their approximate partial sums. Sharing one
// module for both uses is this design's choice. Purely combinational.
module rca_adder #(
  parameter int unsigned W       = 16,
  parameter int          SFA_POS = -1
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = cin;
  assign cout = c[W];

  for (genvar i = 0; i < W; i++) begin : g_cell
    if (i == SFA_POS) begin : g_sfa
      sfa_cell u_cell (.a(a[i]), .b(b[i]), .cin(c[i]), .s(s[i]), .cout(c[i+1]));
    end else begin : g_fa
      full_adder u_cell (.a(a[i]), .b(b[i]), .cin(c[i]), .s(s[i]), .cout(c[i+1]));
    end
  end
endmodule
