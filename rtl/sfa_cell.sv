// sfa_cell: simplified full adder (SFA), an approximate full adder cell.
//
// Starting from the gate-level full adder, the AND gate cin&(a^b) that feeds
// the carry OR is tied to 0, which removes that OR too: cout = a & b. The
// carry no longer depends on cin, so the cell cuts the carry chain it sits
// in. The second XOR of the sum becomes an OR: s = (a ^ b) | cin. The cell is
// wrong only for (a, b, cin) = (0,1,1) and (1,0,1), where it gives 1 instead
// of 2; the OR makes the error one unit instead of two at the same error rate.
// Purely combinational. Which XOR is turned into an OR is inferred from the
// published error table, which only this choice reproduces.
module sfa_cell (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  assign s    = (a ^ b) | cin;
  assign cout = a & b;
endmodule
