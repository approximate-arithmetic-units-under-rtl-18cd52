// full_adder: exact one-bit full adder cell.
//
// s = a ^ b ^ cin and cout = a&b | cin&(a^b), written gate by gate so that
// the ripple-carry structures built from it keep their carry chain. Purely
// combinational. This is the standard cell the ripple-carry adder of the
// study is made of; nothing in it is a design choice.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  logic p;

  assign p    = a ^ b;
  assign s    = p ^ cin;
  assign cout = (a & b) | (cin & p);
endmodule
