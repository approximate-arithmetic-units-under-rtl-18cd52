// star_mult: exact W x W unsigned multiplier written as a * b.
//
// The reference multiplier whose structure is left entirely to the
// synthesis tool; p is the full 2W-bit product. Purely combinational.
module star_mult #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  assign p = {{W{1'b0}}, a} * {{W{1'b0}}, b};
endmodule
