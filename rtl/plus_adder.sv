// plus_adder: exact W-bit adder written as a + b.
//
// The reference adder whose structure is left entirely to the synthesis
// tool. s carries the W-bit sum and the carry out in bit W. Purely
// combinational.
module plus_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W:0]   s
);
  assign s = {1'b0, a} + {1'b0, b};
endmodule
