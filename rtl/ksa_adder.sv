// ksa_adder: exact W-bit Kogge-Stone parallel-prefix adder.
//
// Each bit forms generate g = a & b and propagate p = a ^ b. log2(W) prefix
// levels follow; at level l every bit i >= 2^l combines its (G, P) pair with
// that of bit i - 2^l:  G = G_i | P_i & G_(i-2^l),  P = P_i & P_(i-2^l).
// After the last level G of bit i is the carry out of bits 0..i, so
// s[i] = p[i] ^ G[i-1] and the carry out s[W] = G[W-1]. There is no carry in.
// Purely combinational, log2(W) + 2 gate levels deep. The study names the
// structure only; this is the textbook form of it. W must be a power of two.
module ksa_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W:0]   s
);
  localparam int unsigned LEVELS = $clog2(W);

  // gen[l] / prop[l]: group generate and propagate after l prefix levels
  logic [W-1:0] gen  [LEVELS+1];
  logic [W-1:0] prop [LEVELS+1];

  assign gen[0]  = a & b;
  assign prop[0] = a ^ b;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned D = 1 << l;
    for (genvar i = 0; i < W; i++) begin : g_bit
      if (i >= D) begin : g_op
        assign gen[l+1][i]  = gen[l][i] | (prop[l][i] & gen[l][i-D]);
        assign prop[l+1][i] = prop[l][i] & prop[l][i-D];
      end else begin : g_pass
        assign gen[l+1][i]  = gen[l][i];
        assign prop[l+1][i] = prop[l][i];
      end
    end
  end

  assign s[0] = prop[0][0];
  for (genvar i = 1; i < W; i++) begin : g_sum
    assign s[i] = prop[0][i] ^ gen[LEVELS][i-1];
  end
  assign s[W] = gen[LEVELS][W-1];
endmodule
