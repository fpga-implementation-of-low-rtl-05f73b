// Carry and flag bit computation for adding the constant 0110 (6) to the
// first-stage sum S3..S0.
//
// Flagged addition of a constant adds it without a second adder: it finds
// which bits of S change (the flags F) so that S + 6 = S xor F (mod 16). The
// sum bits are first gated by cout (g_i = s_i & cout), so the block only works
// when a correction is needed. A chain of carries then runs from d0 = 0:
//   d1 = d0 & g0   (always 0: bit 0 of 0110 is 0 and there is no carry in)
//   d2 = d1 | g1   (carry into bit 2: constant bit 1 is 1)
//   d3 = d2 | g2   (carry into bit 3: constant bit 2 is 1)
//   d4 = d3 & g3
// and the flags are F0 = 0, F1 = ~d1, F2 = ~d2, F3 = d3, F4 = d4. Where the
// constant has a 1 the bit is flipped unless the carry into it flips it back,
// hence the inverted d1, d2; where it has a 0 the bit flips when a carry
// arrives. This chain and these flags follow the design. F4 is produced as the
// design gives it but no later stage uses it. With cout = 0 the flags are the
// constant 0110 and the output multiplexer ignores them. Because d0 = 0, F0
// is always 0 and F1 always 1; they are kept as the chain defines them and
// synthesis turns them into constants. Purely combinational.
module flag_bit_computation (
  input  logic       cout,
  input  logic [3:0] s,
  output logic [3:0] f,   // F3..F0
  output logic       f4
);

  logic [3:0] g;
  logic [4:0] d;

  always_comb begin
    g    = s & {4{cout}};
    d[0] = 1'b0;
    d[1] = d[0] & g[0];
    d[2] = d[1] | g[1];
    d[3] = d[2] | g[2];
    d[4] = d[3] & g[3];
    f[0] = 1'b0;
    f[1] = ~d[1];
    f[2] = ~d[2];
    f[3] = d[3];
    f4   = d[4];
  end

endmodule
