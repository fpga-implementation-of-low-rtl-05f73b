// One-bit full adder, the cell from which the first-stage binary adders are
// chained.
//
// s is the sum bit and co the carry out of a + b + ci:
//   s  = a ^ b ^ ci
//   co = a&b | ci&(a ^ b)
// Purely combinational. The adder's role (sum and carry functions FAs/FAc of
// the digit adder's first stage) follows the design; the gate-level equations
// are the standard ones.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  logic p;

  always_comb begin
    p  = a ^ b;
    s  = p ^ ci;
    co = (a & b) | (ci & p);
  end

endmodule
