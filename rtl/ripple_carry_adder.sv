// Ripple carry adder of WIDTH bits: s + (co << WIDTH) = a + b + cin.
//
// WIDTH full adders are chained, bit 0 taking cin and each later bit the carry
// of the bit below; co is the carry of the top bit. For the BCD digit adder
// WIDTH is 4 and cin is 0, giving the binary sum S3..S0 and carry C0 of the two
// digits. Purely combinational; the delay grows with WIDTH full-adder carries.
module ripple_carry_adder #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             co
);

  logic [WIDTH:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .a (a[i]),
      .b (b[i]),
      .ci(c[i]),
      .s (s[i]),
      .co(c[i+1])
    );
  end

  assign co = c[WIDTH];

endmodule
