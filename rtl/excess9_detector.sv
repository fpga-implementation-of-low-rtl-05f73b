// Excess-9 detector: decides whether the binary sum of two BCD digits needs
// decimal correction.
//
// The 5-bit first-stage sum {c0, s3, s2, s1, s0} lies in 0..19 for two BCD
// digits and a carry. It is above 9 exactly when the binary carry c0 is set,
// or when s3 is set together with s2 (12..15) or s1 (10, 11):
//   cout = c0 | s3&s2 | s3&s1
// cout selects the corrected digit at the output multiplexer, enables the flag
// computation and is the decimal carry of the digit. The inputs (C0, S3, S2,
// S1) and the rule "1 when the sum exceeds 9" follow the design; the sum of
// products above is the standard detector that meets that rule. S0 does not matter
// and is not an input. Purely combinational.
module excess9_detector (
  input  logic       c0,
  input  logic [3:1] s,   // S3..S1
  output logic       cout
);

  always_comb cout = c0 | (s[3] & (s[2] | s[1]));

endmodule
