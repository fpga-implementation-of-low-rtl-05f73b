// Flag inversion logic: flips the sum bits that the flag bits mark,
// m_i = f_i ^ s_i. With the flags of flag_bit_computation this gives the
// corrected digit m = (s + 6) mod 16 when the sum exceeded 9. Four XOR gates,
// as in the design. Purely combinational.
module flag_inversion_logic (
  input  logic [3:0] f,
  input  logic [3:0] s,
  output logic [3:0] m
);

  always_comb m = f ^ s;

endmodule
