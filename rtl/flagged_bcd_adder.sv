// One-digit flagged BCD adder: r = BCD(a + b) for BCD digits a, b in 0..9.
// r[4] is the decimal carry and r[3:0] the BCD sum digit.
//
// The two digits are first added in binary (fast_binary_adder, architecture
// chosen by ARCH, carry in 0), giving S3..S0 and carry C0. The excess-9
// detector raises cout when that sum exceeds 9. In parallel with the plain
// sum, the flag bit computation and flag inversion logic form S + 6 as
// S xor F, without a second adder, and the output multiplexer picks S + 6
// when cout is 1 and S otherwise; cout is the decimal carry.
//
// Blocks and wiring follow the design; it is purely combinational, with no
// clock or reset. Flag F4 is computed by the flag block as the design gives it
// but no stage uses it, so it ends on an unused net here. Inputs above 9 are not
// valid BCD and their result is not defined.
module flagged_bcd_adder
  import bcd_pkg::*;
#(
  parameter adder_arch_e ARCH = ADDER_CSKIP
) (
  input  bcd_digit_t a,
  input  bcd_digit_t b,
  output logic [4:0] r
);

  bcd_digit_t s;      // first-stage binary sum S3..S0
  logic       c0;     // first-stage carry
  logic       cout;   // sum exceeds 9
  logic [3:0] f;      // flags F3..F0
  bcd_digit_t m;      // corrected digit M3..M0
  logic       f4_unused;  // flag F4, not used by any later stage

  fast_binary_adder #(.WIDTH(4), .ARCH(ARCH)) u_adder (
    .a  (a),
    .b  (b),
    .cin(1'b0),
    .s  (s),
    .co (c0)
  );

  excess9_detector u_exc9 (
    .c0  (c0),
    .s   (s[3:1]),
    .cout(cout)
  );

  flag_bit_computation u_flag (
    .cout(cout),
    .s   (s),
    .f   (f),
    .f4  (f4_unused)
  );

  flag_inversion_logic u_finv (
    .f(f),
    .s(s),
    .m(m)
  );

  bcd_output_mux u_mux (
    .sel(cout),
    .m  (m),
    .s  (s),
    .r  (r)
  );

endmodule
