// Shared types and constants of the flagged BCD adder.
//
// A BCD digit is four bits holding 0..9. The first-stage binary adder of the
// digit adder can be built in one of three ways; adder_arch_e names them and
// is the type of the ARCH parameter of fast_binary_adder and flagged_bcd_adder.
package bcd_pkg;

  typedef logic [3:0] bcd_digit_t;

  typedef enum logic [1:0] {
    ADDER_RCA   = 2'd0,  // ripple carry
    ADDER_CSKIP = 2'd1,  // carry skip (default: smallest and lowest-power variant)
    ADDER_CSEL  = 2'd2   // carry select
  } adder_arch_e;

endpackage
