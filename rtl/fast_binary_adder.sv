// First stage of the BCD digit adder: the binary sum of two WIDTH-bit
// operands, s + (co << WIDTH) = a + b + cin.
//
// ARCH chooses how the sum is formed: ADDER_RCA a ripple carry adder,
// ADDER_CSKIP a carry skip adder (two 2-bit groups), ADDER_CSEL a carry select
// adder (2-bit low part, duplicated 2-bit high part). All three give the same
// result; they differ in area and delay. The design describes the stage as a
// ripple carry adder and reports its results with the carry skip and carry
// select forms; the carry skip form, reported as the smallest and lowest
// power, is the default. Purely combinational.
module fast_binary_adder
  import bcd_pkg::*;
#(
  parameter int unsigned WIDTH = 4,
  parameter adder_arch_e ARCH  = ADDER_CSKIP
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             co
);

  if (ARCH == ADDER_RCA) begin : g_rca
    ripple_carry_adder #(.WIDTH(WIDTH)) u_add (
      .a(a), .b(b), .cin(cin), .s(s), .co(co)
    );
  end else if (ARCH == ADDER_CSEL) begin : g_csel
    carry_select_adder #(.WIDTH(WIDTH), .LOW(WIDTH / 2)) u_add (
      .a(a), .b(b), .cin(cin), .s(s), .co(co)
    );
  end else begin : g_cskip
    // the skip status is only of interest when testing the skip adder itself
    logic [WIDTH/2-1:0] skip_unused;
    carry_skip_adder #(.WIDTH(WIDTH), .GROUP(2)) u_add (
      .a(a), .b(b), .cin(cin), .s(s), .co(co), .skip(skip_unused)
    );
  end

endmodule
