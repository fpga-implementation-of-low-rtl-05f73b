// Carry select adder of WIDTH bits: s + (co << WIDTH) = a + b + cin.
//
// The low LOW bits are added by a ripple carry adder. The high WIDTH-LOW bits
// are added twice in parallel, once assuming a carry in of 0 and once of 1;
// the carry out of the low part then selects which high sum and carry are
// used. Purely combinational.
//
// The design uses a carry select adder as its first stage; the split of a
// 4-bit digit into a 2-bit low part and a 2-bit high part is this design's
// choice. LOW must lie between 1 and WIDTH-1.
module carry_select_adder #(
  parameter int unsigned WIDTH = 4,
  parameter int unsigned LOW   = 2
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             co
);

  localparam int unsigned HIGH = WIDTH - LOW;

  logic            c_low;
  logic [HIGH-1:0] s_hi0, s_hi1;
  logic            c_hi0, c_hi1;

  ripple_carry_adder #(.WIDTH(LOW)) u_low (
    .a  (a[LOW-1:0]),
    .b  (b[LOW-1:0]),
    .cin(cin),
    .s  (s[LOW-1:0]),
    .co (c_low)
  );

  ripple_carry_adder #(.WIDTH(HIGH)) u_high0 (
    .a  (a[WIDTH-1:LOW]),
    .b  (b[WIDTH-1:LOW]),
    .cin(1'b0),
    .s  (s_hi0),
    .co (c_hi0)
  );

  ripple_carry_adder #(.WIDTH(HIGH)) u_high1 (
    .a  (a[WIDTH-1:LOW]),
    .b  (b[WIDTH-1:LOW]),
    .cin(1'b1),
    .s  (s_hi1),
    .co (c_hi1)
  );

  always_comb begin
    if (c_low) begin
      s[WIDTH-1:LOW] = s_hi1;
      co             = c_hi1;
    end else begin
      s[WIDTH-1:LOW] = s_hi0;
      co             = c_hi0;
    end
  end

  initial begin
    assert (LOW >= 1 && LOW < WIDTH)
      else $error("carry_select_adder: LOW %0d out of range for WIDTH %0d", LOW, WIDTH);
  end

endmodule
