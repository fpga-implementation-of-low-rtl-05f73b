// Carry skip adder of WIDTH bits in groups of GROUP bits:
// s + (co << WIDTH) = a + b + cin.
//
// Each group is a ripple carry adder. When every bit of a group propagates
// (a_i ^ b_i = 1 for all its bits) the group's carry out equals its carry in,
// so the carry in is passed straight to the next group instead of rippling
// through the group; skip[g] is 1 when group g takes that bypass. Otherwise the
// group's own ripple carry is used. Purely combinational.
//
// The design uses a carry skip adder as its first stage; the group size is
// not given, so two groups of two bits for a 4-bit digit are this design's
// choice. The skip output is a status signal of this design for observing the
// bypass. WIDTH must be a multiple of GROUP.
module carry_skip_adder #(
  parameter int unsigned WIDTH = 4,
  parameter int unsigned GROUP = 2
) (
  input  logic [WIDTH-1:0]       a,
  input  logic [WIDTH-1:0]       b,
  input  logic                   cin,
  output logic [WIDTH-1:0]       s,
  output logic                   co,
  output logic [WIDTH/GROUP-1:0] skip
);

  localparam int unsigned NGROUPS = WIDTH / GROUP;

  // gc[g] is the carry into group g, gc[NGROUPS] the adder's carry out
  logic [NGROUPS:0] gc;

  assign gc[0] = cin;

  for (genvar g = 0; g < NGROUPS; g++) begin : g_group
    logic [GROUP-1:0] ga, gb;
    logic             rco;   // ripple carry out of the group
    logic             prop;  // whole group propagates

    assign ga   = a[g*GROUP +: GROUP];
    assign gb   = b[g*GROUP +: GROUP];
    assign prop = &(ga ^ gb);

    ripple_carry_adder #(.WIDTH(GROUP)) u_rca (
      .a  (ga),
      .b  (gb),
      .cin(gc[g]),
      .s  (s[g*GROUP +: GROUP]),
      .co (rco)
    );

    assign skip[g]  = prop;
    assign gc[g+1]  = prop ? gc[g] : rco;
  end

  assign co = gc[NGROUPS];

  initial begin
    assert (WIDTH % GROUP == 0)
      else $error("carry_skip_adder: WIDTH %0d is not a multiple of GROUP %0d", WIDTH, GROUP);
  end

endmodule
