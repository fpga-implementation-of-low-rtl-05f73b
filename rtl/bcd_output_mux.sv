// Output multiplexer of the BCD digit adder: four 2:1 multiplexers (an 8:4
// multiplexer) select the corrected digit m when sel (the excess-9 detector's
// cout) is 1 and the uncorrected sum s when it is 0. sel also becomes the
// decimal carry, r[4], so r = {1, m} or {0, s}, as in the design; r[4] is
// therefore a plain copy of sel.
// Purely combinational.
module bcd_output_mux (
  input  logic       sel,
  input  logic [3:0] m,
  input  logic [3:0] s,
  output logic [4:0] r
);

  always_comb begin
    r[4]   = sel;
    r[3:0] = sel ? m : s;
  end

endmodule
