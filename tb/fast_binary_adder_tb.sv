// Self-checking testbench of fast_binary_adder: one instance per first-stage
// architecture (ripple carry, carry skip, carry select), each given every
// pair of 4-bit operands with both carry-in values and compared with
// a + b + cin.
module fast_binary_adder_tb;

  import bcd_pkg::*;

  localparam int W = 4;

  logic [W-1:0] a, b;
  logic         cin;
  logic [W-1:0] s_rca, s_skip, s_sel;
  logic         c_rca, c_skip, c_sel;
  int           checks = 0, failures = 0;

  fast_binary_adder #(.ARCH(ADDER_RCA)) dut_rca (
    .a(a), .b(b), .cin(cin), .s(s_rca), .co(c_rca));
  fast_binary_adder dut_skip (
    .a(a), .b(b), .cin(cin), .s(s_skip), .co(c_skip));
  fast_binary_adder #(.ARCH(ADDER_CSEL)) dut_sel (
    .a(a), .b(b), .cin(cin), .s(s_sel), .co(c_sel));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string name, logic [W:0] got, int exp_sum);
    checks++;
    if (got != (W+1)'(exp_sum)) begin
      failures++;
      $display("FAIL %s: %0d + %0d + %0d -> %0d expected %0d", name, a, b, cin, got, exp_sum);
    end
  endtask

  initial begin
    for (int c = 0; c < 2; c++)
      for (int x = 0; x < (1 << W); x++)
        for (int y = 0; y < (1 << W); y++) begin
          a = W'(x); b = W'(y); cin = 1'(c);
          #1;
          check("ripple", {c_rca, s_rca}, x + y + c);
          check("skip",   {c_skip, s_skip}, x + y + c);
          check("select", {c_sel, s_sel}, x + y + c);
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
