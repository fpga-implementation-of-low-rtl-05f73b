// Self-checking testbench of excess9_detector: every 5-bit first-stage sum
// {c0, S3..S0} (0..31), checking cout == (sum > 9). The detector does not
// look at S0, so S0 only varies the reference value.
module excess9_detector_tb;

  logic       c0, cout;
  logic [3:0] s;
  int         checks = 0, failures = 0;

  excess9_detector dut (.c0(c0), .s(s[3:1]), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {c0, s} = 5'(v);
      #1;
      checks++;
      if (cout != (v > 9)) begin
        failures++;
        $display("FAIL sum %0d -> cout=%b", v, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
