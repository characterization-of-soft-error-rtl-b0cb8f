`timescale 1ps/1ps
// majority_voter_tb -- exhaustive check of the two-out-of-three voter: all
// eight input combinations against a count of ones.
module majority_voter_tb;
  logic [2:0] a;
  logic       y;
  int checks = 0, failures = 0;

  majority_voter dut (.a(a), .y(y));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int ones;
      a = 3'(v);
      #10;
      ones = int'(a[0]) + int'(a[1]) + int'(a[2]);
      checks++;
      if (y !== (ones >= 2)) begin
        failures++;
        $display("FAIL a=%b y=%b", a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
