`timescale 1ps/1ps
// delay_cell_tb -- checks that an edge and a short pulse appear at the
// output exactly DELAY_PS later (sampled just before and just after), and
// that a pulse shorter than the delay does not come out (inertial delay).
module delay_cell_tb;
  localparam int unsigned D = 500;
  logic a = 1'b0, y;
  int checks = 0, failures = 0;

  delay_cell #(.DELAY_PS(D)) dut (.a(a), .y(y));

  task automatic expect_y(logic v, string what);
    checks++;
    if (y !== v) begin
      failures++;
      $display("FAIL %s: y=%b at %0t", what, y, $time);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    expect_y(1'b0, "idle");
    a = 1'b1;                 // rising edge at t0
    #(D - 5) expect_y(1'b0, "before rise");
    #10      expect_y(1'b1, "after rise");
    #1000;
    a = 1'b0;
    #(D - 5) expect_y(1'b1, "before fall");
    #10      expect_y(1'b0, "after fall");
    #1000;
    a = 1'b1; #700; a = 1'b0; // 700 ps pulse passes
    expect_y(1'b1, "pulse out");          // since 500 ps ago
    #(D - 10)  expect_y(1'b1, "pulse end");
    #20        expect_y(1'b0, "pulse over");
    #1000;
    a = 1'b1; #200; a = 1'b0; // 200 ps pulse is shorter than the delay
    for (int t = 0; t < 8; t++) begin
      #100 expect_y(1'b0, "short pulse swallowed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
