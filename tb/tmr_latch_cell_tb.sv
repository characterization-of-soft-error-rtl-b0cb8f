`timescale 1ps/1ps
// tmr_latch_cell_tb -- checks the triplicated latch: transparent while load
// is high, holding while it is low, a single upset latch masked by the vote,
// two upset latches flipping the output, and a new load rewriting all three.
module tmr_latch_cell_tb;
  logic load = 1'b0, d = 1'b0, q;
  int checks = 0, failures = 0;

  tmr_latch_cell dut (.load(load), .d(d), .q(q));

  function automatic logic [2:0] copies();
    return {dut.g_copy[2].lat, dut.g_copy[1].lat, dut.g_copy[0].lat};
  endfunction

  task automatic check(logic [2:0] got, logic [2:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
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
    #100;
    load = 1'b1; d = 1'b1; #100;
    check({2'b0, q}, 3'd1, "transparent follows 1");
    d = 1'b0; #100;
    check({2'b0, q}, 3'd0, "transparent follows 0");
    d = 1'b1; #100;
    load = 1'b0; #100;
    d = 1'b0; #100;
    check({2'b0, q}, 3'd1, "holds after load falls");
    check(copies(), 3'b111, "all copies hold");
    dut.g_copy[2].lat = 1'b0; #10;
    check({2'b0, q}, 3'd1, "single upset masked");
    #1000;
    check(copies(), 3'b011, "upset not repaired");
    dut.g_copy[0].lat = 1'b0; #10;
    check({2'b0, q}, 3'd0, "double upset flips q");
    d = 1'b1; load = 1'b1; #100; load = 1'b0; #100;
    check(copies(), 3'b111, "load rewrites copies");
    check({2'b0, q}, 3'd1, "q after reload");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
