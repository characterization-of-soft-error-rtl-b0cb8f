`timescale 1ps/1ps
// set_target_logic_tb -- checks that the target chain passes its static
// level after N_INV * INV_PS, and that a strike of a given width makes a
// pulse of that width at the output, (N_INV - N_INV/2) * INV_PS later, for
// both input levels.
module set_target_logic_tb;
  localparam int unsigned N_INV = 8, INV_PS = 20;
  localparam int unsigned LAT = (N_INV - N_INV / 2) * INV_PS;  // strike to out
  logic in_level = 1'b0, out;
  int checks = 0, failures = 0;

  set_target_logic #(.N_INV(N_INV), .INV_PS(INV_PS)) dut (.in_level(in_level), .out(out));

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: out=%b at %0t", what, got, $time);
    end
  endtask

  task automatic strike_and_check(int unsigned width, logic lvl);
    dut.strike = 1'b1;
    #(LAT - 5)   check(out, lvl,  "before pulse");
    #10          check(out, !lvl, "pulse start");
    #(width - 10) check(out, !lvl, "pulse end");
    dut.strike = 1'b0;
    #(LAT + 10)  check(out, lvl,  "after pulse");
    #1000;
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
    check(out, 1'b0, "static 0");
    in_level = 1'b1;
    #(N_INV * INV_PS - 5) check(out, 1'b0, "level before propagation");
    #10                   check(out, 1'b1, "level after propagation");
    #1000;
    strike_and_check(300, 1'b1);
    in_level = 1'b0;
    #1000;
    strike_and_check(150, 1'b0);
    strike_and_check(600, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
