`timescale 1ps/1ps
// set_trigger_capture_tb -- sends pulses of known width into the analyzer
// and checks the trigger and the captured pattern. After the trigger the
// latches must hold a block of ones at the output end of the chain whose
// length is ceil((width - TRIG_PS) / STAGE_PS), i.e. the width to one
// stage. Widths are kept off exact stage multiples, where the closing latch
// and the pulse edge would meet in the same instant. Also checks that
// nothing triggers without a pulse and that clear re-arms the analyzer.
module set_trigger_capture_tb;
  localparam int unsigned N = 40, STAGE = 40, TRIG = 10;
  logic set_in = 1'b0, clear = 1'b0, triggered;
  logic [N-1:0] captured;
  int checks = 0, failures = 0;
  int unsigned widths [7] = '{65, 145, 215, 333, 405, 790, 1235};

  set_trigger_capture #(.N_STAGES(N), .STAGE_PS(STAGE), .TRIG_PS(TRIG)) dut (.*);

  task automatic check(logic [N-1:0] got, logic [N-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100;
    clear = 1'b1;   // an edge: the flip-flop starts at a random value
    #5000;
    clear = 1'b0;
    #5000;
    check(N'(triggered), '0, "no trigger when idle");
    foreach (widths[j]) begin
      int unsigned w, cnt;
      logic [N-1:0] exp;
      w = widths[j];
      cnt = (w - TRIG + STAGE - 1) / STAGE;
      if (cnt > N) cnt = N;
      exp = '0;
      for (int unsigned i = 0; i < cnt; i++) exp[N-1-i] = 1'b1;
      set_in = 1'b1;
      #(w);
      set_in = 1'b0;
      #5000;
      check(N'(triggered), N'(1), "triggered");
      check(captured, exp, $sformatf("pattern for %0d ps", w));
      clear = 1'b1;
      #1000;
      check(N'(triggered), '0, "clear");
      clear = 1'b0;
      #3000;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
