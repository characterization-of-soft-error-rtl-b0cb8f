`timescale 1ps/1ps
// set_temporal_filter_tb -- sends pulses of known width and checks that
// exactly the stages whose filter delay is below the width have flagged
// (a thermometer code), that flags are sticky across a later narrower pulse
// and that clear resets them.
module set_temporal_filter_tb;
  localparam int unsigned N = 8;
  localparam int unsigned TH [N] = '{50, 100, 200, 300, 400, 500, 650, 800};
  logic set_in = 1'b0, clear = 1'b0;
  logic [N-1:0] hit;
  int checks = 0, failures = 0;
  int unsigned widths [10] = '{30, 75, 150, 250, 350, 450, 575, 700, 900, 1500};

  set_temporal_filter #(.N_STAGES(N), .FILTER_PS(TH)) dut (.*);

  function automatic logic [N-1:0] expected(int unsigned w);
    logic [N-1:0] e = '0;
    for (int k = 0; k < N; k++) e[k] = (w > TH[k]);
    return e;
  endfunction

  task automatic check(logic [N-1:0] got, logic [N-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  task automatic pulse(int unsigned w);
    set_in = 1'b1;
    #(w);
    set_in = 1'b0;
    #3000;
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
    clear = 1'b1;   // an edge: the flags start at random values
    #2000;
    clear = 1'b0;
    #2000;
    check(hit, '0, "idle");
    foreach (widths[j]) begin
      pulse(widths[j]);
      check(hit, expected(widths[j]), $sformatf("width %0d ps", widths[j]));
      pulse(120);  // narrower pulse: nothing is lost
      check(hit, expected(widths[j]) | expected(120), "sticky");
      clear = 1'b1; #500; clear = 1'b0; #500;
      check(hit, '0, "clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
