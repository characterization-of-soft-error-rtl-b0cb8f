`timescale 1ps/1ps
// structure_select_tb -- drives random pin values and per-structure serial
// outputs for every select value 0..31 and checks that only the selected
// structure receives the controls, that its serial output reaches
// shift_out, and that out-of-range selects reach nothing.
module structure_select_tb;
  localparam int unsigned N = 18, SEL_W = 5;
  logic [SEL_W-1:0] sel;
  logic shift_en, load, readback, shift_in, shift_out;
  logic [N-1:0] en_o, load_o, rb_o, si_o, so_i;
  int checks = 0, failures = 0;

  structure_select #(.N(N), .SEL_W(SEL_W)) dut (.*);

  task automatic check(logic [N-1:0] got, logic [N-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s sel=%0d: got %h expected %h", what, sel, got, exp);
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
    for (int rep = 0; rep < 8; rep++) begin
      for (int s = 0; s < 32; s++) begin
        logic [N-1:0] onehot;
        sel = SEL_W'(s);
        {shift_en, load, readback, shift_in} = 4'($urandom);
        so_i = N'($urandom);
        #10;
        onehot = (s < N) ? (N'(1) << s) : '0;
        check(en_o,   shift_en ? onehot : '0, "shift_en");
        check(load_o, load     ? onehot : '0, "load");
        check(rb_o,   readback ? onehot : '0, "readback");
        check(si_o,   shift_in ? onehot : '0, "shift_in");
        check(N'(shift_out), N'((s < N) ? so_i[s % N] : 1'b0), "shift_out");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
