`timescale 1ps/1ps
// tmr_ff_cell_tb -- checks the triplicated flip-flop bit in its variants:
//   * shift and hold, voted output;
//   * a single upset copy is masked at q;
//   * without correction the upset copy stays wrong while holding, with
//     correction it is repaired at the next clock edge;
//   * two upset copies flip q;
//   * the asynchronous reset clears all copies without a clock;
//   * with skewed clocks each copy changes at its own clock edge.
// Upsets are made by writing a copy through a hierarchical reference.
module tmr_ff_cell_tb;
  localparam int unsigned PERIOD = 10_000;
  localparam int unsigned D1 = 1000, D2 = 2000;

  logic clk = 1'b0, rst_n = 1'b1, shift_en = 1'b0, d = 1'b0;
  logic [2:0] clk3, clk_skew;
  logic q_nc, q_c, q_ar, q_sk;
  int checks = 0, failures = 0;

  always #(PERIOD / 2) clk = ~clk;
  assign clk3 = {3{clk}};
  assign clk_skew[0] = clk;
  assign #(D1) clk_skew[1] = clk;
  assign #(D2) clk_skew[2] = clk;

  tmr_ff_cell #(.CORRECTION(1'b0), .ASYNC_RESET(1'b0)) u_nc
    (.clk(clk3), .rst_n(rst_n), .shift_en(shift_en), .d(d), .q(q_nc));
  tmr_ff_cell #(.CORRECTION(1'b1), .ASYNC_RESET(1'b0)) u_c
    (.clk(clk3), .rst_n(rst_n), .shift_en(shift_en), .d(d), .q(q_c));
  tmr_ff_cell #(.CORRECTION(1'b1), .ASYNC_RESET(1'b1)) u_ar
    (.clk(clk3), .rst_n(rst_n), .shift_en(shift_en), .d(d), .q(q_ar));
  tmr_ff_cell #(.CORRECTION(1'b0), .ASYNC_RESET(1'b0)) u_sk
    (.clk(clk_skew), .rst_n(rst_n), .shift_en(shift_en), .d(d), .q(q_sk));

  function automatic logic [2:0] copies_nc(); return {u_nc.g_copy[2].ff, u_nc.g_copy[1].ff, u_nc.g_copy[0].ff}; endfunction
  function automatic logic [2:0] copies_c();  return {u_c.g_copy[2].ff,  u_c.g_copy[1].ff,  u_c.g_copy[0].ff};  endfunction
  function automatic logic [2:0] copies_ar(); return {u_ar.g_copy[2].ff, u_ar.g_copy[1].ff, u_ar.g_copy[0].ff}; endfunction
  function automatic logic [2:0] copies_sk(); return {u_sk.g_copy[2].ff, u_sk.g_copy[1].ff, u_sk.g_copy[0].ff}; endfunction

  task automatic check(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  // drive at the falling edge, away from every (skewed) rising edge
  task automatic cycle(logic en, logic din);
    @(negedge clk);
    shift_en = en;
    d = din;
    @(negedge clk);
  endtask

  initial begin
    #(1000 * PERIOD);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // asynchronous reset clears the reset flavour without a clock edge
    @(negedge clk);
    rst_n = 1'b0; #100;
    check(32'(copies_ar()), 0, "async reset copies");
    check(32'(q_ar), 0, "async reset q");
    rst_n = 1'b1;

    // shift a 1 in, then hold
    cycle(1'b1, 1'b1);
    shift_en = 1'b0; d = 1'b0;
    check(32'({q_nc, q_c, q_ar, q_sk}), 32'hf, "shift 1");
    check(32'(copies_nc()), 7, "copies after shift");
    repeat (3) @(negedge clk);
    check(32'({q_nc, q_c, q_ar, q_sk}), 32'hf, "hold 1");

    // single upset in copy 1: masked
    u_nc.g_copy[1].ff = 1'b0;
    u_c.g_copy[1].ff  = 1'b0;
    u_ar.g_copy[1].ff = 1'b0;
    #10;
    check(32'({q_nc, q_c, q_ar}), 32'h7, "single upset masked");
    @(negedge clk);
    check(32'(copies_nc()), 3'b101, "no correction keeps upset");
    check(32'(copies_c()),  3'b111, "correction repairs upset");
    check(32'(copies_ar()), 3'b111, "correction repairs upset (arst)");
    repeat (2) @(negedge clk);
    check(32'(copies_nc()), 3'b101, "upset persists while holding");

    // a second upset in the uncorrected cell flips the vote
    u_nc.g_copy[0].ff = 1'b0;
    #10;
    check(32'(q_nc), 0, "double upset flips q");
    // a shift overwrites all copies
    cycle(1'b1, 1'b1);
    check(32'(copies_nc()), 7, "shift rewrites copies");

    // skewed clocks: shift a 0, look between the clock edges
    @(negedge clk);
    shift_en = 1'b1; d = 1'b0;
    @(posedge clk);
    #(D1 / 2);
    check(32'(copies_sk()), 3'b110, "skew: only copy 0 updated");
    #(D1);
    check(32'(copies_sk()), 3'b100, "skew: copies 0,1 updated");
    check(32'(q_sk), 0, "skew: vote follows two copies");
    #(D2);
    check(32'(copies_sk()), 3'b000, "skew: all copies updated");
    @(negedge clk);
    shift_en = 1'b0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
