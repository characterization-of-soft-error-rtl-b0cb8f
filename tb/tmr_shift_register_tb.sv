`timescale 1ps/1ps
// tmr_shift_register_tb -- runs the test procedure of the chip on five
// short (16-bit) structures side by side: no correction, correction,
// correction with asynchronous-reset flops, standard latch, and clock skew
// with the largest delays (1 ns / 2 ns).
//   1. reset: the reset-flop structure reads all zero;
//   2. shift a random pattern in (16 clocks), LOAD it into the latches;
//   3. hold, and upset memory elements: one copy of bit 3 (must be masked),
//      two copies of bit 9 (must show as one flipped bit), and, in the latch
//      structure, an access-chain bit (must be overwritten by READBACK);
//   4. one clock later: the corrected structures have repaired bit 3's copy,
//      the others still hold it wrong;
//   5. READBACK, then shift out 16 bits and compare bit by bit, first bit
//      out being the first bit in. A bit of cell c leaves at read 15 - c.
//   6. During one read-out clock, a 200 ps transient on the data path into
//      bit 8 of the unskewed and the skewed structure: the first takes it
//      (one extra wrong bit at read 12), the second filters it because its
//      copies 1 and 2 sample after the transient is over.
module tmr_shift_register_tb;
  import rd53seu_pkg::*;
  localparam int unsigned L = 16;
  localparam int unsigned PERIOD = 10_000;
  localparam int unsigned NS = 5;  // structures under test
  localparam int unsigned SET_STEP = 4;  // read step with a data-path transient

  logic clk = 1'b0, rst_n = 1'b1, shift_en = 1'b0, load = 1'b0, readback = 1'b0, shift_in = 1'b0;
  logic [NS-1:0] so;
  logic [L-1:0] pat;
  int checks = 0, failures = 0;

  always #(PERIOD / 2) clk = ~clk;

  tmr_shift_register #(.LENGTH(L), .VERSION(TMR_NO_CORR), .ELEM(MEM_DFF)) u_nc
    (.clk, .rst_n, .shift_en, .load, .readback, .shift_in, .shift_out(so[0]));
  tmr_shift_register #(.LENGTH(L), .VERSION(TMR_CORR), .ELEM(MEM_DFF), .SPACING_UM(10)) u_c
    (.clk, .rst_n, .shift_en, .load, .readback, .shift_in, .shift_out(so[1]));
  tmr_shift_register #(.LENGTH(L), .VERSION(TMR_CORR), .ELEM(MEM_DFF_ARST), .SPACING_UM(15)) u_ar
    (.clk, .rst_n, .shift_en, .load, .readback, .shift_in, .shift_out(so[2]));
  tmr_shift_register #(.LENGTH(L), .VERSION(TMR_NO_CORR), .ELEM(MEM_LATCH_STD)) u_la
    (.clk, .rst_n, .shift_en, .load, .readback, .shift_in, .shift_out(so[3]));
  tmr_shift_register #(.LENGTH(L), .VERSION(TMR_SKEW), .ELEM(MEM_DFF),
                       .DELAY1_PS(1000), .DELAY2_PS(2000), .HOLD_PS(2500)) u_sk
    (.clk, .rst_n, .shift_en, .load, .readback, .shift_in, .shift_out(so[4]));

  task automatic check(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #(2000 * PERIOD);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 1. reset
    @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    check(32'(so[2]), 0, "reset: shift_out");
    check(32'({u_ar.g_ff.u_cells.g_copy[2].ff[7], u_ar.g_ff.u_cells.g_copy[0].ff[7]}), 0, "reset: copies");
    rst_n = 1'b1;

    // 2. shift pattern in, then LOAD
    pat = L'($urandom);
    pat[L-1-9] = 1'b1;
    for (int k = 0; k < L; k++) begin
      shift_en = 1'b1;
      shift_in = pat[k];
      @(negedge clk);
    end
    shift_en = 1'b0;
    shift_in = 1'b0;
    // the first bit shifted in is now at the output of every flop structure
    check(32'(so[0]), 32'(pat[0]), "first bit at output (nc)");
    check(32'(so[4]), 32'(pat[0]), "first bit at output (skew)");
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;

    // 3. hold and upsets
    repeat (3) @(negedge clk);
    u_nc.g_ff.u_cells.g_copy[1].ff[3] = ~u_nc.g_ff.u_cells.g_copy[1].ff[3];
    u_c.g_ff.u_cells.g_copy[1].ff[3]  = ~u_c.g_ff.u_cells.g_copy[1].ff[3];
    u_ar.g_ff.u_cells.g_copy[1].ff[3] = ~u_ar.g_ff.u_cells.g_copy[1].ff[3];
    u_sk.g_ff.u_cells.g_copy[1].ff[3] = ~u_sk.g_ff.u_cells.g_copy[1].ff[3];
    u_la.g_latch.u_cells.g_copy[1].lat[3]      = ~u_la.g_latch.u_cells.g_copy[1].lat[3];
    u_nc.g_ff.u_cells.g_copy[0].ff[9] = 1'b0;
    u_nc.g_ff.u_cells.g_copy[2].ff[9] = 1'b0;
    u_c.g_ff.u_cells.g_copy[0].ff[9]  = 1'b0;
    u_c.g_ff.u_cells.g_copy[2].ff[9]  = 1'b0;
    u_ar.g_ff.u_cells.g_copy[0].ff[9] = 1'b0;
    u_ar.g_ff.u_cells.g_copy[2].ff[9] = 1'b0;
    u_sk.g_ff.u_cells.g_copy[0].ff[9] = 1'b0;
    u_sk.g_ff.u_cells.g_copy[2].ff[9] = 1'b0;
    u_la.g_latch.u_cells.g_copy[0].lat[9]      = 1'b0;
    u_la.g_latch.u_cells.g_copy[2].lat[9]      = 1'b0;
    u_la.g_latch.sr[5]                     = ~u_la.g_latch.sr[5];

    // 4. one clock later
    @(negedge clk);
    check(32'(u_nc.g_ff.u_cells.g_copy[1].ff[3]), {31'b0, ~pat[L-1-3]}, "no correction keeps upset");
    check(32'(u_sk.g_ff.u_cells.g_copy[1].ff[3]), {31'b0, ~pat[L-1-3]}, "skew keeps upset");
    check(32'(u_c.g_ff.u_cells.g_copy[1].ff[3]),  32'(pat[L-1-3]),  "correction repairs upset");
    check(32'(u_ar.g_ff.u_cells.g_copy[1].ff[3]), 32'(pat[L-1-3]),  "correction repairs upset (arst)");
    check(32'(u_la.g_latch.u_cells.g_copy[1].lat[3]),      {31'b0, ~pat[L-1-3]}, "latch keeps upset");

    // 5. readback and read out
    readback = 1'b1;
    @(negedge clk);
    readback = 1'b0;
    for (int k = 0; k < L; k++) begin
      logic e;
      e = pat[k] ^ (k == L - 1 - 9);
      for (int s = 0; s < NS; s++)
        check(32'(so[s] ^ (s == 0 && k == L - 8 + SET_STEP)), 32'(e),
              $sformatf("read bit %0d of structure %0d", k, s));
      shift_en = 1'b1;
      if (k == SET_STEP) begin
        // 200 ps transient on the path from bit 7 to bit 8, centred on the
        // clock edge: all copies of the unskewed structure take it, only
        // copy 0 of the skewed one does (its other copies sample 1 ns and
        // 2 ns later), so the skewed structure filters it.
        logic v_nc, v_sk;
        #(PERIOD / 2 - 100);
        v_nc = u_nc.g_ff.d_prev[7];
        v_sk = u_sk.g_ff.d_prev[7];
        force u_nc.g_ff.d_prev[7] = ~v_nc;
        force u_sk.g_ff.d_prev[7] = ~v_sk;
        #200;
        release u_nc.g_ff.d_prev[7];
        release u_sk.g_ff.d_prev[7];
        check(32'(u_sk.g_ff.u_cells.g_copy[0].ff[8]), {31'b0, ~v_sk}, "skewed: copy 0 took the transient");
        check(32'(u_nc.g_ff.u_cells.g_copy[0].ff[8]), {31'b0, ~v_nc}, "unskewed: copy 0 took the transient");
        check(32'(u_nc.g_ff.u_cells.g_copy[2].ff[8]), {31'b0, ~v_nc}, "unskewed: copy 2 took the transient");
        #(2500);
        check(32'(u_sk.g_ff.u_cells.g_copy[1].ff[8]), 32'(v_sk), "skewed: copy 1 took the settled value");
        check(32'(u_sk.g_ff.u_cells.g_copy[2].ff[8]), 32'(v_sk), "skewed: copy 2 took the settled value");
        check(32'(u_sk.g_ff.q[8]), 32'(v_sk), "skewed: vote correct");
      end
      @(negedge clk);
    end
    shift_en = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
