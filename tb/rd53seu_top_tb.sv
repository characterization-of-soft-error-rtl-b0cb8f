`timescale 1ps/1ps
// rd53seu_top_tb -- end-to-end test of the test chip at full size (18
// structures of 1024 bits), driven only through the chip pins, with upsets
// made by writing memory elements through hierarchical references.
//
// For every structure, selected with SEL:
//   * flip-flop structures with asynchronous reset: pulse RESETB, the copies
//     must read 0;
//   * shift a random 1024-bit pattern in through SHIFTIN (1024 clocks);
//     latch structures copy it into the latches with LOAD;
//   * skewed structures: the three copy clocks must rise in order, 0, delay 1
//     and delay 2 after CLOCK;
//   * upset one copy of bit 3 (masked), two copies of bit 500 (one visible
//     flipped bit), and in latch structures an access-chain bit (repaired by
//     READBACK);
//   * one clock later, corrected structures must have repaired bit 3's
//     copy, the others must still hold it wrong;
//   * READBACK (latch structures), then read the 1024 bits out on SHIFTOUT
//     while shifting a second pattern in, and compare each bit; the DAQ-side
//     bit-flip count must be exactly 1. In flip-flop structures a 200 ps
//     transient is forced on the data path into bit 8 at the second read-out
//     clock edge: the unskewed structures take it (a second flipped bit),
//     the three skewed ones filter it, since only copy 0 samples it.
// At the end structure 0 is read again: it must still hold its second
// pattern, untouched while the other 17 were exercised.
// SET part: a strike in each target block; the trigger-capture analyzer
// must hold the pulse over ceil((w - 10 ps) / 40 ps) stages and the
// temporal filter must flag the stages whose delay is below the width.
// Each of these mechanisms is counted; one that never happens is a failure.
module rd53seu_top_tb;
  import rd53seu_pkg::*;
  localparam int unsigned PERIOD = 10_000;   // 100 MHz
  localparam int unsigned L      = SR_LENGTH;
  localparam int unsigned B_MASK = 3;        // single upset, masked
  localparam int unsigned B_MBU  = 500;      // double upset, visible
  localparam int unsigned B_SR   = 700;      // access-chain upset (latches)

  logic CLOCK = 1'b0, RESETB = 1'b1, SHIFTEN = 1'b0, LOAD = 1'b0, SHIFTIN = 1'b0, READBACK = 1'b0;
  logic [SEL_W-1:0] SEL = '0;
  logic SHIFTOUT;
  logic SET_TC_IN = 1'b0, SET_TC_CLEAR = 1'b0, SET_TC_TRIGGERED;
  logic [39:0] SET_TC_CAPTURED;
  logic SET_TF_IN = 1'b0, SET_TF_CLEAR = 1'b0;
  logic [7:0] SET_TF_HIT;

  int checks = 0, failures = 0;
  int n_load = 0, n_readout = 0, n_masked = 0, n_mbu = 0, n_corrected = 0, n_persist = 0,
      n_reset = 0, n_latch_rb = 0, n_skew = 0, n_hold = 0, n_tc = 0, n_tf = 0,
      n_set_taken = 0, n_set_filtered = 0;

  logic [N_STRUCTURES-1:0] inj_req = '0, chk_req = '0, rst_chk = '0, skew_chk = '0, glitch_req = '0;
  localparam int unsigned G_READ = L - 7;    // read step of the bit hit by the data-path transient
  logic [L-1:0] pat [N_STRUCTURES];
  logic [L-1:0] pat2 [N_STRUCTURES];

  rd53seu_top dut (.*);

  always #(PERIOD / 2) CLOCK = ~CLOCK;

  task automatic check(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  // ---- per-structure probes (hierarchical paths need constant indices) ----
  for (genvar s = 0; s < N_STRUCTURES; s++) begin : g_probe
    localparam structure_cfg_t C = structure_cfg(s);
    if (is_latch(C.elem)) begin : g_l
      always @(posedge inj_req[s]) begin
        dut.g_sr[s].u_sr.g_latch.u_cells.g_copy[1].lat[B_MASK] = ~dut.g_sr[s].u_sr.g_latch.u_cells.g_copy[1].lat[B_MASK];
        dut.g_sr[s].u_sr.g_latch.u_cells.g_copy[0].lat[B_MBU]  = ~dut.g_sr[s].u_sr.g_latch.u_cells.g_copy[0].lat[B_MBU];
        dut.g_sr[s].u_sr.g_latch.u_cells.g_copy[2].lat[B_MBU]  = ~dut.g_sr[s].u_sr.g_latch.u_cells.g_copy[2].lat[B_MBU];
        dut.g_sr[s].u_sr.g_latch.sr[B_SR]                  = ~dut.g_sr[s].u_sr.g_latch.sr[B_SR];
      end
      always @(posedge chk_req[s]) begin
        check(64'(dut.g_sr[s].u_sr.g_latch.u_cells.g_copy[1].lat[B_MASK] ^ dut.g_sr[s].u_sr.g_latch.u_cells.g_copy[0].lat[B_MASK]),
              1, $sformatf("latch upset stays, structure %0d", s));
        n_persist++;
      end
    end else begin : g_f
      always @(posedge inj_req[s]) begin
        dut.g_sr[s].u_sr.g_ff.u_cells.g_copy[1].ff[B_MASK] = ~dut.g_sr[s].u_sr.g_ff.u_cells.g_copy[1].ff[B_MASK];
        dut.g_sr[s].u_sr.g_ff.u_cells.g_copy[0].ff[B_MBU]  = ~dut.g_sr[s].u_sr.g_ff.u_cells.g_copy[0].ff[B_MBU];
        dut.g_sr[s].u_sr.g_ff.u_cells.g_copy[2].ff[B_MBU]  = ~dut.g_sr[s].u_sr.g_ff.u_cells.g_copy[2].ff[B_MBU];
      end
      always @(posedge chk_req[s]) begin
        logic differs;
        differs = dut.g_sr[s].u_sr.g_ff.u_cells.g_copy[1].ff[B_MASK] ^ dut.g_sr[s].u_sr.g_ff.u_cells.g_copy[0].ff[B_MASK];
        if (C.version == TMR_CORR) begin
          check(64'(differs), 0, $sformatf("correction repairs, structure %0d", s));
          n_corrected++;
        end else begin
          check(64'(differs), 1, $sformatf("upset stays, structure %0d", s));
          n_persist++;
        end
      end
      always @(posedge rst_chk[s]) begin
        check(64'({dut.g_sr[s].u_sr.g_ff.u_cells.g_copy[0].ff[0],
                   dut.g_sr[s].u_sr.g_ff.u_cells.g_copy[1].ff[B_MBU],
                   dut.g_sr[s].u_sr.g_ff.u_cells.g_copy[2].ff[L-1]}), 0,
              $sformatf("async reset, structure %0d", s));
        n_reset++;
      end
      // 200 ps transient on the data path into bit 8, centred on the second
      // read-out clock edge (the request comes just before read-out starts)
      always @(posedge glitch_req[s]) begin
        logic v;
        @(negedge CLOCK);
        #(PERIOD / 2 - 100);
        v = dut.g_sr[s].u_sr.g_ff.d_prev[7];
        force dut.g_sr[s].u_sr.g_ff.d_prev[7] = ~v;
        #200;
        release dut.g_sr[s].u_sr.g_ff.d_prev[7];
      end
      always @(posedge skew_chk[s]) begin
        @(posedge CLOCK);
        #(C.delay1_ps / 2);
        check(64'(dut.g_sr[s].u_sr.g_ff.cclk), 64'(3'b001), "skew: copy 0 clock first");
        #(C.delay1_ps);
        check(64'(dut.g_sr[s].u_sr.g_ff.cclk), 64'(3'b011), "skew: copy 1 after delay 1");
        #(C.delay2_ps - C.delay1_ps);
        check(64'(dut.g_sr[s].u_sr.g_ff.cclk), 64'(3'b111), "skew: copy 2 after delay 2");
        n_skew++;
      end
    end
  end

  // ---- pin-level sequences ----
  task automatic shift_bits(logic [L-1:0] din, output logic [L-1:0] dout);
    for (int k = 0; k < L; k++) begin
      dout[k] = SHIFTOUT;
      SHIFTEN = 1'b1;
      SHIFTIN = din[k];
      @(negedge CLOCK);
    end
    SHIFTEN = 1'b0;
    SHIFTIN = 1'b0;
  endtask

  task automatic pulse(ref logic sig);
    sig = 1'b1;
    @(negedge CLOCK);
    sig = 1'b0;
  endtask

  task automatic test_structure(int unsigned s);
    structure_cfg_t c;
    logic [L-1:0] dummy, got, exp;
    int flips;
    c = structure_cfg(s);
    SEL = SEL_W'(s);
    @(negedge CLOCK);
    if (c.elem == MEM_DFF_ARST) begin
      RESETB = 1'b0;
      #1000;
      rst_chk[s] = 1'b1;
      @(negedge CLOCK);
      RESETB = 1'b1;
    end
    for (int w = 0; w < L / 32; w++) pat[s][w*32 +: 32] = $urandom;
    for (int w = 0; w < L / 32; w++) pat2[s][w*32 +: 32] = $urandom;
    if (c.version == TMR_SKEW) skew_chk[s] = 1'b1;
    shift_bits(pat[s], dummy);
    n_load++;
    if (is_latch(c.elem)) pulse(LOAD);
    repeat (4) @(negedge CLOCK);
    inj_req[s] = 1'b1;
    @(negedge CLOCK);
    chk_req[s] = 1'b1;
    repeat (2) @(negedge CLOCK);
    if (is_latch(c.elem)) begin
      pulse(READBACK);
      n_latch_rb++;
    end
    if (!is_latch(c.elem)) glitch_req[s] = 1'b1;
    shift_bits(pat2[s], got);
    exp = pat[s];
    exp[L-1-B_MBU] = ~exp[L-1-B_MBU];
    // without skew all three copies take the transient: one more wrong bit
    if (!is_latch(c.elem) && c.version != TMR_SKEW) exp[G_READ] = ~exp[G_READ];
    flips = 0;
    for (int k = 0; k < L; k++) if (got[k] != pat[s][k]) flips++;
    check(64'(flips), (!is_latch(c.elem) && c.version != TMR_SKEW) ? 2 : 1,
          $sformatf("bit flips counted, structure %0d", s));
    if (!is_latch(c.elem)) begin
      if (got[G_READ] != pat[s][G_READ]) n_set_taken++;
      else if (c.version == TMR_SKEW)    n_set_filtered++;
    end
    check(64'(got == exp), 1, $sformatf("read pattern, structure %0d", s));
    if (got[L-1-B_MASK] == pat[s][L-1-B_MASK]) n_masked++;
    if (got[L-1-B_MBU] != pat[s][L-1-B_MBU]) n_mbu++;
    n_readout++;
  endtask

  initial begin
    #(100_000 * PERIOD);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [L-1:0] got;
    logic [L-1:0] pat0_copy;
    @(negedge CLOCK);
    SET_TC_CLEAR = 1'b1;   // clear edges: the SET flags start at random values
    SET_TF_CLEAR = 1'b1;
    @(negedge CLOCK);
    SET_TC_CLEAR = 1'b0;
    SET_TF_CLEAR = 1'b0;

    for (int unsigned s = 0; s < N_STRUCTURES; s++) test_structure(s);

    // structure 0 must still hold its second pattern (if the bit of a
    // latch structure were selected this would not apply: structure 0 is a
    // flip-flop structure)
    pat0_copy = pat2[0];
    SEL = '0;
    @(negedge CLOCK);
    shift_bits('0, got);
    check(64'(got == pat0_copy), 1, "unselected structure held its pattern");
    if (got == pat0_copy) n_hold++;

    // SET: 333 ps strike in each target block
    begin
      int unsigned w, cnt;
      logic [39:0] exp_tc;
      w = 333;
      cnt = (w - 10 + 39) / 40;
      exp_tc = '0;
      for (int unsigned i = 0; i < cnt; i++) exp_tc[39 - i] = 1'b1;
      dut.u_tc_target.strike = 1'b1;
      dut.u_tf_target.strike = 1'b1;
      #(w);
      dut.u_tc_target.strike = 1'b0;
      dut.u_tf_target.strike = 1'b0;
      #5000;
      check(64'(SET_TC_TRIGGERED), 1, "SET trigger");
      check(64'(SET_TC_CAPTURED), 64'(exp_tc), "SET captured width");
      check(64'(SET_TF_HIT), 64'(8'b0000_1111), "SET temporal filter flags");
      if (SET_TC_TRIGGERED && SET_TC_CAPTURED == exp_tc) n_tc++;
      if (SET_TF_HIT == 8'b0000_1111) n_tf++;
    end

    $display("mechanisms: load=%0d readout=%0d masked=%0d mbu=%0d corrected=%0d persisted=%0d reset=%0d latch_readback=%0d skew=%0d unselected_hold=%0d set_capture=%0d set_filter=%0d datapath_set_taken=%0d datapath_set_filtered_by_skew=%0d",
             n_load, n_readout, n_masked, n_mbu, n_corrected, n_persist, n_reset, n_latch_rb,
             n_skew, n_hold, n_tc, n_tf, n_set_taken, n_set_filtered);
    check(64'(n_set_taken == 9 && n_set_filtered == 3), 1, "data-path transients: taken without skew, filtered with skew");
    check(64'(n_load == N_STRUCTURES && n_readout == N_STRUCTURES), 1, "every structure loaded and read");
    check(64'(n_masked > 0 && n_mbu > 0 && n_corrected > 0 && n_persist > 0), 1, "upset mechanisms seen");
    check(64'(n_reset > 0 && n_latch_rb > 0 && n_skew > 0 && n_hold > 0), 1, "structure mechanisms seen");
    check(64'(n_tc > 0 && n_tf > 0), 1, "SET mechanisms seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
