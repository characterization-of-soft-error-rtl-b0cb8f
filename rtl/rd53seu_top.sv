`timescale 1ps/1ps
// rd53seu_top -- digital content of the SEU/SET test chip.
//
// Shift-register part: N_STRUCTURES (18) structures of SR_LENGTH (1024) bits,
// each made of one kind of triplicated cell (see rd53seu_pkg::structure_cfg
// for the table of versions, memory elements, spacings and clock delays).
// They share one set of pins through structure_select: SEL picks the
// structure; CLOCK, SHIFTEN, SHIFTIN, LOAD and READBACK reach it and its
// serial output appears on SHIFTOUT. A test loads a pattern (SHIFTEN high
// for SR_LENGTH clocks), leaves the structure holding under the beam
// (SHIFTEN low), then reads it out and compares. Latch structures also need
// LOAD (pattern into the latches, before exposure) and READBACK (latches
// back into the access chain, one clock, before read out). RESETB clears the
// structures built from flip-flops with asynchronous reset.
//
// Serial output timing: after the structure is loaded, SHIFTOUT shows its
// last bit; each rising CLOCK with SHIFTEN high moves the next one out, so
// the bits come out in the order they were shifted in. CLOCK must be slower
// than 1 / (HOLD_BUFFER_PS + 2 ns) = 222 MHz for the skewed structures.
//
// SET part: two target blocks with dedicated pins, one feeding the
// trigger-capture analyzer and one feeding the temporal-filter analyzer.
//
// The structure set, the select encoding and the reset pin are this design's
// choices; the rest of the arrangement follows the source.
module rd53seu_top
  import rd53seu_pkg::*;
#(
  parameter int unsigned SR_LENGTH_P = SR_LENGTH
) (
  // shift-register structures
  input  logic             CLOCK,
  input  logic             RESETB,
  input  logic             SHIFTEN,
  input  logic             LOAD,
  input  logic             SHIFTIN,
  input  logic             READBACK,
  input  logic [SEL_W-1:0] SEL,
  output logic             SHIFTOUT,
  // SET trigger-capture structure
  input  logic             SET_TC_IN,
  input  logic             SET_TC_CLEAR,
  output logic [39:0]      SET_TC_CAPTURED,
  output logic             SET_TC_TRIGGERED,
  // SET temporal-filter structure
  input  logic             SET_TF_IN,
  input  logic             SET_TF_CLEAR,
  output logic [7:0]       SET_TF_HIT
);
  logic [N_STRUCTURES-1:0] en, ld, rb, si, so;

  structure_select #(.N(N_STRUCTURES), .SEL_W(SEL_W)) u_select (
    .sel      (SEL),
    .shift_en (SHIFTEN),
    .load     (LOAD),
    .readback (READBACK),
    .shift_in (SHIFTIN),
    .en_o     (en),
    .load_o   (ld),
    .rb_o     (rb),
    .si_o     (si),
    .so_i     (so),
    .shift_out(SHIFTOUT)
  );

  for (genvar s = 0; s < N_STRUCTURES; s++) begin : g_sr
    localparam structure_cfg_t CFG = structure_cfg(s);
    tmr_shift_register #(
      .LENGTH    (SR_LENGTH_P),
      .VERSION   (CFG.version),
      .ELEM      (CFG.elem),
      .SPACING_UM(int'(CFG.spacing_um)),
      .DELAY1_PS (int'(CFG.delay1_ps)),
      .DELAY2_PS (int'(CFG.delay2_ps)),
      .HOLD_PS   (HOLD_BUFFER_PS)
    ) u_sr (
      .clk      (CLOCK),
      .rst_n    (RESETB),
      .shift_en (en[s]),
      .load     (ld[s]),
      .readback (rb[s]),
      .shift_in (si[s]),
      .shift_out(so[s])
    );
  end

  // SET structures
  logic tc_target, tf_target;

  set_target_logic u_tc_target (.in_level(SET_TC_IN), .out(tc_target));
  set_trigger_capture #(.N_STAGES(40), .STAGE_PS(40)) u_tc (
    .set_in   (tc_target),
    .clear    (SET_TC_CLEAR),
    .captured (SET_TC_CAPTURED),
    .triggered(SET_TC_TRIGGERED)
  );

  set_target_logic u_tf_target (.in_level(SET_TF_IN), .out(tf_target));
  set_temporal_filter #(.N_STAGES(8)) u_tf (
    .set_in(tf_target),
    .clear (SET_TF_CLEAR),
    .hit   (SET_TF_HIT)
  );
endmodule
