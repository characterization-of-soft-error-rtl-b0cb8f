`timescale 1ps/1ps
// set_trigger_capture -- behavioural model of the trigger-capture SET
// pulse-width analyzer; its delays are analog properties of the layout.
//
// The pulse from the target block (quiet level 0) runs down a chain of
// N_STAGES inverters of STAGE_PS each (about 40 ps). A latch hangs on every
// inverter output and stays transparent while the analyzer is armed. When the
// leading edge of the pulse leaves the last stage it clocks the trigger
// flip-flop (D tied to 1), which after TRIG_PS closes all latches. At that
// moment the pulse is spread over the last stages of the chain, so the
// number of latches that hold it, times STAGE_PS, is the pulse width:
//   count = ceil((width - TRIG_PS) / STAGE_PS)  for width up to
//   N_STAGES * STAGE_PS (1.6 ns, above the 50..800 ps range of interest).
// captured[i] is 1 where latch i holds the pulse (the inversion of odd
// stages is undone). triggered reports the flip-flop. clear (active high)
// resets the flip-flop and so re-opens the latches.
//
// Stage count, stage delay and the trigger after the 40th stage follow the
// source; the trigger delay and the parallel readout are this design's
// choices.
module set_trigger_capture #(
  parameter int unsigned N_STAGES = 40,
  parameter int unsigned STAGE_PS = 40,
  parameter int unsigned TRIG_PS  = 10
) (
  input  logic                set_in,
  input  logic                clear,
  output logic [N_STAGES-1:0] captured,
  output logic                triggered
);
  logic [N_STAGES:0]   node;     // node[i]: output of inverter i (node[0] = input)
  logic [N_STAGES-1:0] lat;      // latch on node[i+1]
  logic                edge_out; // pulse at the last stage, true polarity
  logic                close;    // latches closed

  assign node[0] = set_in;
  for (genvar i = 0; i < N_STAGES; i++) begin : g_stage
    assign #(STAGE_PS) node[i+1] = ~node[i];
    always_latch
      if (!close) lat[i] = node[i+1];
    // odd-numbered inverters (i even) invert the pulse
    assign captured[i] = (i % 2 == 0) ? ~lat[i] : lat[i];
  end

  assign edge_out = (N_STAGES % 2 == 0) ? node[N_STAGES] : ~node[N_STAGES];

  always_ff @(posedge edge_out or posedge clear)
    if (clear) triggered <= 1'b0;
    else       triggered <= 1'b1;

  delay_cell #(.DELAY_PS(TRIG_PS)) u_trig_delay (.a(triggered), .y(close));
endmodule
