`timescale 1ps/1ps
// set_temporal_filter -- behavioural model of the temporal-filtering SET
// pulse-width analyzer; its delays are analog properties of the layout.
//
// The pulse from the target block (quiet level 0) feeds N_STAGES pulse
// filters in parallel. Filter k is the AND of the signal with itself delayed
// by FILTER_PS[k]: a pulse wider than FILTER_PS[k] leaves it, shortened by
// that delay, and a narrower one is removed. Each filter output clocks a
// flip-flop with D tied to 1, so hit[k] records that at least one pulse
// wider than FILTER_PS[k] has arrived since the last clear (active high,
// asynchronous). With increasing delays hit is a thermometer code of the
// widest pulse seen.
//
// Eight stages of delay-based filters and flip-flops follow the source; the
// delay values (spanning the 50..800 ps range of interest), the parallel
// arrangement and the sticky flip-flops are this design's choices.
module set_temporal_filter #(
  parameter int unsigned N_STAGES = 8,
  parameter int unsigned FILTER_PS [N_STAGES] = '{50, 100, 200, 300, 400, 500, 650, 800}
) (
  input  logic                set_in,
  input  logic                clear,
  output logic [N_STAGES-1:0] hit
);
  for (genvar k = 0; k < N_STAGES; k++) begin : g_stage
    logic delayed, filtered, flag;
    delay_cell #(.DELAY_PS(FILTER_PS[k])) u_delay (.a(set_in), .y(delayed));
    assign filtered = set_in & delayed;
    always_ff @(posedge filtered or posedge clear)
      if (clear) flag <= 1'b0;
      else       flag <= 1'b1;
    assign hit[k] = flag;
  end
endmodule
