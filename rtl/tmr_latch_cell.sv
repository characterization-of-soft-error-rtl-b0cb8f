`timescale 1ps/1ps
// tmr_latch_cell -- WIDTH triplicated latches with their majority voters,
// the memory of the latch-based test structures (standard or custom latch;
// both have this logic function and differ only as layout cells). Copy k of
// all bits forms the vector g_copy[k].lat.
//
// While load is high the latches are transparent and follow d; when load
// falls they hold. q is the two-out-of-three vote per bit, so one upset
// latch is masked. An upset latch is not repaired: a correction loop through
// a transparent latch would be combinational, so this design has none and
// the copy stays wrong until the next load. The copies carry a keep
// attribute so that synthesis does not merge them.
//
// Timing: level-sensitive; d must be stable around the falling edge of load.
// Triplicated latches with a voter follow the source; the absence of a
// correction loop is this design's choice.
module tmr_latch_cell #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] r [3];

  for (genvar k = 0; k < 3; k++) begin : g_copy
    (* keep *) logic [WIDTH-1:0] lat;  // copy k of every bit
    (* keep *) always_latch
      if (load) lat = d;
    assign r[k] = lat;
  end

  for (genvar i = 0; i < WIDTH; i++) begin : g_vote
    majority_voter u_vote (.a({r[2][i], r[1][i], r[0][i]}), .y(q[i]));
  end
endmodule
