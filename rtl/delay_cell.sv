`timescale 1ps/1ps
// delay_cell -- behavioural model, not synthesizable logic.
//
// A fixed propagation delay of DELAY_PS picoseconds on WIDTH parallel
// wires. On silicon this is a chain of delay buffers placed by the physical
// design flow. It stands for three things in this design:
//   * the clock-line delays "delay 1" and "delay 2" of the skewed TMR version
//     (250/500, 500/1000 or 1000/2000 ps),
//   * the hold buffers in the data path between the bits of a skewed
//     structure,
//   * the delay elements of the two single-event-transient analyzers.
// Modelled as the inertial delay of a continuous assignment: an edge comes
// out DELAY_PS later, and a pulse shorter than DELAY_PS is swallowed, as a
// slow buffer chain would do. Synthesis ignores the delay and leaves wires.
module delay_cell #(
  parameter int unsigned DELAY_PS = 250,
  parameter int unsigned WIDTH    = 1
) (
  input  logic [WIDTH-1:0] a,
  output logic [WIDTH-1:0] y
);
  assign #(DELAY_PS) y = a;
endmodule
