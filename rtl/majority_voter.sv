`timescale 1ps/1ps
// majority_voter -- two-out-of-three vote over the three copies of a
// triplicated memory element, as used by every TMR version of the test chip.
//
// Purely combinational: y is 1 when at least two bits of a are 1. A single
// upset copy is therefore masked at the output. The voter is the source's;
// the sum-of-products form is this design's.
module majority_voter (
  input  logic [2:0] a,
  output logic       y
);
  always_comb y = (a[0] & a[1]) | (a[1] & a[2]) | (a[0] & a[2]);
endmodule
