`timescale 1ps/1ps
// structure_select -- pin sharing between the 18 shift-register structures.
//
// The chip has one set of control pins for all structures. sel names the
// structure under test (binary, 0..N-1). Its shift enable, load, readback and
// serial input follow the pins; every other structure sees zeros and holds
// its contents. The selected structure's serial output drives shift_out. A
// sel of N or more selects nothing and shift_out is 0.
//
// Purely combinational. The clock is not routed through here: it reaches all
// structures, and an unselected structure holds because its shift enable is
// low. Sharing the pins this way follows the source; the binary select and
// the clock fan-out are this design's choices.
module structure_select #(
  parameter int unsigned N     = 18,
  parameter int unsigned SEL_W = 5
) (
  input  logic [SEL_W-1:0] sel,
  input  logic             shift_en,
  input  logic             load,
  input  logic             readback,
  input  logic             shift_in,
  output logic [N-1:0]     en_o,
  output logic [N-1:0]     load_o,
  output logic [N-1:0]     rb_o,
  output logic [N-1:0]     si_o,
  input  logic [N-1:0]     so_i,
  output logic             shift_out
);
  initial assert (N <= (1 << SEL_W)) else $error("SEL_W too small for N");

  always_comb begin
    en_o      = '0;
    load_o    = '0;
    rb_o      = '0;
    si_o      = '0;
    shift_out = 1'b0;
    for (int unsigned i = 0; i < N; i++) begin
      if (sel == SEL_W'(i)) begin
        en_o[i]   = shift_en;
        load_o[i] = load;
        rb_o[i]   = readback;
        si_o[i]   = shift_in;
        shift_out = so_i[i];
      end
    end
  end
endmodule
