`timescale 1ps/1ps
// set_target_logic -- behavioural model, not synthesizable logic.
//
// The combinational block exposed to the beam in the single-event-transient
// (SET) test structures. It is modelled as an even chain of N_INV inverters,
// INV_PS each, from the static input in_level to out, so out equals in_level
// when nothing happens. A particle hit on an inner node is modelled by the
// variable strike: while it is 1 the middle node is inverted, and a pulse of
// the same width travels to out (after the remaining inverter delays). A
// testbench sets strike through a hierarchical reference; on silicon it is
// the charge the particle deposits.
//
// The chain length and inverter delay are this design's choices: the source
// names the block but not its contents.
module set_target_logic #(
  parameter int unsigned N_INV  = 8,
  parameter int unsigned INV_PS = 20
) (
  input  logic in_level,
  output logic out
);
  localparam int unsigned HIT_NODE = N_INV / 2;

  logic strike = 1'b0;       // particle hit on node HIT_NODE
  logic [N_INV:0] node;

  initial assert (N_INV % 2 == 0) else $error("N_INV must be even");

  assign node[0] = in_level;
  for (genvar i = 0; i < N_INV; i++) begin : g_inv
    logic drv;
    if (i == HIT_NODE) begin : g_hit
      assign drv = node[i] ^ strike;
    end else begin : g_nohit
      assign drv = node[i];
    end
    assign #(INV_PS) node[i+1] = ~drv;
  end
  assign out = node[N_INV];
endmodule
