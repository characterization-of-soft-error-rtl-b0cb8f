`timescale 1ps/1ps
// tmr_shift_register -- one 1 kb SEU test structure.
//
// A known pattern is shifted in through shift_in while shift_en is high, the
// structure then holds it during the beam exposure (shift_en low), and the
// pattern is shifted out through shift_out for comparison. Every bit is a
// triplicated cell; which one is set by the parameters:
//
//   ELEM = MEM_DFF / MEM_DFF_ARST
//     One tmr_ff_cell bank of LENGTH bits wired as a chain: bit i takes the
//     voted value of bit i-1, bit 0 takes shift_in, and shift_out is the
//     voted value of bit LENGTH-1. After a load, shift_out shows the first
//     bit shifted in; each rising clk edge with shift_en high brings out the
//     next one.
//     VERSION = TMR_NO_CORR or TMR_CORR picks the hold value of the cells.
//     VERSION = TMR_SKEW clocks copy 1 through a DELAY1_PS delay line and
//     copy 2 through a DELAY2_PS line (uncorrected cells). The value each
//     bit takes from the previous bit then passes a HOLD_PS hold buffer,
//     longer than DELAY2_PS, so that the late copies still sample the old
//     value; the clock period must exceed HOLD_PS plus DELAY2_PS.
//   ELEM = MEM_LATCH_STD / MEM_LATCH_CUSTOM
//     The memory under test is a tmr_latch_cell bank of LENGTH bits. A chain
//     of single flip-flops is the access path: load (level) copies the chain
//     into the latches, readback (at a clock edge, priority over shift_en)
//     copies the voted latch outputs back into the chain, which is then
//     shifted out. load and readback are ignored by flip-flop structures.
//
// SPACING_UM is the layout distance between the three copies of a bit. It is
// a placement constraint and changes nothing here; it is kept so that each
// instance carries its structure's identity.
//
// Sizes, versions, element types and delay values follow the source. The
// access chain of the latch structures, the readback priority, the base
// version of the skewed structure and the hold buffers are this design's
// choices.
module tmr_shift_register
  import rd53seu_pkg::*;
#(
  parameter int unsigned  LENGTH     = 1024,
  parameter tmr_version_e VERSION    = TMR_NO_CORR,
  parameter mem_elem_e    ELEM       = MEM_DFF,
  parameter int unsigned  SPACING_UM = 5,
  parameter int unsigned  DELAY1_PS  = 250,
  parameter int unsigned  DELAY2_PS  = 500,
  parameter int unsigned  HOLD_PS    = 2500
) (
  input  logic clk,
  input  logic rst_n,
  input  logic shift_en,
  input  logic load,
  input  logic readback,
  input  logic shift_in,
  output logic shift_out
);

  initial assert (SPACING_UM > 0 && LENGTH >= 2) else $error("bad structure parameters");
  initial assert (VERSION != TMR_SKEW || HOLD_PS > DELAY2_PS)
    else $error("hold buffer must exceed the largest clock delay");

  if (ELEM == MEM_DFF || ELEM == MEM_DFF_ARST) begin : g_ff
    logic [2:0]        cclk;     // clocks of copies 0, 1, 2
    logic [LENGTH-1:0] q;        // voted bits; q[LENGTH-1] is the output
    logic [LENGTH-1:0] d;        // shift input of every bit
    logic [LENGTH-2:0] d_prev;   // q[LENGTH-2:0], after the hold buffer if skewed

    assign cclk[0] = clk;
    if (VERSION == TMR_SKEW) begin : g_skew
      delay_cell #(.DELAY_PS(DELAY1_PS)) u_delay1 (.a(clk), .y(cclk[1]));
      delay_cell #(.DELAY_PS(DELAY2_PS)) u_delay2 (.a(clk), .y(cclk[2]));
      delay_cell #(.DELAY_PS(HOLD_PS), .WIDTH(LENGTH - 1)) u_hold
        (.a(q[LENGTH-2:0]), .y(d_prev));
    end else begin : g_noskew
      assign cclk[1] = clk;
      assign cclk[2] = clk;
      assign d_prev  = q[LENGTH-2:0];
    end

    assign d = {d_prev, shift_in};

    tmr_ff_cell #(
      .WIDTH      (LENGTH),
      .CORRECTION (VERSION == TMR_CORR),
      .ASYNC_RESET(ELEM == MEM_DFF_ARST)
    ) u_cells (
      .clk     (cclk),
      .rst_n   (rst_n),
      .shift_en(shift_en),
      .d       (d),
      .q       (q)
    );

    assign shift_out = q[LENGTH-1];

    logic unused_latch_ctrl;
    assign unused_latch_ctrl = load ^ readback;
  end else begin : g_latch
    logic [LENGTH-1:0] sr;       // access chain; sr[0] takes shift_in
    logic [LENGTH-1:0] lq;       // voted latch outputs

    always_ff @(posedge clk) begin
      if (readback)      sr <= lq;
      else if (shift_en) sr <= {sr[LENGTH-2:0], shift_in};
    end

    tmr_latch_cell #(.WIDTH(LENGTH)) u_cells (.load(load), .d(sr), .q(lq));

    assign shift_out = sr[LENGTH-1];

    logic unused_rst;
    assign unused_rst = rst_n;
  end
endmodule
