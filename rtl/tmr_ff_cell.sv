`timescale 1ps/1ps
// tmr_ff_cell -- WIDTH triplicated flip-flop bits with their majority voters,
// the memory of the flip-flop shift-register test structures. Every bit has
// three copies; copy k of all bits forms the vector g_copy[k].ff, clocked by
// clk[k].
//
// Every clock edge copy k of bit i loads, through a two-way multiplexer:
//   shift_en = 1 : d[i] (in a shift register, the voted previous bit);
//   shift_en = 0 : its hold value.
// The hold value selects the TMR version:
//   CORRECTION = 0 : the copy's own value. An upset copy stays wrong until
//                    the next shift; the voter hides it at q.
//   CORRECTION = 1 : the voted value q[i]. An upset copy is repaired at the
//                    next clock edge.
// In the clock-skew version the enclosing structure drives clk[1] and clk[2]
// through delay lines (delay 1, delay 2); otherwise all three carry the same
// clock. ASYNC_RESET = 1 gives the flip-flop flavour with an asynchronous,
// active-low reset to 0; with ASYNC_RESET = 0 rst_n is not used.
// The three copies carry a keep attribute so that synthesis does not merge
// them back into one flip-flop.
//
// The version and flavour set follows the source; the hold recirculation of
// the uncorrected version, the reset value and polarity are this design's
// choices.
module tmr_ff_cell #(
  parameter int unsigned WIDTH       = 1,
  parameter bit          CORRECTION  = 1'b0,
  parameter bit          ASYNC_RESET = 1'b0
) (
  input  logic [2:0]       clk,
  input  logic             rst_n,
  input  logic             shift_en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] r [3];   // the three copies

  for (genvar i = 0; i < WIDTH; i++) begin : g_vote
    majority_voter u_vote (.a({r[2][i], r[1][i], r[0][i]}), .y(q[i]));
  end

  for (genvar k = 0; k < 3; k++) begin : g_copy
    (* keep *) logic [WIDTH-1:0] ff;   // copy k of every bit
    logic [WIDTH-1:0] nxt;

    always_comb nxt = shift_en ? d : (CORRECTION ? q : ff);

    if (ASYNC_RESET) begin : g_arst
      (* keep *) always_ff @(posedge clk[k] or negedge rst_n)
        if (!rst_n) ff <= '0;
        else        ff <= nxt;
    end else begin : g_plain
      (* keep *) always_ff @(posedge clk[k]) ff <= nxt;
    end
    assign r[k] = ff;
  end

  if (!ASYNC_RESET) begin : g_unused
    logic unused_rst;
    assign unused_rst = rst_n;
  end
endmodule
