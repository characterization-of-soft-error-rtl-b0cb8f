`timescale 1ps/1ps
// rd53seu_pkg -- types and constants shared by the SEU test-structure modules.
//
// The test chip holds 18 shift-register structures of 1024 bits. Each one is
// built from a single kind of triplicated (TMR) bit cell and differs from the
// others in three ways: the TMR version (no correction, correction by feeding
// the voted value back, or clock skew between the three copies), the memory
// element (D flip-flop, D flip-flop with asynchronous reset, standard latch,
// custom latch) and the layout spacing between the three copies. The spacing
// and the latch flavour are physical properties: they are carried here as
// labels so that each structure can be identified, but change no logic.
//
// The structure table below is this design's choice; the source only says
// that there are 18 structures differing in those three properties.
package rd53seu_pkg;

  typedef enum logic [1:0] {
    TMR_NO_CORR = 2'd0,  // triplication + voter
    TMR_CORR    = 2'd1,  // voted value fed back through the hold multiplexer
    TMR_SKEW    = 2'd2   // copies 1 and 2 clocked by delayed clocks
  } tmr_version_e;

  typedef enum logic [1:0] {
    MEM_DFF          = 2'd0,
    MEM_DFF_ARST     = 2'd1,
    MEM_LATCH_STD    = 2'd2,
    MEM_LATCH_CUSTOM = 2'd3
  } mem_elem_e;

  typedef struct packed {
    tmr_version_e version;
    mem_elem_e    elem;
    logic [4:0]   spacing_um;   // 5, 10 or 15
    logic [11:0]  delay1_ps;    // skew version only
    logic [11:0]  delay2_ps;
  } structure_cfg_t;

  localparam int unsigned N_STRUCTURES = 18;
  localparam int unsigned SR_LENGTH    = 1024;
  localparam int unsigned SEL_W        = 5;
  // Data-path hold buffer in front of each bit of a skewed structure; it must
  // exceed the largest clock delay (2 ns) so the late copies still see the
  // old value of the previous bit.
  localparam int unsigned HOLD_BUFFER_PS = 2500;

  function automatic bit is_latch(mem_elem_e e);
    return (e == MEM_LATCH_STD) || (e == MEM_LATCH_CUSTOM);
  endfunction

  // Structure 0..17:
  //   0- 2  no correction,  DFF,            5/10/15 um
  //   3- 5  correction,     DFF,            5/10/15 um
  //   6- 8  correction,     DFF async reset 5/10/15 um
  //   9-11  latch, standard                 5/10/15 um
  //  12-14  latch, custom                   5/10/15 um
  //  15-17  clock skew,     DFF, 10 um, delays 0.25/0.5, 0.5/1.0, 1.0/2.0 ns
  function automatic structure_cfg_t structure_cfg(int unsigned idx);
    structure_cfg_t c;
    logic [4:0] sp;
    sp = 5'(5 * ((idx % 3) + 1));
    c = '{version: TMR_NO_CORR, elem: MEM_DFF, spacing_um: sp,
          delay1_ps: 12'd0, delay2_ps: 12'd0};
    case (idx / 3)
      0: c.version = TMR_NO_CORR;
      1: c.version = TMR_CORR;
      2: begin c.version = TMR_CORR; c.elem = MEM_DFF_ARST; end
      3: c.elem = MEM_LATCH_STD;
      4: c.elem = MEM_LATCH_CUSTOM;
      default: begin
        c.version    = TMR_SKEW;
        c.spacing_um = 5'd10;
        c.delay1_ps  = 12'(250 << (idx % 3));
        c.delay2_ps  = 12'(500 << (idx % 3));
      end
    endcase
    return c;
  endfunction

endpackage
