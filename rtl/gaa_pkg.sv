// gaa_pkg: types, constants and family-tree helpers shared by the GAA chip.
//
// The GAA keeps its whole population in an external 32K x 16-bit System
// Memory. Each individual ("slot") occupies eight consecutive words:
//   +0..+3  chromosome code, 64 bits, least significant word first
//   +4      fitness, 16 bits (larger is better)
//   +5      family-tree word, see below
//   +6..+7  unused
// Two populations (current and next) live at POP_A_BASE and POP_B_BASE,
// 128 slots each. The elite-degree look-up table, 16K words, fills the upper
// half of the memory (TABLE_BASE) and is written by the host before GO.
// The 64-bit code, the 16-bit fitness, the 15-bit family information, the
// 14-bit table address and the 32K x 16 memory follow the document; the slot
// layout and the exact packing are this design's choice.
//
// Family-tree information (15 bits, stored in a 16-bit word, bit 15 zero):
//   [13:0]  elite counts {c4[4:0], c3[3:0], c2[2:0], c1[1:0]}, where cj is the
//           number of elite ancestors j generations back (0..2^j); these 14
//           bits are the elite-degree table address
//   [14]    E1: the individual the counts belong to was an elite
// A word written by the Selection Unit is in copy form: counts and E1
// describe the individual the slot was copied from (its parent in the
// previous generation). A word written by the Crossover and Mutation Unit
// holds the slot's own counts (E1 zero). Which form a slot holds follows from
// its position: the mated slots are 1 .. 2 x (number of pairs).
package gaa_pkg;

  localparam int CODE_W = 64;
  localparam int FIT_W  = 16;
  localparam int WORD_W = 16;
  localparam int ADDR_W = 15;
  localparam int RNG_W  = 24;
  localparam int SUM_W  = 23;          // 128 x 16-bit fitness values
  localparam int SLOT_W = 7;           // up to 128 individuals
  localparam int EDEG_ONE = 4096;      // 1.0 in the elite-degree fixed point

  localparam logic [ADDR_W-1:0] POP_A_BASE = 15'h0000;
  localparam logic [ADDR_W-1:0] POP_B_BASE = 15'h0400;
  localparam logic [ADDR_W-1:0] TABLE_BASE = 15'h4000;
  localparam int OFF_FIT = 4;
  localparam int OFF_FAM = 5;

  typedef enum logic [1:0] {
    XO_TWO_POINT = 2'd0,
    XO_UNIFORM   = 2'd1,
    XO_ADAPTIVE  = 2'd2
  } xo_mode_e;

  // User-programmable parameters (Table 1 of the specification).
  typedef struct packed {
    logic        pop128;      // population size: 0 = 64, 1 = 128
    xo_mode_e    xo_mode;     // crossover operator
    logic [1:0]  gen_sel;     // generations = 512 << gen_sel
    logic        alpha_half;  // elite decision factor: 0 = 0.25, 1 = 0.5
    logic [7:0]  p_cross;     // crossover rate, p_cross/256
    logic [7:0]  p_mut;       // mutation rate per bit, p_mut/4096
    logic [15:0] t_cross;     // elite threshold, 1.0 = 4096 (0.0 .. 4.0)
    logic [23:0] seed;        // random number generator seed
  } gaa_cfg_t;

  // One System Memory access request from a unit. Read data comes back on
  // the shared read bus in the next cycle.
  typedef struct packed {
    logic              re;
    logic              we;
    logic [ADDR_W-1:0] addr;
    logic [WORD_W-1:0] wdata;
  } sm_req_t;

  localparam sm_req_t SM_IDLE = '0;

  // Address of word `off` of slot `slot` in the population at `base`.
  function automatic logic [ADDR_W-1:0] slot_addr(logic [ADDR_W-1:0] base,
                                                  logic [SLOT_W-1:0] slot,
                                                  int unsigned off);
    return base + {5'd0, slot, 3'd0} + ADDR_W'(off);
  endfunction

  // Own elite counts of a slot. In copy form the slot's ancestors are its
  // parent's ancestors one generation further back, counted twice (the
  // parent stands for both ancestors of the previous generation).
  function automatic logic [13:0] own_counts(logic [15:0] fam, logic copy);
    logic [1:0] c1; logic [2:0] c2; logic [3:0] c3; logic [4:0] c4;
    if (copy) begin
      c1 = {fam[14], 1'b0};
      c2 = {fam[1:0], 1'b0};
      c3 = {fam[4:2], 1'b0};
      c4 = {fam[8:5], 1'b0};
      return {c4, c3, c2, c1};
    end
    return fam[13:0];
  endfunction

  // Elite counts of a child of two parents given as copy-form words.
  function automatic logic [13:0] child_counts(logic [15:0] pa, logic [15:0] pb);
    logic [1:0] c1; logic [2:0] c2; logic [3:0] c3; logic [4:0] c4;
    c1 = 2'(pa[14]) + 2'(pb[14]);
    c2 = 3'(pa[1:0]) + 3'(pb[1:0]);
    c3 = 4'(pa[4:2]) + 4'(pb[4:2]);
    c4 = 5'(pa[8:5]) + 5'(pb[8:5]);
    return {c4, c3, c2, c1};
  endfunction

endpackage
