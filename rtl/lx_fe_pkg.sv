// lx_fe_pkg: types and constants shared by the low-power VLIW fetch front end.
//
// The front end fetches 128-bit lines of four 32-bit syllables (operations)
// for a 4-issue VLIW core. A bundle (long instruction) is one to four
// consecutive syllables; the last syllable of a bundle has its stop bit set.
// Syllables are 4-byte aligned, so a program counter addresses a syllable
// and PC[3:2] is the syllable's slot within its fetch line.
//
// Encoding used by this design (the source design only says that the
// branch detector depends on the branch encoding, so the fields below are
// this design's own choice):
//   bit 31      stop bit, 1 = last syllable of its bundle
//   bits 30:28  operation class, 3'b111 = branch
//   bits 22:0   branch displacement in syllables, signed, relative to the
//               branch syllable's own address
// A NOP syllable is all zero; the decompressor fills unused issue slots
// with it.
package lx_fe_pkg;

  localparam int unsigned PC_W    = 32;
  localparam int unsigned SYL_W   = 32;
  localparam int unsigned ISSUE   = 4;     // issue width and syllables per fetch line
  localparam int unsigned SLOT_W  = 2;     // log2(ISSUE)
  localparam int unsigned LEN_W   = 3;     // holds 0..ISSUE

  localparam int unsigned STOP_BIT  = 31;
  localparam logic [2:0]  BR_CLASS  = 3'b111;
  localparam int unsigned BR_DISP_W = 23;

  typedef logic [SYL_W-1:0]        syl_t;
  typedef logic [PC_W-1:0]         pc_t;
  typedef syl_t [ISSUE-1:0]        line_t;   // element i is slot i of a line
  typedef logic [LEN_W-1:0]        len_t;

  localparam syl_t NOP_SYL = '0;

  // Predictor organisations evaluated for the configurable predictor.
  typedef enum logic [1:0] {
    PK_BHT  = 2'd0,   // branch history table of 2-bit counters
    PK_GAS  = 2'd1,   // global history concatenated with PC bits
    PK_BTB1 = 2'd2,   // branch target buffer, 1-bit history per entry
    PK_BTB2 = 2'd3    // branch target buffer, 2-bit counter per entry
  } pred_kind_e;

  // Branch resolution reported by the back end, used to train the predictor.
  typedef struct packed {
    logic valid;
    pc_t  pc;       // address of the branch syllable
    logic taken;    // actual outcome
    pc_t  target;   // actual taken target
  } pred_update_t;

  function automatic logic is_branch(syl_t s);
    return s[30:28] == BR_CLASS;
  endfunction

  function automatic logic is_stop(syl_t s);
    return s[STOP_BIT];
  endfunction

  // Taken target of a branch syllable located at address pc.
  function automatic pc_t branch_target(pc_t pc, syl_t s);
    return pc + {{(PC_W-BR_DISP_W-2){s[BR_DISP_W-1]}}, s[BR_DISP_W-1:0], 2'b00};
  endfunction

  // 2-bit saturating counter step.
  function automatic logic [1:0] sat2(logic [1:0] c, logic up);
    if (up)  return (c == 2'b11) ? c : c + 2'b01;
    else     return (c == 2'b00) ? c : c - 2'b01;
  endfunction

endpackage
