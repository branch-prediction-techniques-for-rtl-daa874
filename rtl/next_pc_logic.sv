// next_pc_logic: chooses the next fetch address of the front end.
//
// Priority, highest first:
//   1. redirect from the back end (branch misprediction or exception),
//   2. taken prediction from the branch predictor (target of the branch
//      detected in the line fetched one cycle earlier),
//   3. sequential advance by the number of syllables the instruction buffer
//      took from the current line (the rest of the line, or fewer when the
//      buffer is nearly full),
//   4. otherwise hold (instruction-cache miss or full buffer).
// Purely combinational; its output feeds the program counter register.
// The source design only shows this block as a mux between its inputs; the
// priority order and the syllable-granular sequential step are this
// design's choice.
module next_pc_logic
  import lx_fe_pkg::*;
(
  input  pc_t  pc_q,            // current fetch address
  input  logic redirect_valid,  // back-end redirect
  input  pc_t  redirect_pc,
  input  logic pred_taken,      // predictor says taken
  input  pc_t  pred_target,
  input  len_t accept_n,        // syllables of the line at pc_q written into the buffer
  output pc_t  pc_d
);

  always_comb begin
    if (redirect_valid)   pc_d = redirect_pc;
    else if (pred_taken)  pc_d = pred_target;
    else if (accept_n != '0) pc_d = pc_q + (pc_t'(accept_n) << 2);
    else                  pc_d = pc_q;
  end

endmodule
