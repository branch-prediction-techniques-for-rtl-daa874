// branch_detector: filters accesses to the branch predictor.
//
// While a fetched line is written into the instruction buffer, the detector
// pre-decodes its syllables. Each syllable the buffer takes (line_n
// syllables from the entry slot PC[3:2] of the fetch address) is checked
// for the branch class: one
// compare per syllable, then an OR across the line, i.e. two logic levels
// in the fetch stage. Only when a branch is found is the predictor activated;
// in every other cycle the predictor stays idle, which is the energy saving
// this front end is built around.
//
// When the buffer is empty the first bundle of the line goes straight to
// decode and the detector may not activate the predictor for that line
// ("inhibit"); such a branch is simply fetched sequentially.
//
// Outputs are registered (the activation/branch-PC register between the
// detector and the predictor), so the predictor is looked up one cycle after
// the line was fetched. Besides the activation and the branch PC the
// register holds:
//   dec_target  taken target decoded from the branch displacement, used by
//               the direction-only predictors (BHT, GAs),
//   keep        number of syllables of the line, counted from the entry
//               slot, up to and including the end of the branch's bundle;
//               the buffer drops the rest if the branch is predicted taken.
// Only the first branch of a line is predicted; a later branch in the same
// line is fetched as not taken. A branch counts as detected only when the
// stop bit ending its bundle is among the syllables taken, so that a taken
// prediction never cuts its own bundle. The pre-decode of the target and of the
// bundle end, and the single branch per line, are this design's choices.
module branch_detector
  import lx_fe_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  line_valid,   // line is being written into the buffer
  input  line_t line,
  input  pc_t   line_pc,      // fetch address (entry slot in [3:2])
  input  len_t  line_n,       // syllables of the line taken by the buffer
  input  logic  buf_empty,    // buffer empty: line bypasses to decode
  // combinational status for this cycle
  output logic  detect,       // a branch is present in the accepted line
  output logic  inhibit,      // detected, but buffer empty: no activation
  // registered activation towards the predictor
  output logic  act_q,
  output pc_t   br_pc_q,
  output pc_t   dec_target_q,
  output len_t  keep_q
);

  logic [ISSUE-1:0] br_hit;
  logic [SLOT_W-1:0] start, first, last;
  pc_t  br_pc;
  len_t keep;
  logic found_end;

  always_comb begin
    start = line_pc[SLOT_W+1:2];
    for (int i = 0; i < ISSUE; i++)
      br_hit[i] = (SLOT_W'(i) >= start) && (len_t'(i) < len_t'(start) + line_n)
                  && is_branch(line[i]);

    // position of the first branch
    first = '0;
    for (int i = ISSUE-1; i >= 0; i--)
      if (br_hit[i]) first = SLOT_W'(i);

    // end of the bundle holding the first branch
    last = SLOT_W'(ISSUE-1);
    found_end = 1'b0;
    for (int i = 0; i < ISSUE; i++)
      if (!found_end && SLOT_W'(i) >= first && (len_t'(i) < len_t'(start) + line_n)
          && is_stop(line[i])) begin
        last      = SLOT_W'(i);
        found_end = 1'b1;
      end
    keep = len_t'(last) - len_t'(start) + len_t'(1);
    detect = line_valid && (br_hit != '0) && found_end;

    br_pc   = {line_pc[PC_W-1:SLOT_W+2], first, 2'b00};
    inhibit = detect && buf_empty;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act_q        <= 1'b0;
      br_pc_q      <= '0;
      dec_target_q <= '0;
      keep_q       <= '0;
    end else begin
      act_q <= detect && !buf_empty;
      if (detect) begin
        br_pc_q      <= br_pc;
        dec_target_q <= branch_target(br_pc, line[first]);
        keep_q       <= keep;
      end
    end
  end

endmodule
