// instruction_buffer: variable-length decompression buffer of the fetch stage.
//
// A queue of syllables that holds DEPTH long instructions (DEPTH*ISSUE
// syllables). Lines from the instruction cache are written at the tail,
// starting at their entry slot; each cycle one complete bundle (one to
// ISSUE syllables, ended by a stop bit) is taken from the head, expanded to
// ISSUE issue slots with NOPs in the unused ones, and handed to decode.
// Elements therefore have variable size, like an instruction queue.
//
// Interface and timing:
//   wr_*     a line is accepted when wr_valid and wr_ready; wr_ready means
//            at least one syllable is free. wr_n_acc tells how many
//            syllables of the line, from its entry slot on, are taken: all
//            of them when the queue is empty, else as many as fit. The
//            fetch address then advances by that many syllables, so a
//            buffer of one long instruction can still assemble a bundle
//            that straddles two lines.
//   out_*    a bundle is offered when a complete bundle is present and is
//            taken when out_ready. When the queue is empty, the first bundle
//            of the incoming line bypasses the queue in the same cycle.
//   trunc_*  one cycle after a line was written, a taken prediction for the
//            branch in it cuts that line after trunc_keep syllables (counted
//            from its entry slot), removing the wrong-path syllables behind
//            the branch's bundle. No line may be written in that cycle.
//   flush    empties the queue (back-end redirect); it wins over all else.
// DEPTH must be a power of two. A run of ISSUE syllables without a stop bit
// is issued as one bundle of ISSUE syllables.
// The source design gives the function (variable-length buffer extracting
// the next bundle, depth 1 to 8 long instructions); the queue organisation,
// the bypass and the truncation are this design's choices.
module instruction_buffer
  import lx_fe_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  flush,
  // write side (fetch)
  input  logic  wr_valid,
  output logic  wr_ready,
  output len_t  wr_n_acc,       // syllables of the line taken when accepted
  input  line_t wr_line,
  input  pc_t   wr_pc,
  // truncation of the last written line
  input  logic  trunc_valid,
  input  len_t  trunc_keep,
  // read side (decode)
  output logic  out_valid,
  input  logic  out_ready,
  output line_t out_slots,
  output len_t  out_len,
  output pc_t   out_pc,
  // status
  output logic  empty,
  output logic  bypass          // bundle taken straight from the input line
);

  localparam int unsigned CAP   = DEPTH * ISSUE;
  localparam int unsigned PTR_W = (CAP > 1) ? $clog2(CAP) : 1;
  localparam int unsigned CNT_W = $clog2(CAP + 1);

  typedef logic [PTR_W-1:0] ptr_t;
  typedef logic [CNT_W-1:0] cnt_t;

  syl_t syl_q [CAP];
  pc_t  pc_q  [CAP];
  ptr_t head_q;
  cnt_t count_q;
  cnt_t last_wr_n_q;    // syllables stored by the last write
  len_t last_byp_q;     // syllables of that line sent by bypass

  // read view: up to ISSUE syllables from the head, or from the input line
  syl_t view     [ISSUE];
  pc_t  view_pc  [ISSUE];
  len_t avail, len, n_in, byp_n, rd_n, q_rd_n;
  cnt_t free_n;
  logic [SLOT_W-1:0] start;
  logic found;
  cnt_t wr_n, drop;

  assign empty    = (count_q == '0);
  assign free_n   = cnt_t'(CAP) - count_q;
  assign wr_ready = (free_n != '0);

  always_comb begin
    start = wr_pc[SLOT_W+1:2];
    n_in  = len_t'(ISSUE) - len_t'(start);
    if (empty || free_n >= cnt_t'(n_in)) wr_n_acc = n_in;
    else                                 wr_n_acc = len_t'(free_n);
    for (int k = 0; k < ISSUE; k++) begin
      if (empty) begin
        view[k]    = (k < ISSUE - int'(start)) ? wr_line[int'(start) + k] : NOP_SYL;
        view_pc[k] = {wr_pc[PC_W-1:2] + (PC_W-2)'(k), 2'b00};
      end else begin
        view[k]    = syl_q[ptr_t'(head_q + ptr_t'(k))];
        view_pc[k] = pc_q[ptr_t'(head_q + ptr_t'(k))];
      end
    end
    if (empty)                     avail = wr_valid ? n_in : '0;
    else if (count_q >= cnt_t'(ISSUE)) avail = len_t'(ISSUE);
    else                           avail = len_t'(count_q);

    // find the end of the head bundle
    found = 1'b0;
    len   = '0;
    for (int k = 0; k < ISSUE; k++)
      if (!found && len_t'(k) < avail && is_stop(view[k])) begin
        found = 1'b1;
        len   = len_t'(k + 1);
      end
    if (!found && avail == len_t'(ISSUE)) begin
      found = 1'b1;
      len   = len_t'(ISSUE);
    end

    out_valid = found && !flush;
    out_len   = len;
    out_pc    = view_pc[0];
    for (int k = 0; k < ISSUE; k++)
      out_slots[k] = (len_t'(k) < len) ? view[k] : NOP_SYL;

    rd_n   = (out_valid && out_ready) ? len : '0;
    bypass = empty && (rd_n != '0);
    byp_n  = bypass ? rd_n : '0;
    q_rd_n = rd_n - byp_n;           // syllables leaving the queue itself
    wr_n   = (wr_valid && wr_ready && !flush) ? cnt_t'(wr_n_acc) - cnt_t'(byp_n) : '0;

    // wrong-path syllables behind the predicted-taken bundle
    drop = '0;
    if (trunc_valid && (cnt_t'(trunc_keep) < cnt_t'(last_byp_q) + last_wr_n_q))
      drop = cnt_t'(last_byp_q) + last_wr_n_q - cnt_t'(trunc_keep);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q      <= '0;
      count_q     <= '0;
      last_wr_n_q <= '0;
      last_byp_q  <= '0;
    end else if (flush) begin
      count_q     <= '0;
      last_wr_n_q <= '0;
      last_byp_q  <= '0;
    end else begin
      head_q      <= ptr_t'(head_q + ptr_t'(q_rd_n));
      count_q     <= count_q - drop - cnt_t'(q_rd_n) + wr_n;
      last_wr_n_q <= wr_n;
      last_byp_q  <= byp_n;
    end
  end

  // storage: written at the tail, byp_n syllables of the line skipped
  always_ff @(posedge clk) begin
    if (!flush && wr_valid && wr_ready) begin
      for (int k = 0; k < ISSUE; k++) begin
        if (len_t'(k) < wr_n_acc - byp_n) begin
          syl_q[ptr_t'(head_q + ptr_t'(count_q) + ptr_t'(k))] <= wr_line[int'(start) + int'(byp_n) + k];
          pc_q [ptr_t'(head_q + ptr_t'(count_q) + ptr_t'(k))] <=
            {wr_pc[PC_W-1:2] + (PC_W-2)'(int'(byp_n) + k), 2'b00};
        end
      end
    end
  end

  // a truncation never overlaps a new line, and never reaches past the head
  assert property (@(posedge clk) disable iff (!rst_n)
                   trunc_valid && !flush |-> !(wr_valid && wr_ready))
    else $error("instruction_buffer: line written during truncation");
  assert property (@(posedge clk) disable iff (!rst_n)
                   !flush |-> (cnt_t'(q_rd_n) + drop <= count_q + wr_n))
    else $error("instruction_buffer: truncation past the head");

endmodule
