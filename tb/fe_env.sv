// fe_env: test environment for the fetch front end: an instruction memory
// with a generated program and a behavioural back end.
//
// Program: MEM_SYL syllables, generated from SEED at time 0 as a sequence
// of bundles of 1..4 syllables (stop bit on the last). About one bundle in
// four ends with a branch syllable whose target is the start of a random
// bundle. Each branch has a fixed behaviour chosen from its address:
// always taken, never taken, loop-like (taken 3 times out of 4),
// alternating, or pseudo-random. Memory addresses wrap modulo MEM_SYL.
//
// Instruction cache: answers in the same cycle with the aligned line of the
// fetch address; MISS_PCT percent of cycles are misses (icache_valid low).
//
// Back end: accepts bundles, with STALL_PCT percent of cycles not ready.
// It keeps the architectural next address. A bundle at that address is
// executed: its length and slots are checked against the program (NOP
// fill included), its branch is resolved and reported on upd one cycle
// later. A bundle at any other address is on a wrong path; the back end
// then asserts redirect for one cycle with the correct address and ignores
// bundles until the correct one arrives.
//
// It also checks that every predictor access comes exactly one cycle after
// the detector saw a branch with a non-empty buffer, and it counts each
// front-end event so that the caller can require all of them to occur.
module fe_env
  import lx_fe_pkg::*;
#(
  parameter int unsigned MEM_SYL   = 1024,
  parameter int unsigned SEED      = 1,
  parameter int unsigned MISS_PCT  = 10,
  parameter int unsigned STALL_PCT = 15
) (
  input  logic         clk,
  input  logic         rst_n,
  input  pc_t          icache_addr,
  input  logic         icache_req,
  output logic         icache_valid,
  output line_t        icache_line,
  input  logic         bundle_valid,
  output logic         bundle_ready,
  input  line_t        bundle_slots,
  input  len_t         bundle_len,
  input  pc_t          bundle_pc,
  output logic         redirect_valid,
  output pc_t          redirect_pc,
  output pred_update_t upd,
  input  logic         stat_pred_access,
  input  logic         stat_pred_taken,
  input  logic         stat_bd_detect,
  input  logic         stat_bd_inhibit,
  input  logic         stat_buf_bypass
);

  syl_t mem [MEM_SYL];
  int   exec_cnt [MEM_SYL];

  int checks = 0, failures = 0;
  int n_exec = 0, n_cycles = 0, n_branches = 0, n_taken_br = 0;
  int n_access = 0, n_pred_taken = 0, n_detect = 0, n_inhibit = 0, n_bypass = 0;
  int n_redirect = 0, n_miss = 0, n_full = 0, n_stall = 0, n_wrong = 0;
  int n_taken_hit = 0;     // taken branch followed directly by its target

  pc_t  exp_pc;
  logic wait_fix;
  logic prev_detect_act;
  logic prev_was_taken_branch;

  function automatic syl_t mem_at(pc_t a);
    return mem[(a >> 2) % MEM_SYL];
  endfunction

  // branch behaviour: kind from the address, state from the execution count
  function automatic logic outcome(pc_t a, int cnt);
    int unsigned h;
    h = ((a >> 2) % MEM_SYL) * 2654435761;
    case ((h >> 8) % 5)
      0: return 1'b1;
      1: return 1'b0;
      2: return (cnt % 4) != 3;
      3: return cnt[0];
      default: return ((h ^ (cnt * 40503)) >> 5) % 3 != 0;
    endcase
  endfunction

  // program generation
  initial begin
    int unsigned st;
    int i, len, nb;
    int starts [$];
    int brs [$];
    st = SEED * 7919 + 17;
    i = 0;
    while (i < int'(MEM_SYL)) begin
      starts.push_back(i);
      st = st * 1103515245 + 12345;
      len = 1 + int'((st >> 16) % 4);
      if (i + len > int'(MEM_SYL)) len = int'(MEM_SYL) - i;
      for (int k = 0; k < len; k++) begin
        st = st * 1103515245 + 12345;
        mem[i + k] = {1'b0, 3'(((st >> 12) % 7)), 28'(st ^ (st >> 7))};
      end
      mem[i + len - 1][STOP_BIT] = 1'b1;
      st = st * 1103515245 + 12345;
      if (((st >> 16) % 4) == 0) brs.push_back(i + len - 1);
      i += len;
    end
    nb = starts.size();
    foreach (brs[b]) begin
      int tgt, disp;
      st = st * 1103515245 + 12345;
      tgt = starts[(st >> 10) % nb];
      disp = tgt - brs[b];
      mem[brs[b]][30:28] = BR_CLASS;
      mem[brs[b]][BR_DISP_W-1:0] = BR_DISP_W'(disp);
    end
    for (int k = 0; k < int'(MEM_SYL); k++) exec_cnt[k] = 0;
  end

  // instruction cache
  logic miss;
  always_ff @(posedge clk) miss <= ($urandom % 100) < MISS_PCT;
  assign icache_valid = !miss;
  always_comb
    for (int k = 0; k < ISSUE; k++)
      icache_line[k] = mem_at({icache_addr[PC_W-1:4], 4'b0} + pc_t'(4 * k));

  logic stall;
  always_ff @(posedge clk) stall <= ($urandom % 100) < STALL_PCT;
  assign bundle_ready = !stall;

  // back end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      exp_pc         <= '0;
      wait_fix       <= 1'b0;
      redirect_valid <= 1'b0;
      redirect_pc    <= '0;
      upd            <= '0;
      prev_detect_act <= 1'b0;
      prev_was_taken_branch <= 1'b0;
    end else begin
      n_cycles++;
      redirect_valid <= 1'b0;
      upd            <= '0;
      // predictor access latency: one cycle after an uninhibited detection
      prev_detect_act <= stat_bd_detect && !stat_bd_inhibit;
      checks++;
      if (stat_pred_access !== prev_detect_act) begin
        failures++;
        $display("FAIL predictor access %b, detector one cycle earlier %b", stat_pred_access, prev_detect_act);
      end
      if (stat_pred_access) n_access++;
      if (stat_pred_taken)  n_pred_taken++;
      if (stat_bd_detect)   n_detect++;
      if (stat_bd_inhibit)  n_inhibit++;
      if (stat_buf_bypass)  n_bypass++;
      if (!icache_valid && icache_req) n_miss++;
      if (!icache_req) n_full++;
      if (bundle_valid && !bundle_ready) n_stall++;
      if (redirect_valid) n_redirect++;

      if (bundle_valid && bundle_ready && !redirect_valid) begin
        if (bundle_pc == exp_pc) begin
          int   len, br, idx;
          pc_t  nxt, bpc;
          logic tk;
          len = 0; br = -1;
          for (int k = 0; k < ISSUE && len == 0; k++) begin
            if (is_branch(mem_at(exp_pc + pc_t'(4 * k)))) br = k;
            if (is_stop(mem_at(exp_pc + pc_t'(4 * k)))) len = k + 1;
          end
          if (len == 0) len = ISSUE;
          checks++;
          if (int'(bundle_len) != len) begin
            failures++; $display("FAIL bundle at %h length %0d exp %0d", exp_pc, bundle_len, len);
          end
          for (int k = 0; k < ISSUE; k++) begin
            checks++;
            if (bundle_slots[k] !== ((k < len) ? mem_at(exp_pc + pc_t'(4 * k)) : NOP_SYL)) begin
              failures++; $display("FAIL bundle at %h slot %0d = %h", exp_pc, k, bundle_slots[k]);
            end
          end
          if (prev_was_taken_branch) n_taken_hit++;
          prev_was_taken_branch <= 1'b0;
          nxt = exp_pc + pc_t'(4 * len);
          if (br >= 0) begin
            bpc = exp_pc + pc_t'(4 * br);
            idx = int'((bpc >> 2) % MEM_SYL);
            tk = outcome(bpc, exec_cnt[idx]);
            exec_cnt[idx] = exec_cnt[idx] + 1;
            n_branches++;
            upd.valid  <= 1'b1;
            upd.pc     <= bpc;
            upd.taken  <= tk;
            upd.target <= branch_target(bpc, mem_at(bpc));
            if (tk) begin
              nxt = branch_target(bpc, mem_at(bpc));
              n_taken_br++;
              prev_was_taken_branch <= 1'b1;
            end
          end
          exp_pc   <= nxt;
          wait_fix <= 1'b0;
          n_exec++;
        end else begin
          n_wrong++;
          prev_was_taken_branch <= 1'b0;
          if (!wait_fix) begin
            redirect_valid <= 1'b1;
            redirect_pc    <= exp_pc;
            wait_fix       <= 1'b1;
          end
        end
      end
    end
  end

endmodule
