// tb_instruction_buffer: streams random lines (random entry slots, stop
// bits and branch-free syllables) into a 2-deep buffer while decode accepts
// at random, and compares every offered bundle, its length, PC, NOP fill,
// the bypass flag, wr_ready and the number of syllables taken from each
// line (partial lines when nearly full) with a reference syllable queue. Random
// truncations (cut after a bundle end of the last written line) and
// flushes are applied as the front end would apply them.
module tb_instruction_buffer;
  import lx_fe_pkg::*;

  localparam int DEPTH = 2, CAP = DEPTH * 4;
  logic  clk = 0, rst_n = 0;
  logic  flush, wr_valid, wr_ready, trunc_valid, out_valid, out_ready, empty, bypass;
  line_t wr_line, out_slots;
  pc_t   wr_pc, out_pc;
  len_t  trunc_keep, out_len, wr_n_acc;
  int    checks = 0, failures = 0;

  instruction_buffer #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  syl_t q_syl[$];
  pc_t  q_pc[$];
  int   run = 0;           // syllables at the queue tail since the last stop bit
  int   last_total = 0;    // syllables of the line written in the previous cycle
  logic last_wr = 0;
  int   n_part = 0, n_bundles = 0, n_bypass = 0, n_trunc = 0, n_full = 0, n_flush = 0;
  pc_t  fetch_pc;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    syl_t v_syl[$];
    pc_t  v_pc[$];
    int   start, avail, len, keep, drop, nacc;
    logic e_valid, wrote, s_acc, s_fire, s_byp;
    flush = 0; wr_valid = 0; trunc_valid = 0; out_ready = 0;
    wr_line = '0; wr_pc = '0; trunc_keep = '0;
    fetch_pc = 32'h0000_1000;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      // drive
      flush       = ($urandom % 200) == 0;
      trunc_valid = 0;
      wr_valid    = 0;
      if (last_wr && ($urandom % 4) == 0) begin
        trunc_valid = 1;
        keep = int'(trunc_keep);        // chosen below, from the last line
      end else begin
        wr_valid = ($urandom % 3) != 0;
      end
      if (($urandom % 8) == 0) fetch_pc = (fetch_pc & ~32'hF) + 4 * ($urandom % 4);
      wr_pc = fetch_pc;
      start = int'(wr_pc[3:2]);
      for (int i = 0; i < 4; i++) begin
        wr_line[i] = $urandom & 32'h8FFF_FFFF;    // class bits 30:28 cleared
        wr_line[i][31] = ($urandom % 2);
      end
      out_ready = ($urandom % 4) != 0;
      #1;
      // expected read view
      v_syl = q_syl; v_pc = q_pc;
      if (q_syl.size() == 0 && wr_valid) begin
        // keep runs of non-stop syllables under 4 in the incoming line
        for (int i = start, r = run; i < 4; i++) begin
          r = wr_line[i][31] ? 0 : r + 1;
          if (r == 4) begin wr_line[i][31] = 1; r = 0; end
        end
        #1;
        for (int i = start; i < 4; i++) begin
          v_syl.push_back(wr_line[i]);
          v_pc.push_back((wr_pc & ~32'hF) + 32'(4 * i));
        end
      end else if (wr_valid) begin
        for (int i = start, r = run; i < 4; i++) begin
          r = wr_line[i][31] ? 0 : r + 1;
          if (r == 4) begin wr_line[i][31] = 1; r = 0; end
        end
        #1;
      end
      nacc = (q_syl.size() == 0 || CAP - q_syl.size() >= 4 - start) ? 4 - start : CAP - q_syl.size();
      avail = (v_syl.size() > 4) ? 4 : v_syl.size();
      len = 0;
      for (int k = 0; k < avail; k++) if (len == 0 && v_syl[k][31]) len = k + 1;
      if (len == 0 && avail == 4) len = 4;
      e_valid = (len != 0) && !flush;
      checks++;
      if (wr_ready !== (q_syl.size() < CAP) || out_valid !== e_valid || int'(wr_n_acc) != nacc) begin
        failures++;
        $display("FAIL n=%0d wr_ready %b valid %b/%b qsize %0d", n, wr_ready, out_valid, e_valid, q_syl.size());
      end
      if (!wr_ready && wr_valid) n_full++;
      if (wr_ready && wr_valid && nacc < 4 - start) n_part++;
      if (e_valid && out_valid) begin
        checks++;
        if (int'(out_len) != len || out_pc !== v_pc[0]) begin
          failures++; $display("FAIL n=%0d len %0d/%0d pc %h/%h", n, out_len, len, out_pc, v_pc[0]);
        end
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (out_slots[k] !== ((k < len) ? v_syl[k] : NOP_SYL)) begin
            failures++; $display("FAIL n=%0d slot %0d %h exp %h", n, k, out_slots[k], (k < len) ? v_syl[k] : NOP_SYL);
          end
        end
        checks++;
        if (bypass !== (q_syl.size() == 0 && out_ready)) begin
          failures++; $display("FAIL n=%0d bypass %b", n, bypass);
        end
      end
      s_acc  = wr_valid && wr_ready;
      s_fire = out_valid && out_ready;
      s_byp  = bypass;
      @(posedge clk);
      // reference update
      wrote = 0;
      if (flush) begin
        q_syl.delete(); q_pc.delete(); run = 0; n_flush++;
      end else begin
        if (s_acc) begin
          if (q_syl.size() != 0) begin
            for (int i = start; i < start + nacc; i++) begin
              q_syl.push_back(wr_line[i]);
              q_pc.push_back((wr_pc & ~32'hF) + 32'(4 * i));
            end
          end else begin
            q_syl = v_syl; q_pc = v_pc;
          end
          for (int i = start; i < start + nacc; i++) run = wr_line[i][31] ? 0 : run + 1;
          wrote = !s_byp;      // the detector never activates on a bypassed line
          last_total = nacc;
          // pick the cut for a possible truncation next cycle: after a stop bit
          keep = last_total;
          for (int i = start + nacc - 1; i >= start; i--) if (wr_line[i][31] && ($urandom % 2)) keep = i - start + 1;
        end
        if (trunc_valid) begin
          drop = last_total - int'(trunc_keep);
          for (int d = 0; d < drop; d++) begin void'(q_syl.pop_back()); void'(q_pc.pop_back()); end
          if (drop > 0) begin run = 0; n_trunc++; end
        end
        if (s_fire) begin
          for (int k = 0; k < len; k++) begin void'(q_syl.pop_front()); void'(q_pc.pop_front()); end
          n_bundles++;
          if (s_byp) n_bypass++;
        end
        if (s_acc) fetch_pc = fetch_pc + 4 * nacc;
      end
      last_wr = wrote;
      if (wrote) trunc_keep = len_t'(keep);
    end
    checks++;
    if (n_bundles < 1000 || n_bypass < 20 || n_trunc < 20 || n_full < 20 || n_flush < 5 || n_part < 20) begin
      failures++;
      $display("FAIL coverage bundles %0d bypass %0d trunc %0d full %0d flush %0d partial %0d",
               n_bundles, n_bypass, n_trunc, n_full, n_flush, n_part);
    end
    $display("coverage: bundles %0d bypass %0d trunc %0d full %0d flush %0d",
             n_bundles, n_bypass, n_trunc, n_full, n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
