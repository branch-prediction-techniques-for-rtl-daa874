// tb_branch_detector: drives random lines with random entry slots, numbers
// of accepted syllables, branch and stop bits, and checks the comb detect/inhibit flags and, one cycle
// later, the registered activation, branch PC, decoded target and keep
// count against a reference computed slot by slot in the testbench.
module tb_branch_detector;
  import lx_fe_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  line_valid, buf_empty, detect, inhibit, act_q;
  line_t line;
  pc_t   line_pc, br_pc_q, dec_target_q;
  len_t  keep_q, line_n;
  int    checks = 0, failures = 0;

  branch_detector dut (.*);

  always #5 clk = ~clk;

  // reference
  logic e_det, e_act;
  pc_t  e_pc, e_tgt;
  int   e_keep;

  task automatic ref_model();
    int first, last, start, stop;
    logic [31:0] disp;
    start = int'(line_pc[3:2]);
    stop  = start + int'(line_n);      // one past the last accepted slot
    first = -1;
    for (int i = start; i < stop; i++)
      if (first < 0 && line[i][30:28] == 3'b111) first = i;
    last = -1;
    if (first >= 0)
      for (int i = stop - 1; i >= first; i--) if (line[i][31]) last = i;
    e_det = line_valid && first >= 0 && last >= 0;
    e_act = e_det && !buf_empty;
    if (e_det) begin
      e_keep = last - start + 1;
      e_pc   = (line_pc & ~32'hF) + 32'(first * 4);
      disp   = {{9{line[first][22]}}, line[first][22:0]};
      e_tgt  = e_pc + disp * 4;
    end
  endtask

  function automatic syl_t rand_syl();
    syl_t s = $urandom;
    s[30:28] = (($urandom % 4) == 0) ? 3'b111 : 3'($urandom % 7);
    return s;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_act = 0;
  initial begin
    line_valid = 0; buf_empty = 0; line = '0; line_pc = '0; line_n = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      line_valid = ($urandom % 4) != 0;
      buf_empty  = ($urandom % 5) == 0;
      line_pc    = $urandom & ~32'h3;
      line_n     = len_t'(1 + $urandom % (4 - line_pc[3:2]));
      for (int i = 0; i < 4; i++) line[i] = rand_syl();
      #1;
      ref_model();
      checks++;
      if (detect !== e_det || inhibit !== (e_det && buf_empty)) begin
        failures++;
        $display("FAIL comb n=%0d det %b/%b inh %b", n, detect, e_det, inhibit);
      end
      @(posedge clk); #1;
      checks++;
      if (act_q !== e_act) begin
        failures++; $display("FAIL act n=%0d got %b exp %b", n, act_q, e_act);
      end
      if (e_act) begin
        n_act++;
        checks++;
        if (br_pc_q !== e_pc || dec_target_q !== e_tgt || int'(keep_q) != e_keep) begin
          failures++;
          $display("FAIL reg n=%0d pc %h/%h tgt %h/%h keep %0d/%0d",
                   n, br_pc_q, e_pc, dec_target_q, e_tgt, keep_q, e_keep);
        end
      end
    end
    checks++;
    if (n_act < 100) begin failures++; $display("FAIL too few activations %0d", n_act); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
