// tb_lx_bp_frontend_full: the front end with every parameter at its default
// (256-entry GAs predictor, 4-deep buffer) runs a generated program of 4096
// syllables until 20000 bundles have executed. Every executed bundle is
// checked against the program, every predictor access against the
// detector, and each front-end event must occur at least once.
module tb_lx_bp_frontend_full;
  import lx_fe_pkg::*;

  localparam int TARGET = 20000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pc_t          icache_addr, bundle_pc, redirect_pc;
  logic         icache_req, icache_valid, bundle_valid, bundle_ready, redirect_valid;
  line_t        icache_line, bundle_slots;
  len_t         bundle_len;
  pred_update_t upd;
  logic         stat_pred_access, stat_pred_taken, stat_bd_detect, stat_bd_inhibit, stat_buf_bypass;

  lx_bp_frontend dut (.*);
  fe_env #(.MEM_SYL(4096), .SEED(11)) env (.*);

  int checks = 0, failures = 0;

  task automatic require(string what, int n);
    checks++;
    if (n < 1) begin failures++; $display("FAIL %s never happened", what); end
  endtask

  initial begin
    repeat (TARGET * 10) @(posedge clk);
    failures++;
    $display("watchdog: executed bundles %0d", env.n_exec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (env.n_exec >= TARGET);
    @(negedge clk);
    checks   += env.checks;
    failures += env.failures;
    $display("cycles %0d bundles %0d branches %0d (taken %0d) detect %0d access %0d inhibit %0d pred_taken %0d taken_hit %0d redirects %0d bypass %0d miss %0d full %0d stall %0d",
             env.n_cycles, env.n_exec, env.n_branches, env.n_taken_br, env.n_detect, env.n_access,
             env.n_inhibit, env.n_pred_taken, env.n_taken_hit, env.n_redirect, env.n_bypass,
             env.n_miss, env.n_full, env.n_stall);
    require("predictor access", env.n_access);
    require("taken prediction", env.n_pred_taken);
    require("inhibited detection", env.n_inhibit);
    require("bypass to decode", env.n_bypass);
    require("misprediction redirect", env.n_redirect);
    require("cache miss", env.n_miss);
    require("buffer full", env.n_full);
    require("decode stall", env.n_stall);
    require("taken branch followed by its target", env.n_taken_hit);
    checks++;
    if (env.n_access >= env.n_cycles) begin failures++; $display("FAIL access filter"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
