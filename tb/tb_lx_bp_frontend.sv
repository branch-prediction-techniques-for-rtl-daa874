// tb_lx_bp_frontend: end-to-end test of the front end. Four copies run a
// generated program each: BHT with a 1-deep buffer, GAs with 2, BTB1 with
// 4 and BTB2 with 8 (the buffer depths of the source evaluation), with
// instruction-cache misses and decode stalls. Every executed bundle is
// checked against the program, and each front-end mechanism must occur:
// predictor access, taken prediction with truncation, inhibited detection
// (empty buffer), bypass, full buffer, cache miss, decode stall and
// misprediction redirect. The test also requires that the predictor is
// accessed in fewer cycles than the run takes (the access filter) and that
// taken branches are at least sometimes followed by their target without
// a redirect.
module tb_lx_bp_frontend;
  import lx_fe_pkg::*;

  localparam int NRUN = 4;
  localparam int TARGET = 3000;    // executed bundles per copy

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pc_t          icache_addr [NRUN];
  logic         icache_req [NRUN], icache_valid [NRUN];
  line_t        icache_line [NRUN];
  logic         bundle_valid [NRUN], bundle_ready [NRUN];
  line_t        bundle_slots [NRUN];
  len_t         bundle_len [NRUN];
  pc_t          bundle_pc [NRUN];
  logic         redirect_valid [NRUN];
  pc_t          redirect_pc [NRUN];
  pred_update_t upd [NRUN];
  logic         s_acc [NRUN], s_tk [NRUN], s_det [NRUN], s_inh [NRUN], s_byp [NRUN];

  localparam pred_kind_e KINDS [NRUN] = '{PK_BHT, PK_GAS, PK_BTB1, PK_BTB2};
  localparam int         DEPTHS [NRUN] = '{1, 2, 4, 8};

  for (genvar r = 0; r < NRUN; r++) begin : g_run
    lx_bp_frontend #(.PRED_KIND(KINDS[r]), .BUF_DEPTH(DEPTHS[r])) dut (
      .clk, .rst_n,
      .icache_addr(icache_addr[r]), .icache_req(icache_req[r]),
      .icache_valid(icache_valid[r]), .icache_line(icache_line[r]),
      .bundle_valid(bundle_valid[r]), .bundle_ready(bundle_ready[r]),
      .bundle_slots(bundle_slots[r]), .bundle_len(bundle_len[r]), .bundle_pc(bundle_pc[r]),
      .redirect_valid(redirect_valid[r]), .redirect_pc(redirect_pc[r]), .upd(upd[r]),
      .stat_pred_access(s_acc[r]), .stat_pred_taken(s_tk[r]), .stat_bd_detect(s_det[r]),
      .stat_bd_inhibit(s_inh[r]), .stat_buf_bypass(s_byp[r]));
    fe_env #(.SEED(r + 3)) env (
      .clk, .rst_n,
      .icache_addr(icache_addr[r]), .icache_req(icache_req[r]),
      .icache_valid(icache_valid[r]), .icache_line(icache_line[r]),
      .bundle_valid(bundle_valid[r]), .bundle_ready(bundle_ready[r]),
      .bundle_slots(bundle_slots[r]), .bundle_len(bundle_len[r]), .bundle_pc(bundle_pc[r]),
      .redirect_valid(redirect_valid[r]), .redirect_pc(redirect_pc[r]), .upd(upd[r]),
      .stat_pred_access(s_acc[r]), .stat_pred_taken(s_tk[r]), .stat_bd_detect(s_det[r]),
      .stat_bd_inhibit(s_inh[r]), .stat_buf_bypass(s_byp[r]));
  end

  `define ENV(r) g_run[r].env
  int checks = 0, failures = 0;

  task automatic require(string what, int run, int n, int min);
    checks++;
    if (n < min) begin
      failures++;
      $display("FAIL run %0d: %s happened %0d times, need %0d", run, what, n, min);
    end
  endtask

  task automatic report(int r, int c, int f, int ex, int cy, int br, int tb, int acc, int ptk,
                        int det, int inh, int byp, int red, int mis, int ful, int stl, int hit);
    checks += c; failures += f;
    $display("run %0d: cycles %0d bundles %0d branches %0d (taken %0d) detect %0d access %0d inhibit %0d pred_taken %0d taken_hit %0d redirects %0d bypass %0d miss %0d full %0d stall %0d",
             r, cy, ex, br, tb, det, acc, inh, ptk, hit, red, byp, mis, ful, stl);
    require("executed bundle", r, ex, TARGET);
    require("predictor access", r, acc, 1);
    require("taken prediction", r, ptk, 1);
    require("inhibited detection", r, inh, 1);
    require("bypass to decode", r, byp, 1);
    require("misprediction redirect", r, red, 1);
    require("cache miss", r, mis, 1);
    require("buffer full", r, ful, 1);
    require("decode stall", r, stl, 1);
    require("taken branch followed by its target", r, hit, 1);
    checks++;
    if (acc >= cy || acc > det) begin
      failures++; $display("FAIL run %0d: access filter, %0d accesses in %0d cycles", r, acc, cy);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: executed bundles %0d %0d %0d %0d, redirects %0d %0d %0d %0d",
             `ENV(0).n_exec, `ENV(1).n_exec, `ENV(2).n_exec, `ENV(3).n_exec,
             `ENV(0).n_redirect, `ENV(1).n_redirect, `ENV(2).n_redirect, `ENV(3).n_redirect);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (`ENV(0).n_exec >= TARGET && `ENV(1).n_exec >= TARGET &&
          `ENV(2).n_exec >= TARGET && `ENV(3).n_exec >= TARGET);
    @(negedge clk);
    report(0, `ENV(0).checks, `ENV(0).failures, `ENV(0).n_exec, `ENV(0).n_cycles, `ENV(0).n_branches, `ENV(0).n_taken_br,
           `ENV(0).n_access, `ENV(0).n_pred_taken, `ENV(0).n_detect, `ENV(0).n_inhibit, `ENV(0).n_bypass,
           `ENV(0).n_redirect, `ENV(0).n_miss, `ENV(0).n_full, `ENV(0).n_stall, `ENV(0).n_taken_hit);
    report(1, `ENV(1).checks, `ENV(1).failures, `ENV(1).n_exec, `ENV(1).n_cycles, `ENV(1).n_branches, `ENV(1).n_taken_br,
           `ENV(1).n_access, `ENV(1).n_pred_taken, `ENV(1).n_detect, `ENV(1).n_inhibit, `ENV(1).n_bypass,
           `ENV(1).n_redirect, `ENV(1).n_miss, `ENV(1).n_full, `ENV(1).n_stall, `ENV(1).n_taken_hit);
    report(2, `ENV(2).checks, `ENV(2).failures, `ENV(2).n_exec, `ENV(2).n_cycles, `ENV(2).n_branches, `ENV(2).n_taken_br,
           `ENV(2).n_access, `ENV(2).n_pred_taken, `ENV(2).n_detect, `ENV(2).n_inhibit, `ENV(2).n_bypass,
           `ENV(2).n_redirect, `ENV(2).n_miss, `ENV(2).n_full, `ENV(2).n_stall, `ENV(2).n_taken_hit);
    report(3, `ENV(3).checks, `ENV(3).failures, `ENV(3).n_exec, `ENV(3).n_cycles, `ENV(3).n_branches, `ENV(3).n_taken_br,
           `ENV(3).n_access, `ENV(3).n_pred_taken, `ENV(3).n_detect, `ENV(3).n_inhibit, `ENV(3).n_bypass,
           `ENV(3).n_redirect, `ENV(3).n_miss, `ENV(3).n_full, `ENV(3).n_stall, `ENV(3).n_taken_hit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
