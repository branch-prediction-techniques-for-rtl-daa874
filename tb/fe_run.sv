// fe_run: one front-end configuration with its test environment, for the
// design-space sweep. Runs until TARGET bundles have executed, then raises
// done and holds the cycle count, predictor accesses, detections, inhibited
// detections, taken predictions and redirects seen up to that point, plus
// the environment's check and failure counts.
module fe_run
  import lx_fe_pkg::*;
#(
  parameter pred_kind_e  KIND      = PK_GAS,
  parameter int unsigned ENTRIES   = 256,
  parameter int unsigned HIST_W    = 4,
  parameter int unsigned WAYS      = 4,
  parameter int unsigned ADDR_BITS = 28,
  parameter int unsigned DEPTH     = 4,
  parameter int unsigned SEED      = 5,
  parameter int unsigned TARGET    = 4000
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   cycles,
  output int   accesses,
  output int   detects,
  output int   inhibits,
  output int   taken_preds,
  output int   redirects,
  output int   checks,
  output int   failures
);

  pc_t          icache_addr, bundle_pc, redirect_pc;
  logic         icache_req, icache_valid, bundle_valid, bundle_ready, redirect_valid;
  line_t        icache_line, bundle_slots;
  len_t         bundle_len;
  pred_update_t upd;
  logic         stat_pred_access, stat_pred_taken, stat_bd_detect, stat_bd_inhibit, stat_buf_bypass;

  lx_bp_frontend #(.PRED_KIND(KIND), .PRED_ENTRIES(ENTRIES), .GAS_HIST_W(HIST_W),
                   .BTB_WAYS(WAYS), .BTB_ADDR_BITS(ADDR_BITS), .BUF_DEPTH(DEPTH)) dut (.*);
  fe_env #(.MEM_SYL(2048), .SEED(SEED)) env (.*);

  always_ff @(posedge clk) begin
    if (!rst_n) done <= 1'b0;
    else if (!done && env.n_exec >= TARGET) begin
      done        <= 1'b1;
      cycles      <= env.n_cycles;
      accesses    <= env.n_access;
      detects     <= env.n_detect;
      inhibits    <= env.n_inhibit;
      taken_preds <= env.n_pred_taken;
      redirects   <= env.n_redirect;
    end
  end
  assign checks   = env.checks;
  assign failures = env.failures;

endmodule
