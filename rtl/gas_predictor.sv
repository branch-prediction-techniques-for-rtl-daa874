// gas_predictor: GAs (global history, per-set pattern tables) predictor.
//
// A global branch history register of HIST_W bits is concatenated with the
// low ENTRY bits of the branch address to index a pattern history table of
// ENTRIES 2-bit saturating counters:
//     index = { PC[2 +: log2(ENTRIES)-HIST_W], GHR }
// A lookup is combinational and only happens when req_valid is high. On a
// resolved branch (upd.valid) the counter selected by the branch address and
// the current history is trained and the outcome is shifted into the
// history, both at the next clock edge. The history is therefore updated at
// resolution, not speculatively at prediction time.
// The source design gives the concatenation of address and history and the
// table sizes 16..1024; the split HIST_W, the 2-bit counters, the
// non-speculative history update and the reset state are this design's.
module gas_predictor
  import lx_fe_pkg::*;
#(
  parameter int unsigned ENTRIES = 256,
  parameter int unsigned HIST_W  = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         req_valid,
  input  pc_t          req_pc,
  output logic         pred_taken,
  input  pred_update_t upd,
  output logic [HIST_W-1:0] ghr       // current global history (status)
);

  localparam int unsigned IDX_W  = $clog2(ENTRIES);
  localparam int unsigned ADDR_W = IDX_W - HIST_W;
  typedef logic [IDX_W-1:0] idx_t;

  logic [1:0] ctr_q [ENTRIES];
  logic [HIST_W-1:0] ghr_q;
  idx_t rd_idx, wr_idx;

  assign rd_idx     = {req_pc[2 +: ADDR_W], ghr_q};
  assign wr_idx     = {upd.pc[2 +: ADDR_W], ghr_q};
  assign pred_taken = req_valid && ctr_q[rd_idx][1];
  assign ghr        = ghr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) ctr_q[i] <= 2'b01;
      ghr_q <= '0;
    end else if (upd.valid) begin
      ctr_q[wr_idx] <= sat2(ctr_q[wr_idx], upd.taken);
      ghr_q         <= {ghr_q[HIST_W-2:0], upd.taken};
    end
  end

  initial assert (HIST_W >= 2 && HIST_W < IDX_W)
    else $fatal(1, "gas_predictor: HIST_W must be in 2..log2(ENTRIES)-1");

endmodule
