// bht_predictor: branch history table (branch prediction buffer).
//
// ENTRIES 2-bit saturating counters indexed by the low bits of the branch
// syllable address (PC[2 +: log2(ENTRIES)]). A lookup is combinational and
// only happens when req_valid is high (the branch detector's activation);
// the prediction is "taken" when the counter's upper bit is set. The back
// end trains the entry of a resolved branch one cycle after upd.valid.
// Counters reset to weakly not-taken (01).
// The table sizes 16..1024 entries come from the source design; the 2-bit
// counter, the index bits and the reset state are this design's choices.
module bht_predictor
  import lx_fe_pkg::*;
#(
  parameter int unsigned ENTRIES = 256
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         req_valid,
  input  pc_t          req_pc,
  output logic         pred_taken,
  input  pred_update_t upd
);

  localparam int unsigned IDX_W = $clog2(ENTRIES);
  typedef logic [IDX_W-1:0] idx_t;

  logic [1:0] ctr_q [ENTRIES];
  idx_t rd_idx, wr_idx;

  assign rd_idx     = req_pc[2 +: IDX_W];
  assign wr_idx     = upd.pc[2 +: IDX_W];
  assign pred_taken = req_valid && ctr_q[rd_idx][1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) ctr_q[i] <= 2'b01;
    end else if (upd.valid) begin
      ctr_q[wr_idx] <= sat2(ctr_q[wr_idx], upd.taken);
    end
  end

endmodule
