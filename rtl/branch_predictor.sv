// branch_predictor: the configurable branch predictor structure.
//
// Wraps one of four organisations, chosen at elaboration by KIND:
//   PK_BHT   bht_predictor, ENTRIES counters indexed by PC,
//   PK_GAS   gas_predictor, ENTRIES counters indexed by {PC bits, history},
//   PK_BTB1  btb_predictor with 1-bit last-outcome state,
//   PK_BTB2  btb_predictor with 2-bit saturating counters.
// A request comes from the branch detector's register (req_valid high only
// when a branch was detected), so the structure is idle in all other
// cycles. The direction-only predictors (BHT, GAs) take the taken target
// pre-decoded from the branch syllable (req_dec_target); the BTBs supply
// their stored target. The response is combinational in the request cycle.
// The four organisations and the 256-entry size come from the source
// design, which names GAs as its best organisation; it is the default here.
module branch_predictor
  import lx_fe_pkg::*;
#(
  parameter pred_kind_e  KIND          = PK_GAS,
  parameter int unsigned ENTRIES       = 256,
  parameter int unsigned GAS_HIST_W    = 4,
  parameter int unsigned BTB_WAYS      = 4,
  parameter int unsigned BTB_ADDR_BITS = 28
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         req_valid,
  input  pc_t          req_pc,
  input  pc_t          req_dec_target,
  output logic         pred_taken,
  output pc_t          pred_target,
  input  pred_update_t upd
);

  if (KIND == PK_BHT) begin : g_bht
    bht_predictor #(.ENTRIES(ENTRIES)) u_bht (
      .clk, .rst_n, .req_valid, .req_pc, .pred_taken, .upd);
    assign pred_target = req_dec_target;
  end else if (KIND == PK_GAS) begin : g_gas
    logic [GAS_HIST_W-1:0] ghr;
    gas_predictor #(.ENTRIES(ENTRIES), .HIST_W(GAS_HIST_W)) u_gas (
      .clk, .rst_n, .req_valid, .req_pc, .pred_taken, .upd, .ghr);
    assign pred_target = req_dec_target;
  end else begin : g_btb
    logic hit;
    btb_predictor #(.ENTRIES(ENTRIES), .WAYS(BTB_WAYS), .ADDR_BITS(BTB_ADDR_BITS),
                    .CNT_W((KIND == PK_BTB1) ? 1 : 2)) u_btb (
      .clk, .rst_n, .req_valid, .req_pc, .pred_taken, .pred_target, .hit, .upd);
  end

endmodule
