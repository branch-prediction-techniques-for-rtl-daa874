// lx_bp_frontend: low-power branch-predicting fetch front end of a 4-issue
// VLIW core.
//
// The program counter addresses the instruction cache, which returns a line
// of ISSUE syllables. The line is written into the variable-length
// instruction (decompression) buffer, from which one bundle per cycle goes
// to decode. While the line is written, the branch detector pre-decodes it;
// only if it holds a branch is the branch predictor accessed, one cycle
// later, with the branch's address. A taken prediction
//   - loads the predicted target into the program counter,
//   - discards the line fetched in that same cycle (it is the fall-through
//     line), and
//   - cuts the syllables behind the branch's bundle from the buffer.
// Branches in a line that arrives while the buffer is empty are passed to
// decode without a prediction, so they are fetched as not taken.
//
// The back end is not part of this block. It resolves branches and reports
// them on upd (to train the predictor), and on a misprediction it asserts
// redirect_valid with the correct address for one cycle, which empties the
// buffer and restarts fetch there. It can find a misprediction by comparing
// each bundle's bundle_pc with the address the previous bundle actually
// continued at.
//
// Instruction cache interface: icache_addr is the fetch address; the cache
// answers in the same cycle with icache_valid and the aligned line holding
// that address (icache_valid low = miss, fetch holds). icache_req is high
// when the buffer has room for at least one syllable. The buffer takes the
// line from the fetch address's slot on, or as much of it as fits, and the
// fetch address advances by the number of syllables taken.
//
// Status outputs count the predictor's energy-relevant events:
// stat_bd_detect (a branch found in an accepted line), stat_pred_access (a
// predictor lookup), stat_bd_inhibit (a branch seen while the buffer was
// empty, so no lookup), stat_pred_taken (a taken prediction) and
// stat_buf_bypass (a bundle sent to decode straight from the fetched line).
//
// The block structure follows the source design; its defaults are the
// evaluated 256-entry GAs predictor and a buffer of BUF_DEPTH long
// instructions, of which the source evaluates 1, 2, 4 and 8.
module lx_bp_frontend
  import lx_fe_pkg::*;
#(
  parameter pred_kind_e  PRED_KIND     = PK_GAS,
  parameter int unsigned PRED_ENTRIES  = 256,
  parameter int unsigned GAS_HIST_W    = 4,
  parameter int unsigned BTB_WAYS      = 4,
  parameter int unsigned BTB_ADDR_BITS = 28,
  parameter int unsigned BUF_DEPTH     = 4,
  parameter pc_t         RESET_PC      = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  // instruction cache
  output pc_t          icache_addr,
  output logic         icache_req,
  input  logic         icache_valid,
  input  line_t        icache_line,
  // decode
  output logic         bundle_valid,
  input  logic         bundle_ready,
  output line_t        bundle_slots,
  output len_t         bundle_len,
  output pc_t          bundle_pc,
  // back end
  input  logic         redirect_valid,
  input  pc_t          redirect_pc,
  input  pred_update_t upd,
  // status
  output logic         stat_pred_access,
  output logic         stat_pred_taken,
  output logic         stat_bd_detect,
  output logic         stat_bd_inhibit,
  output logic         stat_buf_bypass
);

  pc_t  pc_q, pc_d;
  logic buf_wr_ready, buf_empty, buf_bypass;
  logic line_accept;
  len_t n_acc, accept_n;
  logic bd_detect, bd_inhibit, act_q;
  pc_t  br_pc_q, dec_target_q, pred_target;
  len_t keep_q;
  logic bp_taken, pred_taken;

  program_counter #(.RESET_PC(RESET_PC)) u_pc (
    .clk, .rst_n, .pc_d, .pc_q);

  next_pc_logic u_npc (
    .pc_q, .redirect_valid, .redirect_pc,
    .pred_taken, .pred_target, .accept_n, .pc_d);

  assign icache_addr = pc_q;
  assign icache_req  = buf_wr_ready;
  // the line fetched in the cycle of a taken prediction or of a redirect is
  // on the wrong path and is dropped
  assign line_accept = icache_valid && buf_wr_ready && !pred_taken && !redirect_valid;
  assign accept_n    = line_accept ? n_acc : '0;

  branch_detector u_bd (
    .clk, .rst_n,
    .line_valid(line_accept), .line(icache_line), .line_pc(pc_q), .line_n(n_acc),
    .buf_empty, .detect(bd_detect), .inhibit(bd_inhibit),
    .act_q, .br_pc_q, .dec_target_q, .keep_q);

  branch_predictor #(
    .KIND(PRED_KIND), .ENTRIES(PRED_ENTRIES), .GAS_HIST_W(GAS_HIST_W),
    .BTB_WAYS(BTB_WAYS), .BTB_ADDR_BITS(BTB_ADDR_BITS)
  ) u_bp (
    .clk, .rst_n,
    .req_valid(act_q), .req_pc(br_pc_q), .req_dec_target(dec_target_q),
    .pred_taken(bp_taken), .pred_target, .upd);

  assign pred_taken = act_q && bp_taken && !redirect_valid;

  instruction_buffer #(.DEPTH(BUF_DEPTH)) u_ibuf (
    .clk, .rst_n, .flush(redirect_valid),
    .wr_valid(line_accept), .wr_ready(buf_wr_ready), .wr_n_acc(n_acc),
    .wr_line(icache_line), .wr_pc(pc_q),
    .trunc_valid(pred_taken), .trunc_keep(keep_q),
    .out_valid(bundle_valid), .out_ready(bundle_ready),
    .out_slots(bundle_slots), .out_len(bundle_len), .out_pc(bundle_pc),
    .empty(buf_empty), .bypass(buf_bypass));

  assign stat_pred_access = act_q;
  assign stat_pred_taken  = pred_taken;
  assign stat_bd_detect   = bd_detect;
  assign stat_bd_inhibit  = bd_inhibit;
  assign stat_buf_bypass  = buf_bypass;

endmodule
