// tb_branch_predictor: instantiates the structure in all four
// organisations and runs the same scripted training on each: a branch that
// is taken repeatedly, then not taken, then taken again, while being looked
// up. Expected behaviour per organisation is worked out by hand:
//   BHT/GAs give the pre-decoded target; their counters start weakly not
//   taken, and GAs keeps one counter per history value, so its prediction
//   depends on the outcomes shifted into the history (traced per step);
//   BTB1 hits after the first taken update and follows the last outcome;
//   BTB2 hits after the first taken update (weakly taken) and needs two
//   not-taken updates to predict not taken. BTBs give the trained target.
// Lookups without req_valid must never predict taken.
module tb_branch_predictor;
  import lx_fe_pkg::*;

  logic clk = 0, rst_n = 0;
  logic req_valid;
  pc_t  req_pc, req_dec_target;
  pred_update_t upd;
  logic tk [4];
  pc_t  tg [4];
  int   checks = 0, failures = 0;

  branch_predictor #(.KIND(PK_BHT),  .ENTRIES(64)) u0 (.clk, .rst_n, .req_valid, .req_pc, .req_dec_target, .pred_taken(tk[0]), .pred_target(tg[0]), .upd);
  branch_predictor #(.KIND(PK_GAS),  .ENTRIES(64), .GAS_HIST_W(2)) u1 (.clk, .rst_n, .req_valid, .req_pc, .req_dec_target, .pred_taken(tk[1]), .pred_target(tg[1]), .upd);
  branch_predictor #(.KIND(PK_BTB1), .ENTRIES(16), .BTB_WAYS(2), .BTB_ADDR_BITS(12)) u2 (.clk, .rst_n, .req_valid, .req_pc, .req_dec_target, .pred_taken(tk[2]), .pred_target(tg[2]), .upd);
  branch_predictor #(.KIND(PK_BTB2), .ENTRIES(16), .BTB_WAYS(2), .BTB_ADDR_BITS(12)) u3 (.clk, .rst_n, .req_valid, .req_pc, .req_dec_target, .pred_taken(tk[3]), .pred_target(tg[3]), .upd);

  always #5 clk = ~clk;

  localparam pc_t BR  = 32'h0000_2344;
  localparam pc_t TGT = 32'h0000_3000;
  localparam pc_t DEC = 32'h0000_3004;   // deliberately differs from TGT

  task automatic expect_pred(int step, logic e0, logic e1, logic e2, logic e3);
    logic e [4];
    e = '{e0, e1, e2, e3};
    @(negedge clk);
    upd = '0;
    req_valid = 1; req_pc = BR; req_dec_target = DEC;
    #1;
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (tk[k] !== e[k]) begin failures++; $display("FAIL step %0d kind %0d taken %b exp %b", step, k, tk[k], e[k]); end
      if (e[k]) begin
        checks++;
        if (tg[k] !== ((k < 2) ? DEC : TGT)) begin failures++; $display("FAIL step %0d kind %0d target %h", step, k, tg[k]); end
      end
    end
    req_valid = 0;
    #1;
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (tk[k] !== 1'b0) begin failures++; $display("FAIL step %0d kind %0d predicts without request", step, k); end
    end
  endtask

  task automatic train(logic taken);
    @(negedge clk);
    upd.valid = 1; upd.pc = BR; upd.taken = taken; upd.target = TGT;
    @(negedge clk);
    upd = '0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req_valid = 0; req_pc = '0; req_dec_target = '0; upd = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // BHT: one counter; GAs: counter c[h] per history value h;
    // BTB1: last outcome; BTB2: allocated at 10
    //            BHT GAs BTB1 BTB2
    expect_pred(0, 0,  0,  0,   0);   // GAs h=00 c=01
    train(1);                         // BHT 10, GAs c[00]=10 h=01, BTB alloc
    expect_pred(1, 1,  0,  1,   1);   // GAs c[01]=01
    train(1);                         // GAs c[01]=10 h=11
    expect_pred(2, 1,  0,  1,   1);   // GAs c[11]=01
    train(1);                         // GAs c[11]=10 h=11
    expect_pred(3, 1,  1,  1,   1);
    train(1);                         // GAs c[11]=11
    expect_pred(4, 1,  1,  1,   1);
    train(0);                         // BHT 10, GAs c[11]=10 h=10, BTB2 10
    expect_pred(5, 1,  0,  0,   1);   // GAs c[10]=01
    train(0);                         // BHT 01, GAs c[10]=00 h=00, BTB2 01
    expect_pred(6, 0,  1,  0,   0);   // GAs c[00]=10 from the first update
    train(1);                         // BHT 10, GAs c[00]=11 h=01, BTB2 10
    expect_pred(7, 1,  1,  1,   1);   // GAs c[01]=10
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
