// tb_btb_predictor: runs a 2-way BTB with 1-bit state and a 2-way BTB with
// 2-bit counters, both with a short tag, and a direct-mapped 2-bit BTB with
// no tag at all (address bits = index bits), against a reference cache
// model (valid/tag/target/state per way, invalid-first then round-robin
// allocation of taken misses). Checks hit, direction and target each cycle.
module tb_btb_predictor;
  import lx_fe_pkg::*;

  localparam int N = 16, W = 2, S = N / W, AB = 6;   // 3 index bits, 3 tag bits
  logic clk = 0, rst_n = 0;
  logic req_valid;
  pc_t  req_pc;
  pred_update_t upd;
  logic t1, t2, t3, h1, h2, h3;
  pc_t  g1, g2, g3;
  int   checks = 0, failures = 0, n_hit = 0, n_alias = 0;

  btb_predictor #(.ENTRIES(N), .WAYS(W), .ADDR_BITS(AB), .CNT_W(1)) dut1 (
    .clk, .rst_n, .req_valid, .req_pc, .pred_taken(t1), .pred_target(g1), .hit(h1), .upd);
  btb_predictor #(.ENTRIES(N), .WAYS(W), .ADDR_BITS(AB), .CNT_W(2)) dut2 (
    .clk, .rst_n, .req_valid, .req_pc, .pred_taken(t2), .pred_target(g2), .hit(h2), .upd);

  // no-tag geometry: 8 sets of 1 way, 3 address bits
  btb_predictor #(.ENTRIES(8), .WAYS(1), .ADDR_BITS(3), .CNT_W(2)) dut3 (
    .clk, .rst_n, .req_valid, .req_pc, .pred_taken(t3), .pred_target(g3), .hit(h3), .upd);

  always #5 clk = ~clk;

  // model[c]: c = 0 for 1-bit, 1 for 2-bit
  // c = 2: 8 sets, 1 way, no tag
  int   m_tag [3][S][W];
  logic m_v   [3][S][W];
  pc_t  m_tgt [3][S][W];
  int   m_st  [3][S][W];
  int   m_rr  [3][S];

  function automatic int ways_of(int c); return (c == 2) ? 1 : W; endfunction

  function automatic pc_t rpc();
    return 32'h0001_0000 + 4 * ($urandom % 40);
  endfunction

  function automatic int set_of(pc_t p); return (p >> 2) % S; endfunction
  function automatic int tag_of(int c, pc_t p);
    return (c == 2) ? 0 : ((p >> 2) / S) % (1 << (AB - 3));
  endfunction

  task automatic look(int c, pc_t p, output logic hit, output logic tk, output pc_t tg);
    int s = (c == 2) ? (p >> 2) % 8 : set_of(p);
    hit = 0; tk = 0; tg = '0;
    for (int w = 0; w < ways_of(c); w++)
      if (!hit && m_v[c][s][w] && m_tag[c][s][w] == tag_of(c, p)) begin
        hit = 1; tk = (c == 0) ? (m_st[c][s][w] == 1) : (m_st[c][s][w] >= 2); tg = m_tgt[c][s][w];
      end
  endtask

  task automatic train(int c);
    int s = set_of(upd.pc), way = -1, mx = (c == 0) ? 1 : 3, vic = -1;
    if (c == 2) s = (upd.pc >> 2) % 8;
    for (int w = 0; w < ways_of(c); w++)
      if (way < 0 && m_v[c][s][w] && m_tag[c][s][w] == tag_of(c, upd.pc)) way = w;
    if (way >= 0) begin
      if (upd.taken) begin
        m_st[c][s][way] = (m_st[c][s][way] == mx) ? mx : m_st[c][s][way] + 1;
        m_tgt[c][s][way] = upd.target & ~32'h3;
      end else
        m_st[c][s][way] = (m_st[c][s][way] == 0) ? 0 : m_st[c][s][way] - 1;
    end else if (upd.taken) begin
      for (int w = ways_of(c) - 1; w >= 0; w--) if (!m_v[c][s][w]) vic = w;
      if (vic < 0) begin vic = m_rr[c][s]; m_rr[c][s] = (m_rr[c][s] + 1) % ways_of(c); end
      m_v[c][s][vic] = 1; m_tag[c][s][vic] = tag_of(c, upd.pc);
      m_tgt[c][s][vic] = upd.target & ~32'h3; m_st[c][s][vic] = (c == 0) ? 1 : 2;
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic eh, et;
    pc_t  eg;
    for (int c = 0; c < 3; c++)
      for (int s = 0; s < S; s++) begin
        m_rr[c][s] = 0;
        for (int w = 0; w < W; w++) begin m_v[c][s][w] = 0; m_st[c][s][w] = 0; end
      end
    req_valid = 0; req_pc = '0; upd = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      req_valid  = ($urandom % 5) != 0;
      req_pc     = rpc();
      upd.valid  = ($urandom % 2) == 0;
      upd.pc     = rpc();
      upd.taken  = ($urandom % 100) < 60;
      upd.target = 32'h0002_0000 + 4 * ($urandom % 1000);
      #1;
      look(0, req_pc, eh, et, eg);
      checks++;
      if (h1 !== (eh && req_valid) || t1 !== (et && req_valid) || (eh && req_valid && g1 !== eg)) begin
        failures++; $display("FAIL btb1 n=%0d pc=%h hit %b/%b tk %b/%b tg %h/%h", n, req_pc, h1, eh, t1, et, g1, eg);
      end
      if (eh && req_valid) n_hit++;
      look(1, req_pc, eh, et, eg);
      checks++;
      if (h2 !== (eh && req_valid) || t2 !== (et && req_valid) || (eh && req_valid && g2 !== eg)) begin
        failures++; $display("FAIL btb2 n=%0d pc=%h hit %b/%b tk %b/%b tg %h/%h", n, req_pc, h2, eh, t2, et, g2, eg);
      end
      look(2, req_pc, eh, et, eg);
      checks++;
      if (h3 !== (eh && req_valid) || t3 !== (et && req_valid) || (eh && req_valid && g3 !== eg)) begin
        failures++; $display("FAIL notag n=%0d pc=%h hit %b/%b tk %b/%b tg %h/%h", n, req_pc, h3, eh, t3, et, g3, eg);
      end
      @(posedge clk);
      if (upd.valid) begin train(0); train(1); train(2); end
    end
    checks++;
    if (n_hit < 500) begin failures++; $display("FAIL few hits %0d", n_hit); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
