// tb_gas_predictor: random lookups and updates against a reference pattern
// table indexed by {address bits, global history}; checks the history
// register and the predictions each cycle.
module tb_gas_predictor;
  import lx_fe_pkg::*;

  localparam int N = 64, H = 3;
  logic clk = 0, rst_n = 0;
  logic req_valid, pred_taken;
  pc_t  req_pc;
  pred_update_t upd;
  logic [H-1:0] ghr;
  int   checks = 0, failures = 0, n_taken = 0;
  int   model [N];
  int   hist;

  gas_predictor #(.ENTRIES(N), .HIST_W(H)) dut (.*);

  always #5 clk = ~clk;

  function automatic pc_t rpc();
    return 32'h0000_8000 + 4 * ($urandom % 100);
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int idx;
    logic exp;
    for (int i = 0; i < N; i++) model[i] = 1;
    hist = 0;
    req_valid = 0; req_pc = '0; upd = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      req_valid = ($urandom % 4) != 0;
      req_pc    = rpc();
      upd.valid = ($urandom % 2) == 0;
      upd.pc    = rpc();
      upd.taken = ($urandom % 100) < 65;
      upd.target = $urandom;
      #1;
      idx = (((req_pc >> 2) % (N >> H)) << H) | hist;
      exp = req_valid && model[idx] >= 2;
      checks += 2;
      if (pred_taken !== exp) begin
        failures++; $display("FAIL n=%0d pc=%h got %b exp %b", n, req_pc, pred_taken, exp);
      end
      if (int'(ghr) != hist) begin
        failures++; $display("FAIL n=%0d ghr %b exp %0d", n, ghr, hist);
      end
      if (exp) n_taken++;
      @(posedge clk);
      if (upd.valid) begin
        idx = (((upd.pc >> 2) % (N >> H)) << H) | hist;
        if (upd.taken) model[idx] = (model[idx] == 3) ? 3 : model[idx] + 1;
        else           model[idx] = (model[idx] == 0) ? 0 : model[idx] - 1;
        hist = ((hist << 1) | int'(upd.taken)) % (1 << H);
      end
    end
    checks++;
    if (n_taken < 100) begin failures++; $display("FAIL few taken %0d", n_taken); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
