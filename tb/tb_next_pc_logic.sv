// tb_next_pc_logic: random self-check of the next-fetch-address priority
// (redirect > taken prediction > advance by the accepted syllables > hold)
// against an independent model.
module tb_next_pc_logic;
  import lx_fe_pkg::*;

  pc_t  pc_q, redirect_pc, pred_target, pc_d, exp_pc;
  logic redirect_valid, pred_taken;
  len_t accept_n;
  int   checks = 0, failures = 0;

  next_pc_logic dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      pc_q           = $urandom;
      redirect_pc    = $urandom;
      pred_target    = $urandom;
      redirect_valid = ($urandom % 4) == 0;
      pred_taken     = ($urandom % 3) == 0;
      accept_n       = len_t'(($urandom % 2) ? 0 : 1 + $urandom % 4);
      #1;
      if (redirect_valid)   exp_pc = redirect_pc;
      else if (pred_taken)  exp_pc = pred_target;
      else if (accept_n != 0) exp_pc = pc_q + 4 * accept_n;
      else                  exp_pc = pc_q;
      checks++;
      if (pc_d !== exp_pc) begin
        failures++;
        $display("FAIL n=%0d pc=%h r=%b t=%b a=%0d got %h exp %h",
                 n, pc_q, redirect_valid, pred_taken, accept_n, pc_d, exp_pc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
