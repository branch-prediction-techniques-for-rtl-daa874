// tb_program_counter: checks the reset address and that every clock edge
// loads the applied next address.
module tb_program_counter;
  import lx_fe_pkg::*;

  localparam pc_t RST = 32'h0000_1230;
  logic clk = 0, rst_n = 0;
  pc_t  pc_d, pc_q, prev;
  int   checks = 0, failures = 0;

  program_counter #(.RESET_PC(RST)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pc_d = 32'hdead_beef;
    #12;
    checks++;
    if (pc_q !== RST) begin failures++; $display("FAIL reset value %h", pc_q); end
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      prev = $urandom;
      pc_d = prev;
      @(negedge clk);
      checks++;
      if (pc_q !== prev) begin failures++; $display("FAIL load %h got %h", prev, pc_q); end
    end
    rst_n = 0;
    #1;
    checks++;
    if (pc_q !== RST) begin failures++; $display("FAIL async reset %h", pc_q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
