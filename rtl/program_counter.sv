// program_counter: fetch address register of the front end.
//
// Loads the address chosen by next_pc_logic every cycle and restarts at
// RESET_PC after an active-low reset. The address it holds is sent to the
// instruction cache; PC[3:2] tells at which slot of the fetched line
// execution starts (non-zero after a jump into the middle of a line).
// The reset address is this design's choice.
module program_counter
  import lx_fe_pkg::*;
#(
  parameter pc_t RESET_PC = '0
) (
  input  logic clk,
  input  logic rst_n,
  input  pc_t  pc_d,
  output pc_t  pc_q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pc_q <= RESET_PC;
    else        pc_q <= pc_d;
  end

endmodule
