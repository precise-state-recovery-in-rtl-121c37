// p6_fetch: fetch stage (F) and the F/D latch.
//
// Holds the PC, reads the instruction memory combinationally and places
// <pc, instruction> in the F/D latch for dispatch.  Fetch predicts every
// branch not taken and simply continues at pc + 4; a wrong prediction, like
// an exception, is repaired at retire, which drives redirect_i with the new
// PC.  A redirect empties the latch and restarts fetch at redirect_pc_i in
// the next cycle.  stall_i (dispatch cannot take the latched instruction)
// holds latch and PC.  halt_i stops fetching.
// Timing: an instruction fetched in cycle n is in the latch, and can be
// dispatched, in cycle n+1.  The single-entry latch, the not-taken
// prediction and RESET_PC are this design's choices.
module p6_fetch
  import p6_pkg::*;
#(
  parameter word_t RESET_PC = '0
) (
  input  logic  clk_i,
  input  logic  rst_ni,
  input  logic  stall_i,
  input  logic  halt_i,
  input  logic  redirect_i,
  input  word_t redirect_pc_i,
  output word_t imem_addr_o,
  input  word_t imem_data_i,
  output logic  fd_valid_o,
  output word_t fd_pc_o,
  output word_t fd_instr_o
);

  word_t pc_q;

  assign imem_addr_o = pc_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      pc_q       <= RESET_PC;
      fd_valid_o <= 1'b0;
      fd_pc_o    <= '0;
      fd_instr_o <= '0;
    end else if (redirect_i) begin
      pc_q       <= redirect_pc_i;
      fd_valid_o <= 1'b0;
    end else if (halt_i) begin
      if (!stall_i) fd_valid_o <= 1'b0;
    end else if (!stall_i || !fd_valid_o) begin
      fd_valid_o <= 1'b1;
      fd_pc_o    <= pc_q;
      fd_instr_o <= imem_data_i;
      pc_q       <= pc_q + 32'd4;
    end
  end

endmodule
