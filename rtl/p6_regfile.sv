// p6_regfile: architectural register file.
//
// Holds the committed (precise) register state.  It is written only by the
// retire stage, one register per cycle, so it never contains the result of an
// instruction that has not retired; this is what lets a flush restart from it.
// Dispatch reads two source registers combinationally; a third read port is
// for observing the state from outside.  A write and a read of the same
// register in one cycle return the old value: dispatch never needs the new
// one, since the register's Map Table entry still points at the ROB then.
// All registers reset to zero (this design's choice).
module p6_regfile
  import p6_pkg::*;
#(
  parameter int unsigned N = NUM_REGS
) (
  input  logic                 clk_i,
  input  logic                 rst_ni,
  input  logic                 we_i,
  input  logic [$clog2(N)-1:0] waddr_i,
  input  word_t                wdata_i,
  input  logic [$clog2(N)-1:0] raddr1_i,
  output word_t                rdata1_o,
  input  logic [$clog2(N)-1:0] raddr2_i,
  output word_t                rdata2_o,
  input  logic [$clog2(N)-1:0] raddr3_i,
  output word_t                rdata3_o
);

  word_t regs_q [N];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int i = 0; i < N; i++) regs_q[i] <= '0;
    end else if (we_i) begin
      regs_q[waddr_i] <= wdata_i;
    end
  end

  assign rdata1_o = regs_q[raddr1_i];
  assign rdata2_o = regs_q[raddr2_i];
  assign rdata3_o = regs_q[raddr3_i];

endmodule
