// p6_imem: instruction memory (the I$ of the pipeline drawings).
//
// WORDS 32-bit instruction words, byte addressed, read combinationally by
// fetch.  The environment loads the program through the write port.  The
// slides only name the I$; its size and ports are this design's choice.
module p6_imem
  import p6_pkg::*;
#(
  parameter int unsigned WORDS = 256
) (
  input  logic  clk_i,
  input  word_t raddr_i,
  output word_t rdata_o,
  input  logic  we_i,
  input  word_t waddr_i,
  input  word_t wdata_i
);

  localparam int unsigned AW = $clog2(WORDS);

  word_t mem_q [WORDS];

  assign rdata_o = mem_q[raddr_i[2 +: AW]];

  always_ff @(posedge clk_i) begin
    if (we_i) mem_q[waddr_i[2 +: AW]] <= wdata_i;
  end

endmodule
