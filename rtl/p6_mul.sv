// p6_mul: pipelined multiply unit behind the FP1 and FP2 reservation stations.
//
// Executes mulf.  LATENCY execute cycles (3 by default, the X span of mulf in
// the slides' example: S c4, X c5..c7, C c8), then a C register that waits for
// the CDB.  A new instruction can enter every cycle.  When the finished result
// is not granted the CDB, the whole pipeline holds and ready_o drops.
// The slides do not give a number format; operands are treated as 32-bit
// integers and the low 32 bits of the product are returned (this design's
// choice).  flush_i drops everything in flight.
module p6_mul
  import p6_pkg::*;
#(
  parameter int unsigned LATENCY = 3
) (
  input  logic   clk_i,
  input  logic   rst_ni,
  input  logic   flush_i,
  input  issue_t issue_i,
  output logic   ready_o,
  output cdb_t   req_o,
  input  logic   grant_i
);

  typedef struct packed {
    logic  valid;
    tag_t  tag;
    word_t prod;
  } stage_t;

  stage_t st_q [LATENCY];
  cdb_t   c_q;
  logic   advance;

  assign advance = !c_q.valid || grant_i;
  assign ready_o = advance;
  assign req_o   = c_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int i = 0; i < LATENCY; i++) st_q[i] <= '0;
      c_q <= '0;
    end else if (flush_i) begin
      for (int i = 0; i < LATENCY; i++) st_q[i].valid <= 1'b0;
      c_q.valid <= 1'b0;
    end else if (advance) begin
      st_q[0].valid <= issue_i.valid;
      st_q[0].tag   <= issue_i.tag;
      st_q[0].prod  <= issue_i.v1 * issue_i.v2;
      for (int i = 1; i < LATENCY; i++) st_q[i] <= st_q[i-1];
      c_q       <= '0;
      c_q.valid <= st_q[LATENCY-1].valid;
      c_q.tag   <= st_q[LATENCY-1].tag;
      c_q.value <= st_q[LATENCY-1].prod;
      c_q.exc   <= EXC_NONE;
    end
  end

endmodule
