// p6_alu: integer ALU functional unit (the ALU reservation station's unit).
//
// Two registers: X holds the issued instruction while it executes (one
// cycle), C holds the finished result until the CDB arbiter grants it.  An
// instruction issued (S) in cycle n executes in n+1 and is on the CDB in n+2
// at the earliest, matching addi in the slides' example (S c5, X c6, C c7).
// If C is not granted, X stalls behind it and ready_o drops, so the
// reservation station keeps its instruction ("CDB busy ? stall").
// Operations: add, addi, sub; beq/bne compare (a taken branch is reported as
// EXC_MISPREDICT with its target, since fetch predicts not-taken).  The
// operation set is this design's choice.
// flush_i drops everything in flight.
module p6_alu
  import p6_pkg::*;
(
  input  logic   clk_i,
  input  logic   rst_ni,
  input  logic   flush_i,
  input  issue_t issue_i,
  output logic   ready_o,
  output cdb_t   req_o,
  input  logic   grant_i
);

  issue_t x_q;
  cdb_t   c_q, x_res;
  logic   advance;

  assign advance = !c_q.valid || grant_i;
  assign ready_o = !x_q.valid || advance;
  assign req_o   = c_q;

  always_comb begin
    x_res       = '0;
    x_res.valid = x_q.valid;
    x_res.tag   = x_q.tag;
    x_res.exc   = EXC_NONE;
    unique case (x_q.op)
      OP_ADD:  x_res.value = x_q.v1 + x_q.v2;
      OP_ADDI: x_res.value = x_q.v1 + x_q.imm;
      OP_SUB:  x_res.value = x_q.v1 - x_q.v2;
      OP_BEQ, OP_BNE: begin
        x_res.target = x_q.pc + x_q.imm;
        if ((x_q.v1 == x_q.v2) == (x_q.op == OP_BEQ)) x_res.exc = EXC_MISPREDICT;
      end
      default: x_res.value = '0;
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      x_q <= '0;
      c_q <= '0;
    end else if (flush_i) begin
      x_q.valid <= 1'b0;
      c_q.valid <= 1'b0;
    end else begin
      if (advance) c_q <= x_res;
      if (ready_o) x_q <= issue_i;
    end
  end

endmodule
