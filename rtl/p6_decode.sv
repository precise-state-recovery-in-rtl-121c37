// p6_decode: combinational instruction decoder.
//
// Splits a 32-bit instruction word into the fields dispatch needs: which
// reservation-station kind executes it, whether it writes a register, and
// which registers feed its two RS operand slots.  The slot assignment follows
// the reservation-station contents shown in the P6 example: ldf keeps its
// base address in operand 2 (V2 = [r1]); stf keeps its data in operand 1
// (T1 = the producer of f2) and its base address in operand 2; mulf and addi
// read rs1 into operand 1.  The opcode values and field positions are this
// design's own encoding (see p6_pkg).  Unknown opcodes decode as NOP.
// Purely combinational, no clock.
module p6_decode
  import p6_pkg::*;
(
  input  logic     valid_i,
  input  word_t    instr_i,
  output decoded_t dec_o
);

  always_comb begin
    dec_o          = '0;
    dec_o.valid    = valid_i;
    dec_o.op       = opcode_e'(instr_i[31:28]);
    dec_o.rd       = instr_i[27:24];
    dec_o.imm      = {{(XLEN-16){instr_i[15]}}, instr_i[15:0]};
    dec_o.fu       = FU_NONE;
    unique case (instr_i[31:28])
      OP_ADD, OP_SUB: begin
        dec_o.fu = FU_ALU; dec_o.has_dest = 1'b1;
        dec_o.use1 = 1'b1; dec_o.src1 = instr_i[23:20];
        dec_o.use2 = 1'b1; dec_o.src2 = instr_i[19:16];
      end
      OP_ADDI: begin
        dec_o.fu = FU_ALU; dec_o.has_dest = 1'b1;
        dec_o.use1 = 1'b1; dec_o.src1 = instr_i[23:20];
      end
      OP_MULF: begin
        dec_o.fu = FU_FP; dec_o.has_dest = 1'b1;
        dec_o.use1 = 1'b1; dec_o.src1 = instr_i[23:20];
        dec_o.use2 = 1'b1; dec_o.src2 = instr_i[19:16];
      end
      OP_LDF: begin
        dec_o.fu = FU_LD; dec_o.has_dest = 1'b1;
        dec_o.use2 = 1'b1; dec_o.src2 = instr_i[23:20];
      end
      OP_STF: begin
        dec_o.fu = FU_ST;
        dec_o.use1 = 1'b1; dec_o.src1 = instr_i[19:16];
        dec_o.use2 = 1'b1; dec_o.src2 = instr_i[23:20];
      end
      OP_BEQ, OP_BNE: begin
        dec_o.fu = FU_ALU;
        dec_o.use1 = 1'b1; dec_o.src1 = instr_i[23:20];
        dec_o.use2 = 1'b1; dec_o.src2 = instr_i[19:16];
      end
      OP_TRAP, OP_IRET, OP_HALT, OP_PMAP: dec_o.fu = FU_NONE;
      default: dec_o.op = OP_NOP;
    endcase
    if (!dec_o.has_dest) dec_o.rd = '0;
  end

endmodule
