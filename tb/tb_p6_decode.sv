// tb_p6_decode: checks the decoder's unit class, destination and operand
// slot assignment for every opcode against a table written out by hand.
module tb_p6_decode;
  import p6_pkg::*;
  int checks = 0, failures = 0;
  logic valid;
  word_t instr;
  decoded_t d;
  p6_decode dut (.valid_i(valid), .instr_i(instr), .dec_o(d));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_dec(opcode_e op, fu_e fu, bit dest, bit u1, int s1, bit u2, int s2);
    instr = {op, 4'd7, 4'd3, 4'd5, 16'hFFFE};
    valid = 1'b1;
    #1;
    checks++;
    if (d.fu != fu || d.has_dest != dest || d.use1 != u1 || d.use2 != u2 ||
        (u1 && d.src1 != reg_t'(s1)) || (u2 && d.src2 != reg_t'(s2)) ||
        d.rd != (dest ? reg_t'(7) : reg_t'(0)) || d.imm != 32'hFFFF_FFFE || !d.valid) begin
      failures++;
      $display("FAIL opcode %0h: fu=%0d dest=%0d u1=%0d s1=%0d u2=%0d s2=%0d", op, d.fu,
               d.has_dest, d.use1, d.src1, d.use2, d.src2);
    end
  endtask

  initial begin
    //          op       fu      dest u1 s1 u2 s2
    expect_dec(OP_ADD,  FU_ALU,  1,   1, 3, 1, 5);
    expect_dec(OP_ADDI, FU_ALU,  1,   1, 3, 0, 0);
    expect_dec(OP_SUB,  FU_ALU,  1,   1, 3, 1, 5);
    expect_dec(OP_MULF, FU_FP,   1,   1, 3, 1, 5);
    expect_dec(OP_LDF,  FU_LD,   1,   0, 0, 1, 3);   // base in operand 2
    expect_dec(OP_STF,  FU_ST,   0,   1, 5, 1, 3);   // data op 1, base op 2
    expect_dec(OP_BEQ,  FU_ALU,  0,   1, 3, 1, 5);
    expect_dec(OP_BNE,  FU_ALU,  0,   1, 3, 1, 5);
    expect_dec(OP_TRAP, FU_NONE, 0,   0, 0, 0, 0);
    expect_dec(OP_IRET, FU_NONE, 0,   0, 0, 0, 0);
    expect_dec(OP_PMAP, FU_NONE, 0,   0, 0, 0, 0);
    expect_dec(OP_HALT, FU_NONE, 0,   0, 0, 0, 0);
    expect_dec(OP_NOP,  FU_NONE, 0,   0, 0, 0, 0);
    instr = 32'hC000_0000; #1;      // undefined opcode
    checks++;
    if (d.op != OP_NOP || d.fu != FU_NONE) begin failures++; $display("FAIL undefined opcode"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
