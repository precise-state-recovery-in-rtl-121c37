// tb_p6_core: end-to-end test of the out-of-order core at its default sizes.
//
// A small instruction-set model inside the testbench executes the same
// program in order and is stepped once per retired instruction; every retire
// (PC, destination, value), every page-fault flush and every interrupt entry
// of the core must match it, and at halt the whole register file and data
// memory must match too.  Programs:
//   1. the worked example loop (ldf, mulf, stf, addi, ldf, mulf, stf), entered
//      through a trap so that it starts on an empty machine; dispatch and
//      retire cycles are checked against the example's timing;
//   2. the same loop with its stores to a page that is not present: the first
//      stf faults at the ROB head, the state seen at that moment must be the
//      precise state before it, the handler maps the page and returns, and
//      the loop finishes;
//   2b. the loop with its stores one word higher, so that the second ldf reads
//      the word the first stf writes before that store has its address: the
//      load must be replayed once and then see the stored value;
//   3. random programs with forward branches, traps, loads/stores to pages
//      that may be absent, and random interrupt requests.
// Each pipeline mechanism is counted and must occur at least once.
module tb_p6_core;
  import p6_pkg::*;

  localparam word_t PF_V = 32'h200, TRAP_V = 32'h280, IRQ_V = 32'h300;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  irq, irq_ack;
  logic  imem_we, dmem_we, page_we, page_present;
  word_t imem_addr, imem_wdata, dmem_addr, dmem_wdata, dmem_rdata;
  reg_t  dbg_reg;
  word_t dbg_val;
  logic  ret_valid, ret_rd_we, flush, halted;
  word_t ret_pc, ret_value, epc;
  reg_t  ret_rd;

  p6_core dut (
    .clk_i(clk), .rst_ni(rst_n), .irq_i(irq), .irq_ack_o(irq_ack),
    .imem_we_i(imem_we), .imem_addr_i(imem_addr), .imem_wdata_i(imem_wdata),
    .dmem_we_i(dmem_we), .dmem_addr_i(dmem_addr), .dmem_wdata_i(dmem_wdata),
    .dmem_rdata_o(dmem_rdata), .page_we_i(page_we), .page_present_i(page_present),
    .dbg_reg_i(dbg_reg), .dbg_reg_value_o(dbg_val),
    .ret_valid_o(ret_valid), .ret_pc_o(ret_pc), .ret_rd_we_o(ret_rd_we),
    .ret_rd_o(ret_rd), .ret_value_o(ret_value), .flush_o(flush), .epc_o(epc),
    .halted_o(halted)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ encoding
  function automatic word_t enc(opcode_e op, int rd, int rs1, int rs2, int imm);
    return {op, 4'(rd), 4'(rs1), 4'(rs2), 16'(imm)};
  endfunction

  word_t prog [256];
  word_t data [256];
  bit    pres [16];

  // ------------------------------------------------------------ ISA model
  word_t r [16];
  word_t m [256];
  bit    mp [16];
  word_t pc, m_epc, m_bad;
  bit    inh;

  function automatic bit present(word_t a);
    return (a < 32'd1024) && mp[a[9:6]];
  endfunction

  // kind: 0 retired, 1 page fault (not retired), 2 halt retired
  task automatic iss_step(output int kind, output word_t rpc, output bit wr,
                          output int rd, output word_t val);
    word_t ins, a, imm;
    int rs1, rs2;
    opcode_e op;
    ins  = prog[pc[9:2]];
    op   = opcode_e'(ins[31:28]);
    rd   = int'(ins[27:24]);
    rs1  = int'(ins[23:20]);
    rs2  = int'(ins[19:16]);
    imm  = {{16{ins[15]}}, ins[15:0]};
    rpc  = pc;
    wr   = 1'b0;
    val  = '0;
    kind = 0;
    pc   = pc + 4;
    case (op)
      OP_ADD:  begin wr = 1; val = r[rs1] + r[rs2]; end
      OP_ADDI: begin wr = 1; val = r[rs1] + imm; end
      OP_SUB:  begin wr = 1; val = r[rs1] - r[rs2]; end
      OP_MULF: begin wr = 1; val = r[rs1] * r[rs2]; end
      OP_LDF: begin
        a = r[rs1] + imm;
        if (!present(a)) kind = 1; else begin wr = 1; val = m[a[9:2]]; end
      end
      OP_STF: begin
        a = r[rs1] + imm;
        if (!present(a)) kind = 1; else m[a[9:2]] = r[rs2];
      end
      OP_BEQ: if (r[rs1] == r[rs2]) pc = rpc + imm;
      OP_BNE: if (r[rs1] != r[rs2]) pc = rpc + imm;
      OP_TRAP: begin m_epc = rpc + 4; inh = 1; pc = TRAP_V; end
      OP_IRET: begin pc = m_epc; inh = 0; end
      OP_PMAP: mp[m_bad[9:6]] = 1;
      OP_HALT: begin kind = 2; pc = rpc; end
      default: ;
    endcase
    if (kind == 1) begin
      m_epc = rpc; m_bad = a; inh = 1; pc = PF_V; wr = 0;
    end
    if (wr) r[rd] = val;
    if (!(op inside {OP_ADD, OP_ADDI, OP_SUB, OP_MULF, OP_LDF})) rd = 0;
  endtask

  // ------------------------------------------------------------ mechanism counters
  int n_rob_full, n_rs_full, n_cdb_conflict, n_src_rob, n_src_cdb, n_rs_capture;
  int n_retire_stall, n_forward, n_replay, n_pf, n_trap, n_iret, n_mispredict;
  int n_irq, n_halt, n_retired;
  bit track = 1'b0;

  always @(posedge clk) if (rst_n && track) begin
    if (dut.dec.valid && dut.rob_full) n_rob_full++;
    if (dut.dec.valid && !dut.rob_full && !dut.rs_avail) n_rs_full++;
    if ($countones({dut.cdb_req[0].valid, dut.cdb_req[1].valid,
                    dut.cdb_req[2].valid, dut.cdb_req[3].valid}) > 1) n_cdb_conflict++;
    if (dut.disp_ok && dut.dec.use1 && dut.m1_tag != 0 && dut.m1_plus) n_src_rob++;
    if (dut.disp_ok && dut.dec.use2 && dut.m2_tag != 0 && dut.m2_plus) n_src_rob++;
    if (dut.disp_ok && dut.dec.use1 && dut.m1_tag != 0 && !dut.m1_plus &&
        dut.cdb.valid && dut.cdb.tag == dut.m1_tag) n_src_cdb++;
    if (dut.disp_ok && dut.dec.use2 && dut.m2_tag != 0 && !dut.m2_plus &&
        dut.cdb.valid && dut.cdb.tag == dut.m2_tag) n_src_cdb++;
    if (dut.g_rs[0].u_rs.hit1 || dut.g_rs[0].u_rs.hit2 || dut.g_rs[1].u_rs.hit2 ||
        dut.g_rs[2].u_rs.hit1 || dut.g_rs[3].u_rs.hit2 || dut.g_rs[4].u_rs.hit2) n_rs_capture++;
    if (dut.rob_head.valid && !dut.rob_head.done) n_retire_stall++;
    if (dut.u_ld.x_q.valid && dut.fwd_hit) n_forward++;
    if (ret_valid) n_retired++;
    if (ret_valid && dut.rob_head.exc == EXC_TRAP) n_trap++;
    if (ret_valid && dut.rob_head.exc == EXC_IRET) n_iret++;
    if (ret_valid && dut.rob_head.exc == EXC_MISPREDICT) n_mispredict++;
    if (ret_valid && dut.rob_head.exc == EXC_HALT) n_halt++;
    if (irq_ack) n_irq++;
    if (flush && !ret_valid && !irq_ack && dut.rob_head.exc == EXC_PAGE_FAULT) n_pf++;
    if (flush && !ret_valid && !irq_ack && dut.rob_head.exc == EXC_REPLAY) n_replay++;
  end

  // ------------------------------------------------------------ lock-step compare
  bit    iss_halted;
  always @(posedge clk) if (rst_n && track) begin
    int kind, rd;
    word_t rpc, val;
    bit wr;
    if (irq_ack) begin
      check(!inh, "interrupt taken while masked");
      check(dut.rob_head.pc == pc, $sformatf("interrupt PC %h, model %h", dut.rob_head.pc, pc));
      m_epc = pc; inh = 1; pc = IRQ_V;
    end else if (ret_valid || (flush && dut.rob_head.exc == EXC_PAGE_FAULT)) begin
      // a load replay re-executes without changing the model
      iss_step(kind, rpc, wr, rd, val);
      if (ret_valid) begin
        check(kind != 1 && ret_pc == rpc, $sformatf("retire pc %h, model %h kind %0d", ret_pc, rpc, kind));
        check(ret_rd_we == wr && (!wr || (int'(ret_rd) == rd && ret_value == val)),
              $sformatf("retire pc %h: rd %0d=%h, model we=%0d rd %0d=%h", ret_pc, ret_rd, ret_value, wr, rd, val));
        if (kind == 2) iss_halted = 1;
      end else begin
        check(kind == 1 && dut.rob_head.pc == rpc,
              $sformatf("page-fault flush at %h, model %h kind %0d", dut.rob_head.pc, rpc, kind));
      end
    end
  end

  // ------------------------------------------------------------ program running
  task automatic load_and_reset();
    rst_n = 1'b0; irq = 1'b0; page_we = 0; dbg_reg = '0;
    imem_we = 1; dmem_we = 1;
    for (int i = 0; i < 256; i++) begin
      imem_addr = word_t'(i * 4); imem_wdata = prog[i];
      dmem_addr = word_t'(i * 4); dmem_wdata = data[i];
      @(posedge clk); #1;
    end
    imem_we = 0; dmem_we = 0;
    page_we = 1;
    for (int p = 0; p < 16; p++) begin
      dmem_addr = word_t'(p * 64); page_present = pres[p];
      @(posedge clk); #1;
    end
    page_we = 0;
    rst_n = 1'b1; #1;
    for (int i = 0; i < 16; i++) begin r[i] = 0; mp[i] = pres[i]; end
    for (int i = 0; i < 256; i++) m[i] = data[i];
    pc = 0; m_epc = 0; m_bad = 0; inh = 0; iss_halted = 0;
  endtask

  task automatic final_compare(string name);
    check(halted && iss_halted, {name, ": core and model both halted"});
    for (int i = 0; i < 16; i++)
      check(dut.u_rf.regs_q[i] == r[i], $sformatf("%s: r%0d = %h, model %h", name, i, dut.u_rf.regs_q[i], r[i]));
    for (int i = 0; i < 256; i++) begin
      dmem_addr = word_t'(i * 4); #1;
      check(dmem_rdata == m[i], $sformatf("%s: mem[%h] = %h, model %h", name, i * 4, dmem_rdata, m[i]));
    end
  endtask

  task automatic run_until_halt(int max_cycles);
    int n = 0;
    track = 1;
    while (!halted && n < max_cycles) begin @(posedge clk); n++; end
    @(posedge clk); #1;
    track = 0;
  endtask

  task automatic clear_images();
    for (int i = 0; i < 256; i++) begin prog[i] = '0; data[i] = '0; end
    for (int p = 0; p < 16; p++) pres[p] = 1;
    prog[PF_V/4]       = enc(OP_PMAP, 0, 0, 0, 0);
    prog[PF_V/4 + 1]   = enc(OP_IRET, 0, 0, 0, 0);
    prog[TRAP_V/4]     = enc(OP_ADDI, 14, 14, 0, 1);
    prog[TRAP_V/4 + 1] = enc(OP_IRET, 0, 0, 0, 0);
    prog[IRQ_V/4]      = enc(OP_ADDI, 13, 13, 0, 1);
    prog[IRQ_V/4 + 1]  = enc(OP_IRET, 0, 0, 0, 0);
  endtask

  // f0 = r8, f1 = r9, f2 = r10, r1 = r1
  task automatic example_program(int st_off);
    clear_images();
    prog[0]  = enc(OP_ADDI, 8, 0, 0, 3);      // f0 = 3
    prog[1]  = enc(OP_ADDI, 1, 0, 0, 'h40);   // r1 = 0x40
    prog[2]  = enc(OP_TRAP, 0, 0, 0, 0);      // drain: loop starts on an empty machine
    prog[3]  = enc(OP_LDF,  9, 1, 0, 0);      // 1 f1 = ldf (r1)
    prog[4]  = enc(OP_MULF, 10, 8, 9, 0);     // 2 f2 = mulf f0, f1
    prog[5]  = enc(OP_STF,  0, 1, 10, st_off);// 3 stf f2, (r1)
    prog[6]  = enc(OP_ADDI, 1, 1, 0, 4);      // 4 r1 = addi r1, 4
    prog[7]  = enc(OP_LDF,  9, 1, 0, 0);      // 5 f1 = ldf (r1)
    prog[8]  = enc(OP_MULF, 10, 8, 9, 0);     // 6 f2 = mulf f0, f1
    prog[9]  = enc(OP_STF,  0, 1, 10, st_off);// 7 stf f2, (r1)
    prog[10] = enc(OP_HALT, 0, 0, 0, 0);
    data['h40/4] = 5;
    data['h44/4] = 7;
  endtask

  // dispatch / retire cycle of the seven loop instructions
  int d_cyc [1:7], r_cyc [1:7], x5_cyc;
  always @(posedge clk) if (rst_n && track) begin
    if (dut.u_ld.x_q.valid && dut.u_ld.x_q.pc == 28) x5_cyc = cycle;
    if (dut.disp_ok && dut.fd_pc >= 12 && dut.fd_pc <= 36)
      d_cyc[(dut.fd_pc - 8) / 4] = cycle;   // the last dispatch is the one that retires
    if (ret_valid && ret_pc >= 12 && ret_pc <= 36) r_cyc[(ret_pc - 8) / 4] = cycle;
  end

  // precise-state snapshot at the page fault of program 2
  bit   pf_seen;
  tag_t pf_tag;
  always @(posedge clk) if (rst_n && track && flush && !ret_valid && !irq_ack && !pf_seen &&
                           dut.rob_head.exc == EXC_PAGE_FAULT) begin
    pf_seen = 1;
    check(dut.rob_head.pc == 32'd20, "page fault taken at the first stf");
    check(dut.u_rf.regs_q[1] == 32'h40, "precise: r1 not yet incremented at the fault");
    check(dut.u_rf.regs_q[9] == 32'd5 && dut.u_rf.regs_q[10] == 32'd15,
          "precise: f1, f2 hold the values of insns 1 and 2");
    pf_tag = dut.rob_head_tag;
    check(dut.u_rob.rob_q[tag_next(pf_tag)].done && dut.u_rob.rob_q[tag_next(pf_tag)].op == OP_ADDI,
          "addi had completed (out of order) before the fault");
    fork begin
      @(posedge clk); #1;
      check(dut.rs_busy == '0, "flush: all reservation stations free");
      check(dut.u_rob.count_q == 0 && dut.u_rob.head_q == pf_tag && dut.u_rob.tail_q == pf_tag,
            "flush: ROB empty, head = tail = the faulting stf's entry");
      for (int i = 0; i < 16; i++) check(dut.u_map.tag_q[i] == 0, "flush: Map Table cleared");
    end join_none
  end

  // ------------------------------------------------------------ random programs
  task automatic random_program(int n);
    int k, op, b, halt_at;
    clear_images();
    prog[0] = enc(OP_ADDI, 1, 0, 0, 'h000);
    prog[1] = enc(OP_ADDI, 2, 0, 0, 'h100);
    prog[2] = enc(OP_ADDI, 3, 0, 0, 'h300);
    for (int i = 4; i <= 12; i++) prog[i - 1] = enc(OP_ADDI, i, 0, 0, $urandom_range(0, 7));
    halt_at = 12 + n;
    for (int i = 12; i < halt_at; i++) begin
      op = $urandom_range(0, 99);
      b  = $urandom_range(1, 3);
      if      (op < 15) prog[i] = enc(OP_ADD,  $urandom_range(4, 12), $urandom_range(1, 12), $urandom_range(4, 12), 0);
      else if (op < 25) prog[i] = enc(OP_ADDI, $urandom_range(4, 12), $urandom_range(4, 12), 0, $urandom_range(0, 9));
      else if (op < 30) prog[i] = enc(OP_SUB,  $urandom_range(4, 12), $urandom_range(4, 12), $urandom_range(4, 12), 0);
      else if (op < 45) prog[i] = enc(OP_MULF, $urandom_range(4, 12), $urandom_range(4, 12), $urandom_range(4, 12), 0);
      else if (op < 62) prog[i] = enc(OP_LDF,  $urandom_range(4, 12), b, 0, 4 * $urandom_range(0, 7));
      else if (op < 80) prog[i] = enc(OP_STF,  0, b, $urandom_range(4, 12), 4 * $urandom_range(0, 7));
      else if (op < 88) prog[i] = enc(OP_BEQ,  0, $urandom_range(4, 12), $urandom_range(4, 12), 4 * $urandom_range(2, 5));
      else if (op < 95) prog[i] = enc(OP_BNE,  0, $urandom_range(4, 12), $urandom_range(4, 12), 4 * $urandom_range(2, 5));
      else if (op < 97) prog[i] = enc(OP_TRAP, 0, 0, 0, 0);
      else              prog[i] = enc(OP_NOP,  0, 0, 0, 0);
    end
    for (int i = halt_at; i < halt_at + 6; i++) prog[i] = enc(OP_HALT, 0, 0, 0, 0);
    for (int i = 0; i < 256; i++) data[i] = $urandom_range(0, 255);
    pres[0]  = 1'($urandom_range(0, 1));
    pres[4]  = 1'($urandom_range(0, 1));
    pres[12] = 1'($urandom_range(0, 1));
  endtask

  bit irq_enable = 0;
  always @(posedge clk) begin
    if (!rst_n || !irq_enable) irq <= 1'b0;
    else if (irq_ack) irq <= 1'b0;
    else if (!irq && $urandom_range(0, 39) == 0) irq <= 1'b1;
  end

  initial begin
    // 1. the worked example
    example_program(0);
    for (int i = 1; i <= 7; i++) begin d_cyc[i] = 0; r_cyc[i] = 0; end
    load_and_reset();
    run_until_halt(2000);
    final_compare("example");
    check(m['h40/4] == 15 && m['h44/4] == 21 && r[1] == 'h44, "example: model result");
    begin
      int c0;
      c0 = d_cyc[1] - 1;                 // ldf dispatch is cycle 1
      $display("example D: %0d %0d %0d %0d %0d %0d %0d", d_cyc[1]-c0, d_cyc[2]-c0, d_cyc[3]-c0,
               d_cyc[4]-c0, d_cyc[5]-c0, d_cyc[6]-c0, d_cyc[7]-c0);
      $display("example R: %0d %0d %0d %0d %0d %0d %0d", r_cyc[1]-c0, r_cyc[2]-c0, r_cyc[3]-c0,
               r_cyc[4]-c0, r_cyc[5]-c0, r_cyc[6]-c0, r_cyc[7]-c0);
      check(d_cyc[2]-c0 == 2 && d_cyc[3]-c0 == 3 && d_cyc[4]-c0 == 4 && d_cyc[5]-c0 == 5 &&
            d_cyc[6]-c0 == 6, "example: insns 2-6 dispatch in cycles 2-6");
      check(d_cyc[7]-c0 == 9, "example: stf #7 waits for the ST station until cycle 9");
      check(r_cyc[1]-c0 == 5, "example: ldf retires in cycle 5");
      check(r_cyc[2]-c0 == 9, "example: mulf retires in cycle 9");
      check(r_cyc[3]-c0 == 11, "example: stf retires in cycle 11");
      check(r_cyc[4]-c0 == 12, "example: addi retires in cycle 12 (in order)");
      check(x5_cyc-c0 == 8, "example: second ldf executes in cycle 8, ahead of the older stf");
      check(r_cyc[5]-c0 == 13 && r_cyc[6]-c0 == 14 && r_cyc[7]-c0 == 16,
            "example: second iteration retires in cycles 13, 14, 16");
    end

    // 2. the example with a page fault in the first stf
    example_program('h40);
    pres[2] = 0;                          // 0x80..0xBF not present
    pf_seen = 0;
    load_and_reset();
    run_until_halt(2000);
    final_compare("page fault");
    check(pf_seen, "page fault: fault was taken");
    check(m['h80/4] == 15 && m['h84/4] == 21, "page fault: model result");

    // 2b. the loop with its stores moved up one word: the first stf writes the
    // word the second ldf has already read, so that load must be replayed
    begin
      int r0;
      example_program('h4);
      r0 = n_replay;
      load_and_reset();
      run_until_halt(2000);
      final_compare("replay");
      check(n_replay == r0 + 1, "replay: the second ldf was replayed once");
      check(m['h44/4] == 15 && m['h48/4] == 45 && dut.u_rf.regs_q[9] == 15,
            "replay: the second ldf saw the first stf's data");
    end

    // 3. random programs
    irq_enable = 1;
    for (int t = 0; t < 40; t++) begin
      random_program(100);
      load_and_reset();
      run_until_halt(20000);
      final_compare($sformatf("random %0d", t));
    end
    irq_enable = 0;

    $display("mechanisms: rob_full=%0d rs_full=%0d cdb_conflict=%0d src_rob=%0d src_cdb=%0d rs_capture=%0d",
             n_rob_full, n_rs_full, n_cdb_conflict, n_src_rob, n_src_cdb, n_rs_capture);
    $display("            retire_stall=%0d forward=%0d replay=%0d page_fault=%0d trap=%0d iret=%0d",
             n_retire_stall, n_forward, n_replay, n_pf, n_trap, n_iret);
    $display("            mispredict=%0d irq=%0d halt=%0d retired=%0d",
             n_mispredict, n_irq, n_halt, n_retired);
    check(n_rob_full > 0, "mechanism: ROB full stall");
    check(n_rs_full > 0, "mechanism: RS full stall");
    check(n_cdb_conflict > 0, "mechanism: CDB conflict");
    check(n_src_rob > 0, "mechanism: operand read from ROB (T+)");
    check(n_src_cdb > 0, "mechanism: operand taken from CDB at dispatch");
    check(n_rs_capture > 0, "mechanism: RS captures CDB value");
    check(n_retire_stall > 0, "mechanism: retire stall");
    check(n_forward > 0, "mechanism: store-to-load forwarding");
    check(n_replay > 0, "mechanism: load replay after an older store to the same word");
    check(n_pf > 0, "mechanism: page fault");
    check(n_trap > 0, "mechanism: trap");
    check(n_iret > 0, "mechanism: iret");
    check(n_mispredict > 0, "mechanism: branch mispredict recovery");
    check(n_irq > 0, "mechanism: interrupt");
    check(n_halt > 0, "mechanism: halt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
