// p6_core: P6-style out-of-order core with precise state recovery (top).
//
// Pipeline F, D, S, X, C, R, one instruction per cycle in D and in R:
//   F  p6_fetch reads the instruction memory into the F/D latch.
//   D  dispatch: if the ROB or the needed reservation station is full, stall.
//      Otherwise allocate the ROB tail entry and the RS, give the RS the ROB
//      tag, point the destination's Map Table entry at the tag (plus bit
//      cleared) and read each source: Map tag 0 -> register file, tag with
//      plus -> ROB value, tag broadcast on the CDB this cycle -> CDB value,
//      otherwise the tag goes into T1/T2.
//   S  a reservation station whose operands are present issues to its unit;
//      the RS is free from the next cycle.
//   X  ALU (1 cycle), LD (1), ST (1), FP1/FP2 multiply (3).
//   C  one result per cycle on the CDB: written into the ROB, captured by
//      waiting RS, and sets the plus bit of Map entries still holding the tag.
//      Stores complete through their own port and do not use the CDB.
//   R  if the ROB head is complete, write its value to the register file (or
//      its store to data memory), clear its Map entry if it still holds the
//      tag, and free the entry.  A head that is not complete stalls retire.
// Precise state: register file and data memory change only at R.  An event
// at the head is handled by emptying ROB, reservation stations, Map Table,
// functional units and the F/D latch in one cycle ("zero means empty / in the
// register file") and restarting fetch:
//   page fault        before the instruction: it does not retire, the saved
//                     PC (epc) is its own PC, fetch goes to PF_VECTOR
//   trap              after: it retires, epc = pc + 4, fetch to TRAP_VECTOR
//   iret              after: fetch restarts at epc
//   taken branch      after: fetch restarts at the branch target
//                     (fetch predicts not-taken)
//   interrupt (irq_i) taken at the head before it retires, epc = its PC,
//                     fetch to IRQ_VECTOR
// Entering any handler masks irq_i until the handler's iret retires.  A page
// fault also records the faulting address; pmap, at retire, marks that page
// present, so a fault handler can be "pmap; iret".
//   halt              after: fetching stops
//   load replay       before: a load that ran ahead of an older store to the
//                     same word is re-fetched from its own PC
// The structure (ROB with head/tail, RS with T/T1/T2/V1/V2, Map Table T+, one
// CDB, five RS ALU/LD/ST/FP1/FP2, 7 ROB entries, clearing everything at the
// head) and the cycle timing of the slides' example follow the P6
// description; the ISA, vectors, interrupt masking, paging, store-to-load
// forwarding and load replay are this design's own choices.
// The ext/dbg ports let the environment load programs and data, set page
// present bits and read registers; they are not part of the pipeline.
module p6_core
  import p6_pkg::*;
#(
  parameter int unsigned IMEM_WORDS  = 256,
  parameter int unsigned DMEM_WORDS  = 256,
  parameter int unsigned PAGE_BYTES  = 64,
  parameter int unsigned MUL_LATENCY = 3,
  parameter word_t       RESET_PC    = 32'h0000_0000,
  parameter word_t       PF_VECTOR   = 32'h0000_0200,
  parameter word_t       TRAP_VECTOR = 32'h0000_0280,
  parameter word_t       IRQ_VECTOR  = 32'h0000_0300
) (
  input  logic  clk_i,
  input  logic  rst_ni,
  input  logic  irq_i,
  output logic  irq_ack_o,
  // program and data loading, page table, register observation
  input  logic  imem_we_i,
  input  word_t imem_addr_i,
  input  word_t imem_wdata_i,
  input  logic  dmem_we_i,
  input  word_t dmem_addr_i,
  input  word_t dmem_wdata_i,
  output word_t dmem_rdata_o,
  input  logic  page_we_i,
  input  logic  page_present_i,
  input  reg_t  dbg_reg_i,
  output word_t dbg_reg_value_o,
  // retire trace
  output logic  ret_valid_o,
  output word_t ret_pc_o,
  output logic  ret_rd_we_o,
  output reg_t  ret_rd_o,
  output word_t ret_value_o,
  output logic  flush_o,
  output word_t epc_o,
  output logic  halted_o
);

  localparam int unsigned RS_ALU = 0, RS_LD = 1, RS_ST = 2, RS_FP1 = 3, RS_FP2 = 4;
  localparam int unsigned NUM_RS = 5;

  // ---------------------------------------------------------------- F
  logic  fetch_stall, redirect, halted_q;
  word_t redirect_pc, imem_addr, imem_data;
  logic  fd_valid;
  word_t fd_pc, fd_instr;

  p6_imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk_i, .raddr_i(imem_addr), .rdata_o(imem_data),
    .we_i(imem_we_i), .waddr_i(imem_addr_i), .wdata_i(imem_wdata_i)
  );

  p6_fetch #(.RESET_PC(RESET_PC)) u_fetch (
    .clk_i, .rst_ni, .stall_i(fetch_stall), .halt_i(halted_q),
    .redirect_i(redirect), .redirect_pc_i(redirect_pc),
    .imem_addr_o(imem_addr), .imem_data_i(imem_data),
    .fd_valid_o(fd_valid), .fd_pc_o(fd_pc), .fd_instr_o(fd_instr)
  );

  // ---------------------------------------------------------------- D
  decoded_t dec;
  p6_decode u_dec (.valid_i(fd_valid && !halted_q), .instr_i(fd_instr), .dec_o(dec));

  logic       flush;
  cdb_t       cdb;
  st_cmpl_t   st_cmpl;
  tag_t       rob_tail, rob_head_tag;
  logic       rob_full, rob_empty, rob_alloc, rob_retire;
  rob_entry_t rob_head, alloc_entry;
  tag_t       m1_tag, m2_tag;
  logic       m1_plus, m2_plus;
  word_t      rf1, rf2, rob1, rob2;
  tag_t       fwd_tag;
  logic       fwd_hit;
  word_t      fwd_data;

  logic [NUM_RS-1:0] rs_busy, rs_ready, rs_issue, rs_alloc, fu_ready;
  tag_t              rs_tag [NUM_RS];
  issue_t            rs_iss [NUM_RS];

  localparam int unsigned C_LD = 0, C_FP1 = 1, C_FP2 = 2, C_ALU = 3;
  cdb_t       cdb_req [4];
  logic [3:0] cdb_gnt;
  word_t      ld_addr, ld_rdata, st_chk_addr;
  logic       ld_present, st_present;

  logic  disp_ok, rs_avail;
  int unsigned rs_pick;
  tag_t  op1_tag, op2_tag;
  word_t op1_val, op2_val;

  // Source operand read (Map Table -> Regfile / ROB / CDB / tag).
  function automatic void read_src(input logic use_i, input tag_t t, input logic plus,
                                   input word_t rf, input word_t robv, input cdb_t c,
                                   output tag_t ot, output word_t ov);
    ot = '0;
    ov = '0;
    if (use_i) begin
      if (t == '0)                     ov = rf;
      else if (plus)                   ov = robv;
      else if (c.valid && c.tag == t)  ov = c.value;
      else                             ot = t;
    end
  endfunction

  always_comb begin
    read_src(dec.use1, m1_tag, m1_plus, rf1, rob1, cdb, op1_tag, op1_val);
    read_src(dec.use2, m2_tag, m2_plus, rf2, rob2, cdb, op2_tag, op2_val);
  end

  always_comb begin
    rs_pick  = RS_ALU;
    rs_avail = 1'b1;
    unique case (dec.fu)
      FU_ALU: begin rs_pick = RS_ALU; rs_avail = !rs_busy[RS_ALU]; end
      FU_LD:  begin rs_pick = RS_LD;  rs_avail = !rs_busy[RS_LD];  end
      FU_ST:  begin rs_pick = RS_ST;  rs_avail = !rs_busy[RS_ST];  end
      FU_FP: begin
        rs_pick  = rs_busy[RS_FP1] ? RS_FP2 : RS_FP1;
        rs_avail = !rs_busy[RS_FP1] || !rs_busy[RS_FP2];
      end
      default: rs_avail = 1'b1;
    endcase
  end

  assign disp_ok     = dec.valid && !rob_full && rs_avail && !flush;
  assign fetch_stall = fd_valid && !disp_ok;
  assign rob_alloc   = disp_ok;

  always_comb begin
    rs_alloc = '0;
    if (disp_ok && dec.fu != FU_NONE) rs_alloc[rs_pick] = 1'b1;
  end

  always_comb begin
    alloc_entry          = '0;
    alloc_entry.valid    = 1'b1;
    alloc_entry.pc       = fd_pc;
    alloc_entry.op       = dec.op;
    alloc_entry.has_dest = dec.has_dest;
    alloc_entry.rd       = dec.rd;
    alloc_entry.done     = (dec.fu == FU_NONE);
    unique case (dec.op)
      OP_TRAP: alloc_entry.exc = EXC_TRAP;
      OP_IRET: alloc_entry.exc = EXC_IRET;
      OP_HALT: alloc_entry.exc = EXC_HALT;
      default: alloc_entry.exc = EXC_NONE;
    endcase
  end

  // ---------------------------------------------------------------- state
  p6_map_table u_map (
    .clk_i, .rst_ni, .flush_i(flush),
    .disp_we_i(disp_ok && dec.has_dest), .disp_rd_i(dec.rd), .disp_tag_i(rob_tail),
    .rs1_i(dec.src1), .rs1_tag_o(m1_tag), .rs1_plus_o(m1_plus),
    .rs2_i(dec.src2), .rs2_tag_o(m2_tag), .rs2_plus_o(m2_plus),
    .cdb_valid_i(cdb.valid), .cdb_tag_i(cdb.tag),
    .ret_we_i(rob_retire && rob_head.has_dest), .ret_rd_i(rob_head.rd), .ret_tag_i(rob_head_tag)
  );

  p6_regfile u_rf (
    .clk_i, .rst_ni,
    .we_i(rob_retire && rob_head.has_dest), .waddr_i(rob_head.rd), .wdata_i(rob_head.value),
    .raddr1_i(dec.src1), .rdata1_o(rf1),
    .raddr2_i(dec.src2), .rdata2_o(rf2),
    .raddr3_i(dbg_reg_i), .rdata3_o(dbg_reg_value_o)
  );

  p6_rob u_rob (
    .clk_i, .rst_ni, .flush_i(flush),
    .alloc_i(rob_alloc), .alloc_entry_i(alloc_entry), .tail_o(rob_tail),
    .full_o(rob_full), .empty_o(rob_empty),
    .rd1_tag_i(m1_tag), .rd1_value_o(rob1), .rd2_tag_i(m2_tag), .rd2_value_o(rob2),
    .cdb_i(cdb), .st_i(st_cmpl),
    .head_o(rob_head), .head_tag_o(rob_head_tag), .retire_i(rob_retire),
    .fwd_tag_i(fwd_tag), .fwd_addr_i(ld_addr), .fwd_hit_o(fwd_hit), .fwd_data_o(fwd_data)
  );

  // ---------------------------------------------------------------- RS + S
  for (genvar i = 0; i < NUM_RS; i++) begin : g_rs
    p6_rs_entry u_rs (
      .clk_i, .rst_ni, .flush_i(flush),
      .alloc_i(rs_alloc[i]), .alloc_op_i(dec.op), .alloc_tag_i(rob_tail),
      .alloc_t1_i(op1_tag), .alloc_v1_i(op1_val),
      .alloc_t2_i(op2_tag), .alloc_v2_i(op2_val),
      .alloc_imm_i(dec.imm), .alloc_pc_i(fd_pc),
      .cdb_i(cdb), .busy_o(rs_busy[i]), .tag_o(rs_tag[i]), .ready_o(rs_ready[i]),
      .issue_i(rs_issue[i]), .issue_o(rs_iss[i])
    );
  end

  always_comb begin
    for (int i = 0; i < NUM_RS; i++) rs_issue[i] = rs_ready[i] && fu_ready[i];
  end

  function automatic issue_t gate(issue_t b, logic go);
    issue_t r;
    r       = b;
    r.valid = go;
    return r;
  endfunction

  // ---------------------------------------------------------------- X + C

  p6_alu u_alu (
    .clk_i, .rst_ni, .flush_i(flush),
    .issue_i(gate(rs_iss[RS_ALU], rs_issue[RS_ALU])), .ready_o(fu_ready[RS_ALU]),
    .req_o(cdb_req[C_ALU]), .grant_i(cdb_gnt[C_ALU])
  );

  p6_load_unit u_ld (
    .clk_i, .rst_ni, .flush_i(flush),
    .issue_i(gate(rs_iss[RS_LD], rs_issue[RS_LD])), .ready_o(fu_ready[RS_LD]),
    .req_o(cdb_req[C_LD]), .grant_i(cdb_gnt[C_LD]),
    .st_i(st_cmpl), .head_tag_i(rob_head_tag),
    .mem_addr_o(ld_addr), .mem_rdata_i(ld_rdata), .mem_present_i(ld_present),
    .fwd_tag_o(fwd_tag), .fwd_hit_i(fwd_hit), .fwd_data_i(fwd_data)
  );

  p6_store_unit u_st (
    .clk_i, .rst_ni, .flush_i(flush),
    .issue_i(gate(rs_iss[RS_ST], rs_issue[RS_ST])), .ready_o(fu_ready[RS_ST]),
    .cmpl_o(st_cmpl), .chk_addr_o(st_chk_addr), .chk_present_i(st_present)
  );

  p6_mul #(.LATENCY(MUL_LATENCY)) u_fp1 (
    .clk_i, .rst_ni, .flush_i(flush),
    .issue_i(gate(rs_iss[RS_FP1], rs_issue[RS_FP1])), .ready_o(fu_ready[RS_FP1]),
    .req_o(cdb_req[C_FP1]), .grant_i(cdb_gnt[C_FP1])
  );

  p6_mul #(.LATENCY(MUL_LATENCY)) u_fp2 (
    .clk_i, .rst_ni, .flush_i(flush),
    .issue_i(gate(rs_iss[RS_FP2], rs_issue[RS_FP2])), .ready_o(fu_ready[RS_FP2]),
    .req_o(cdb_req[C_FP2]), .grant_i(cdb_gnt[C_FP2])
  );

  p6_cdb_arbiter #(.N(4)) u_cdb (.req_i(cdb_req), .grant_o(cdb_gnt), .cdb_o(cdb));

  // ---------------------------------------------------------------- R
  logic  take_irq, in_handler_q;
  word_t epc_q, badaddr_q;
  logic  mem_we, pmap;

  p6_dmem #(.WORDS(DMEM_WORDS), .PAGE_BYTES(PAGE_BYTES)) u_dmem (
    .clk_i, .rst_ni,
    .ld_addr_i(ld_addr), .ld_rdata_o(ld_rdata), .ld_present_o(ld_present),
    .st_addr_i(st_chk_addr), .st_present_o(st_present),
    .we_i(mem_we), .waddr_i(rob_head.addr), .wdata_i(rob_head.value),
    .map_i(pmap), .map_addr_i(badaddr_q),
    .ext_we_i(dmem_we_i), .ext_addr_i(dmem_addr_i), .ext_wdata_i(dmem_wdata_i),
    .ext_rdata_o(dmem_rdata_o), .ext_page_we_i(page_we_i), .ext_page_present_i(page_present_i)
  );

  always_comb begin
    take_irq    = 1'b0;
    rob_retire  = 1'b0;
    flush       = 1'b0;
    redirect    = 1'b0;
    redirect_pc = '0;
    if (rob_head.valid && irq_i && !in_handler_q) begin
      take_irq    = 1'b1;
      flush       = 1'b1;
      redirect    = 1'b1;
      redirect_pc = IRQ_VECTOR;
    end else if (rob_head.valid && rob_head.done) begin
      if (rob_head.exc == EXC_PAGE_FAULT) begin
        flush       = 1'b1;
        redirect    = 1'b1;
        redirect_pc = PF_VECTOR;
      end else if (rob_head.exc == EXC_REPLAY) begin
        flush       = 1'b1;
        redirect    = 1'b1;
        redirect_pc = rob_head.pc;
      end else begin
        rob_retire = 1'b1;
        unique case (rob_head.exc)
          EXC_TRAP:       begin flush = 1'b1; redirect = 1'b1; redirect_pc = TRAP_VECTOR; end
          EXC_IRET:       begin flush = 1'b1; redirect = 1'b1; redirect_pc = epc_q; end
          EXC_MISPREDICT: begin flush = 1'b1; redirect = 1'b1; redirect_pc = rob_head.target; end
          EXC_HALT:       flush = 1'b1;
          default: ;
        endcase
      end
    end
  end

  assign mem_we = rob_retire && rob_head.op == OP_STF;
  assign pmap   = rob_retire && rob_head.op == OP_PMAP;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      epc_q        <= '0;
      badaddr_q    <= '0;
      in_handler_q <= 1'b0;
      halted_q     <= 1'b0;
    end else begin
      if (take_irq) begin
        epc_q        <= rob_head.pc;
        in_handler_q <= 1'b1;
      end else if (flush && !rob_retire && rob_head.exc == EXC_PAGE_FAULT) begin
        epc_q        <= rob_head.pc;
        badaddr_q    <= rob_head.addr;
        in_handler_q <= 1'b1;
      end else if (rob_retire && rob_head.exc == EXC_TRAP) begin
        epc_q        <= rob_head.pc + 32'd4;
        in_handler_q <= 1'b1;
      end else if (rob_retire && rob_head.exc == EXC_IRET) begin
        in_handler_q <= 1'b0;
      end
      if (rob_retire && rob_head.exc == EXC_HALT) halted_q <= 1'b1;
    end
  end

  assign irq_ack_o   = take_irq;
  assign ret_valid_o = rob_retire;
  assign ret_pc_o    = rob_head.pc;
  assign ret_rd_we_o = rob_retire && rob_head.has_dest;
  assign ret_rd_o    = rob_head.rd;
  assign ret_value_o = rob_head.value;
  assign flush_o     = flush;
  assign epc_o       = epc_q;
  assign halted_o    = halted_q;

endmodule
