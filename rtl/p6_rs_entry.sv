// p6_rs_entry: one reservation station.
//
// Holds one dispatched instruction until its operands are available:
// busy, op, T (its own ROB tag, the tag its result will carry), T1/T2 (tags of
// operands still being produced, 0 when the value is present) and V1/V2.
// Every cycle it compares T1 and T2 with the CDB tag; on a match it copies the
// CDB value into V1/V2 and clears the tag.  The match is also forwarded to the
// ready/issue outputs in the same cycle, so an instruction can be selected
// (S) in the cycle its last operand is broadcast and execute (X) in the next,
// as mulf does in the slides' example (S in cycle 4, X from cycle 5).
// issue_o carries the instruction with both operand values; issue_i (from the
// core: ready_o, functional unit free, memory order safe) takes it, and the
// entry is free from the next cycle, so dispatch can refill it in the cycle
// the instruction executes (the "free -> re-allocate" of cycle 9).
// alloc_i loads a new instruction at the edge; flush_i empties the entry.
module p6_rs_entry
  import p6_pkg::*;
(
  input  logic    clk_i,
  input  logic    rst_ni,
  input  logic    flush_i,
  input  logic    alloc_i,
  input  opcode_e alloc_op_i,
  input  tag_t    alloc_tag_i,
  input  tag_t    alloc_t1_i,
  input  word_t   alloc_v1_i,
  input  tag_t    alloc_t2_i,
  input  word_t   alloc_v2_i,
  input  word_t   alloc_imm_i,
  input  word_t   alloc_pc_i,
  input  cdb_t    cdb_i,
  output logic    busy_o,
  output tag_t    tag_o,
  output logic    ready_o,
  input  logic    issue_i,
  output issue_t  issue_o
);

  logic    busy_q;
  opcode_e op_q;
  tag_t    t_q, t1_q, t2_q;
  word_t   v1_q, v2_q, imm_q, pc_q;

  logic hit1, hit2;
  assign hit1 = cdb_i.valid && t1_q != '0 && t1_q == cdb_i.tag;
  assign hit2 = cdb_i.valid && t2_q != '0 && t2_q == cdb_i.tag;

  assign busy_o  = busy_q;
  assign tag_o   = t_q;
  assign ready_o = busy_q && (t1_q == '0 || hit1) && (t2_q == '0 || hit2);

  always_comb begin
    issue_o       = '0;
    issue_o.valid = ready_o;
    issue_o.op    = op_q;
    issue_o.tag   = t_q;
    issue_o.v1    = hit1 ? cdb_i.value : v1_q;
    issue_o.v2    = hit2 ? cdb_i.value : v2_q;
    issue_o.imm   = imm_q;
    issue_o.pc    = pc_q;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      busy_q <= 1'b0;
      op_q   <= OP_NOP;
      t_q    <= '0;
      t1_q   <= '0;
      t2_q   <= '0;
      v1_q   <= '0;
      v2_q   <= '0;
      imm_q  <= '0;
      pc_q   <= '0;
    end else if (flush_i) begin
      busy_q <= 1'b0;
      t1_q   <= '0;
      t2_q   <= '0;
    end else if (alloc_i) begin
      busy_q <= 1'b1;
      op_q   <= alloc_op_i;
      t_q    <= alloc_tag_i;
      t1_q   <= alloc_t1_i;
      v1_q   <= alloc_v1_i;
      t2_q   <= alloc_t2_i;
      v2_q   <= alloc_v2_i;
      imm_q  <= alloc_imm_i;
      pc_q   <= alloc_pc_i;
    end else if (issue_i && ready_o) begin
      busy_q <= 1'b0;
    end else begin
      if (hit1) begin v1_q <= cdb_i.value; t1_q <= '0; end
      if (hit2) begin v2_q <= cdb_i.value; t2_q <= '0; end
    end
  end

  a_alloc_when_free: assert property (@(posedge clk_i) disable iff (!rst_ni)
    alloc_i && !flush_i |-> !busy_q);

endmodule
