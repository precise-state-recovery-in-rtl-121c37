// p6_rob: re-order buffer.
//
// A circular buffer of ROB_ENTRIES entries, addressed by tags 1..ROB_ENTRIES
// (tag 0 is never an entry: it means "in the register file").  Instructions
// are allocated at the tail in program order at dispatch, are marked complete
// out of order when their result arrives (from the CDB, or from the store
// unit's own completion port), and leave at the head in program order at
// retire.  Because the register file and data memory are only written from
// the head, the state in front of the head is always precise.
//
// Ports and timing:
//   alloc_i      write alloc_entry_i at the tail (tail_o is its tag) at the edge;
//                only when full_o is low.  An entry may be allocated complete.
//   cdb_i        sets done/value/exc/target of entry cdb_i.tag at the edge
//   st_i         sets done/addr/value(data)/exc of a store entry at the edge
//   rd1/rd2      combinational value read for dispatch ("ready-in-ROB" values)
//   head_o       the entry at the head, head_tag_o its tag
//   retire_i     removes the head at the edge (caller checks head done)
//   flush_i      empties the buffer; the tail is set to the head (or to the
//                entry after it when retire_i is high in the same cycle), so
//                the next instruction reuses the entry of the first aborted
//                one, as in the slides' page-fault example
//   fwd_*        store-to-load forwarding: the youngest completed older store
//                to the same word supplies the load's data
//   replay       when a store completes, every younger load that already has
//                its value (complete, or completing on the CDB this cycle) and
//                read the same word is marked EXC_REPLAY: it may have missed
//                the store's data and is re-executed from the head
// Head/tail pointers follow the slides; forwarding and replay marking are
// this design's own, needed because stores only write memory at retire while
// loads run ahead of older stores, as the second ldf does in the example.
module p6_rob
  import p6_pkg::*;
(
  input  logic       clk_i,
  input  logic       rst_ni,
  input  logic       flush_i,
  // dispatch
  input  logic       alloc_i,
  input  rob_entry_t alloc_entry_i,
  output tag_t       tail_o,
  output logic       full_o,
  output logic       empty_o,
  input  tag_t       rd1_tag_i,
  output word_t      rd1_value_o,
  input  tag_t       rd2_tag_i,
  output word_t      rd2_value_o,
  // complete
  input  cdb_t       cdb_i,
  input  st_cmpl_t   st_i,
  // retire
  output rob_entry_t head_o,
  output tag_t       head_tag_o,
  input  logic       retire_i,
  // memory ordering
  input  tag_t       fwd_tag_i,
  input  word_t      fwd_addr_i,
  output logic       fwd_hit_o,
  output word_t      fwd_data_o
);

  localparam int unsigned CNT_W = $clog2(ROB_ENTRIES + 1);

  rob_entry_t            rob_q [1:ROB_ENTRIES];
  tag_t                  head_q, tail_q;
  logic [CNT_W-1:0]      count_q;

  assign tail_o     = tail_q;
  assign head_tag_o = head_q;
  assign full_o     = (count_q == CNT_W'(ROB_ENTRIES));
  assign empty_o    = (count_q == '0);
  assign head_o     = rob_q[head_q];

  assign rd1_value_o = (rd1_tag_i != '0) ? rob_q[rd1_tag_i].value : '0;
  assign rd2_value_o = (rd2_tag_i != '0) ? rob_q[rd2_tag_i].value : '0;

  tag_t head_after_retire;
  assign head_after_retire = retire_i ? tag_next(head_q) : head_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      head_q  <= tag_t'(1);
      tail_q  <= tag_t'(1);
      count_q <= '0;
      for (int i = 1; i <= ROB_ENTRIES; i++) rob_q[i] <= '0;
    end else if (flush_i) begin
      head_q  <= head_after_retire;
      tail_q  <= head_after_retire;
      count_q <= '0;
      for (int i = 1; i <= ROB_ENTRIES; i++) begin
        rob_q[i].valid <= 1'b0;
        rob_q[i].done  <= 1'b0;
      end
    end else begin
      if (cdb_i.valid && cdb_i.tag != '0 && rob_q[cdb_i.tag].valid) begin
        rob_q[cdb_i.tag].done   <= 1'b1;
        rob_q[cdb_i.tag].value  <= cdb_i.value;
        rob_q[cdb_i.tag].exc    <= cdb_i.exc;
        rob_q[cdb_i.tag].target <= cdb_i.target;
        rob_q[cdb_i.tag].addr   <= cdb_i.addr;
      end
      if (st_i.valid && st_i.tag != '0 && rob_q[st_i.tag].valid) begin
        rob_q[st_i.tag].done  <= 1'b1;
        rob_q[st_i.tag].addr  <= st_i.addr;
        rob_q[st_i.tag].value <= st_i.data;
        rob_q[st_i.tag].exc   <= st_i.exc;
      end
      if (st_i.valid) begin
        for (int i = 1; i <= ROB_ENTRIES; i++) begin
          if (rob_q[i].valid && rob_q[i].op == OP_LDF &&
              tag_younger(tag_t'(i), st_i.tag, head_q)) begin
            if (rob_q[i].done && rob_q[i].addr[XLEN-1:2] == st_i.addr[XLEN-1:2])
              rob_q[i].exc <= EXC_REPLAY;
            if (cdb_i.valid && cdb_i.tag == tag_t'(i) &&
                cdb_i.addr[XLEN-1:2] == st_i.addr[XLEN-1:2])
              rob_q[i].exc <= EXC_REPLAY;
          end
        end
      end
      if (retire_i) rob_q[head_q].valid <= 1'b0;
      if (alloc_i) begin
        rob_q[tail_q]       <= alloc_entry_i;
        rob_q[tail_q].valid <= 1'b1;
        tail_q              <= tag_next(tail_q);
      end
      head_q  <= head_after_retire;
      count_q <= count_q + CNT_W'(alloc_i) - CNT_W'(retire_i);
    end
  end

  // Forwarding: walk from the head towards the load.
  always_comb begin
    tag_t idx;
    logic stop_fwd;
    fwd_hit_o  = 1'b0;
    fwd_data_o = '0;
    idx        = head_q;
    stop_fwd   = 1'b0;
    for (int k = 0; k < ROB_ENTRIES; k++) begin
      if (idx == fwd_tag_i) stop_fwd = 1'b1;
      if (rob_q[idx].valid && rob_q[idx].op == OP_STF) begin
        if (!stop_fwd && rob_q[idx].done &&
            rob_q[idx].addr[XLEN-1:2] == fwd_addr_i[XLEN-1:2]) begin
          fwd_hit_o  = 1'b1;              // later (younger) matches override
          fwd_data_o = rob_q[idx].value;
        end
      end
      idx = tag_next(idx);
    end
  end

  a_no_alloc_when_full: assert property (@(posedge clk_i) disable iff (!rst_ni)
    alloc_i && !flush_i |-> !full_o);
  a_retire_done: assert property (@(posedge clk_i) disable iff (!rst_ni)
    retire_i |-> head_o.valid && head_o.done);

endmodule
