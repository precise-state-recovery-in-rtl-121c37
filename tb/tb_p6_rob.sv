// tb_p6_rob: random allocation, out-of-order completion (CDB and store
// port), in-order retire and flushes, compared every cycle with a queue
// model: tail tag, full/empty, head entry, value reads, store-to-load
// forwarding (youngest older store wins) and replay marking of younger loads
// when a store to the same word completes.
// Also checks that flush sets head = tail at the first aborted entry.
module tb_p6_rob;
  import p6_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic flush, alloc, full, empty, retire, fwd_hit;
  rob_entry_t ae, head;
  tag_t tail, head_tag, rt1, rt2, ldq, ftag, t2;
  word_t rv1, rv2, faddr, fdata;
  cdb_t cdb;
  st_cmpl_t st;
  p6_rob dut (.clk_i(clk), .rst_ni(rst_n), .flush_i(flush), .alloc_i(alloc), .alloc_entry_i(ae),
    .tail_o(tail), .full_o(full), .empty_o(empty), .rd1_tag_i(rt1), .rd1_value_o(rv1),
    .rd2_tag_i(rt2), .rd2_value_o(rv2), .cdb_i(cdb), .st_i(st), .head_o(head),
    .head_tag_o(head_tag), .retire_i(retire),
    .fwd_tag_i(ftag), .fwd_addr_i(faddr), .fwd_hit_o(fwd_hit), .fwd_data_o(fdata));
  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  rob_entry_t m [1:ROB_ENTRIES];
  tag_t mh, mt;
  int   mc;
  int   n_full = 0, n_fwd = 0, n_replay = 0, n_flush = 0, n_ret = 0;

  function automatic tag_t nx(tag_t t);
    return (int'(t) == ROB_ENTRIES) ? tag_t'(1) : tag_t'(int'(t) + 1);
  endfunction
  // position of a tag counted from the model head
  function automatic int pos(tag_t t);
    int p;
    tag_t k;
    p = 0; k = mh;
    while (k != t) begin k = nx(k); p++; end
    return p;
  endfunction

  initial begin
    flush = 0; alloc = 0; retire = 0; ae = '0; cdb = '0; st = '0; rt1 = 0; rt2 = 0; ldq = 0; ftag = 0; faddr = 0;
    mh = 1; mt = 1; mc = 0;
    for (int i = 1; i <= ROB_ENTRIES; i++) m[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      tag_t t;
      bit e_hit;
      word_t e_data;
      @(negedge clk);
      // stimulus
      alloc = (mc < ROB_ENTRIES) && $urandom_range(0, 2) != 0;
      ae = '0;
      ae.pc = $urandom; ae.op = $urandom_range(0, 2) == 0 ? OP_STF : (($urandom_range(0, 1) != 0) ? OP_LDF : OP_ADD);
      ae.has_dest = ae.op != OP_STF; ae.rd = reg_t'($urandom);
      cdb = '0; st = '0;
      t  = tag_t'($urandom_range(1, ROB_ENTRIES));
      t2 = tag_t'($urandom_range(1, ROB_ENTRIES));
      if (m[t].valid && !m[t].done && m[t].op == OP_STF && ($urandom_range(0, 1) != 0)) begin
        st.valid = 1; st.tag = t; st.addr = 4 * $urandom_range(0, 3); st.data = $urandom;
      end
      if (m[t2].valid && !m[t2].done && m[t2].op != OP_STF && ($urandom_range(0, 1) != 0)) begin
        cdb.valid = 1; cdb.tag = t2; cdb.value = $urandom;
        cdb.addr = (m[t2].op == OP_LDF) ? 4 * $urandom_range(0, 3) : '0;
      end
      retire = mc > 0 && m[mh].done && ($urandom_range(0, 1) != 0);
      flush = $urandom_range(0, 60) == 0;
      rt1 = tag_t'($urandom_range(1, ROB_ENTRIES)); rt2 = tag_t'($urandom_range(1, ROB_ENTRIES));
      ldq = tag_t'($urandom_range(1, ROB_ENTRIES)); ftag = ldq; faddr = 4 * $urandom_range(0, 3);
      // expected combinational outputs
      e_hit = 0; e_data = 0;
      begin
        tag_t k;
        k = mh;
        for (int i = 0; i < mc; i++) begin
          if (k == ldq) break;
          if (m[k].op == OP_STF && m[k].done && m[k].addr[31:2] == faddr[31:2]) begin
            e_hit = 1; e_data = m[k].value;
          end
          k = nx(k);
        end
      end
      #1;
      chk(tail == mt && full == (mc == ROB_ENTRIES) && empty == (mc == 0) && head_tag == mh,
          $sformatf("pointers: tail %0d/%0d count %0d", tail, mt, mc));
      if (mc > 0) chk(head.valid && head.pc == m[mh].pc && head.done == m[mh].done &&
                      (!head.done || head.value == m[mh].value) && head.exc == m[mh].exc,
                      $sformatf("head entry %0d exc %0d/%0d", mh, head.exc, m[mh].exc));
      if (m[rt1].valid && m[rt1].done) chk(rv1 == m[rt1].value, "read port 1");
      if (m[rt2].valid && m[rt2].done) chk(rv2 == m[rt2].value, "read port 2");
      if (m[ldq].valid) begin
        chk(fwd_hit == e_hit && (!e_hit || fdata == e_data), "forwarding");
        if (e_hit) n_fwd++;
      end
      if (full) n_full++;
      @(posedge clk);
      // model update
      if (cdb.valid) begin
        m[cdb.tag].done = 1; m[cdb.tag].value = cdb.value; m[cdb.tag].addr = cdb.addr;
        m[cdb.tag].exc = cdb.exc;
      end
      if (st.valid) begin
        for (int i = 1; i <= ROB_ENTRIES; i++)
          if (m[i].valid && m[i].done && m[i].op == OP_LDF && pos(tag_t'(i)) > pos(st.tag) &&
              m[i].addr[31:2] == st.addr[31:2]) begin
            m[i].exc = EXC_REPLAY; n_replay++;
          end
        m[st.tag].done = 1; m[st.tag].value = st.data; m[st.tag].addr = st.addr;
      end
      if (flush) begin
        if (retire) mh = nx(mh);
        mt = mh; mc = 0; n_flush++;
        for (int i = 1; i <= ROB_ENTRIES; i++) m[i].valid = 0;
      end else begin
        if (retire) begin m[mh].valid = 0; mh = nx(mh); mc--; n_ret++; end
        if (alloc) begin m[mt] = ae; m[mt].valid = 1; mt = nx(mt); mc++; end
      end
    end
    chk(n_full > 0 && n_fwd > 0 && n_replay > 0 && n_flush > 0 && n_ret > 0,
        $sformatf("coverage full=%0d fwd=%0d replay=%0d flush=%0d ret=%0d", n_full, n_fwd, n_replay, n_flush, n_ret));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
