// tb_p6_load_unit: a load reads the memory word at base + offset; a
// forwarding hit replaces it with the store data; an absent page gives a
// page fault; the result is on the CDB request two cycles after issue.  A
// store to the same word completing while the load is in X, or while its
// result waits in C for the bus, marks the load for replay if the store is
// older (ROB head fixed at tag 1, so a smaller tag is older).
module tb_p6_load_unit;
  import p6_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic flush = 0, ready, grant = 1, present, fwd_hit;
  issue_t iss;
  cdb_t req;
  word_t maddr, fwd_data;
  tag_t fwd_tag;
  st_cmpl_t st;
  word_t mem [64];
  p6_load_unit dut (.clk_i(clk), .rst_ni(rst_n), .flush_i(flush), .issue_i(iss), .ready_o(ready),
    .req_o(req), .grant_i(grant), .st_i(st), .head_tag_i(tag_t'(1)), .mem_addr_o(maddr), .mem_rdata_i(mem[maddr[7:2]]),
    .mem_present_i(present), .fwd_tag_o(fwd_tag), .fwd_hit_i(fwd_hit), .fwd_data_i(fwd_data));
  assign present  = maddr[7:6] != 2'd3;          // top quarter not present
  assign fwd_hit  = maddr[5:2] == 4'd9 && fwd_tag == 5;
  assign fwd_data = 32'hF00D;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  initial begin
    automatic int nf = 0, npf = 0, nrx = 0, nrc = 0;
    for (int i = 0; i < 64; i++) mem[i] = $urandom;
    iss = '0; st = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      word_t a;
      bit rx, rc, hold;
      @(negedge clk);
      iss = '0; iss.valid = 1; iss.op = OP_LDF; iss.tag = tag_t'($urandom_range(2, 7));
      iss.v2 = 4 * $urandom_range(0, 31); iss.imm = 4 * $urandom_range(0, 31);
      a = iss.v2 + iss.imm;
      @(negedge clk); iss.valid = 0;
      chk(!req.valid, "not before C");
      // X cycle: maybe a store completes
      st = '0;
      if ($urandom_range(0, 2) == 0) begin
        st.valid = 1; st.tag = tag_t'($urandom_range(1, 7));
        st.addr = ($urandom_range(0, 1) != 0) ? a : 4 * $urandom_range(0, 63);
      end
      rx = st.valid && st.tag < iss.tag && st.addr[31:2] == a[31:2];
      // C cycle: maybe the bus is busy while a store completes
      hold = $urandom_range(0, 2) == 0;
      rc = 0;
      @(negedge clk);
      st = '0;
      if (hold) begin
        grant = 0;
        if ($urandom_range(0, 1) != 0) begin
          st.valid = 1; st.tag = tag_t'($urandom_range(1, 7));
          st.addr = ($urandom_range(0, 1) != 0) ? a : 4 * $urandom_range(0, 63);
        end
        rc = st.valid && st.tag < iss.tag && st.addr[31:2] == a[31:2];
        @(negedge clk);
        st = '0; grant = 1;
      end
      if (a[7:6] == 2'd3) begin
        npf++;
        chk(req.valid && req.exc == EXC_PAGE_FAULT && req.addr == a, "page fault");
      end else if (rx || rc) begin
        if (rx) nrx++; else nrc++;
        chk(req.valid && req.exc == EXC_REPLAY && req.addr == a, $sformatf("replay x=%0b c=%0b", rx, rc));
      end else if (a[5:2] == 4'd9 && req.tag == 5) begin
        nf++;
        chk(req.valid && req.exc == EXC_NONE && req.value == 32'hF00D, "forwarded");
      end else begin
        chk(req.valid && req.exc == EXC_NONE && req.value == mem[a[7:2]], $sformatf("load %h", a));
      end
    end
    chk(npf > 0 && nf > 0 && nrx > 0 && nrc > 0, $sformatf("coverage %0d %0d %0d %0d", npf, nf, nrx, nrc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
