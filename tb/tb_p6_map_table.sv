// tb_p6_map_table: drives random dispatch, CDB, retire and flush updates and
// compares both read ports every cycle with a model of the T+ rules: dispatch
// sets tag and clears plus, the CDB sets plus on a matching tag, retire
// clears a still-matching entry, flush clears all, dispatch wins.
module tb_p6_map_table;
  import p6_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic flush, dwe, cv, rwe;
  reg_t drd, r1, r2, rrd;
  tag_t dtag, ctag, rtag, t1, t2;
  logic p1, p2;
  tag_t mt [NUM_REGS];
  bit   mp [NUM_REGS];
  int   n_plus = 0, n_clear = 0;
  p6_map_table dut (.clk_i(clk), .rst_ni(rst_n), .flush_i(flush),
    .disp_we_i(dwe), .disp_rd_i(drd), .disp_tag_i(dtag),
    .rs1_i(r1), .rs1_tag_o(t1), .rs1_plus_o(p1), .rs2_i(r2), .rs2_tag_o(t2), .rs2_plus_o(p2),
    .cdb_valid_i(cv), .cdb_tag_i(ctag), .ret_we_i(rwe), .ret_rd_i(rrd), .ret_tag_i(rtag));
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic tag_t rtagv();
    return tag_t'($urandom_range(1, ROB_ENTRIES));
  endfunction
  initial begin
    flush = 0; dwe = 0; cv = 0; rwe = 0; drd = 0; r1 = 0; r2 = 0; rrd = 0; dtag = 0; ctag = 0; rtag = 0;
    for (int i = 0; i < NUM_REGS; i++) begin mt[i] = 0; mp[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      flush = ($urandom_range(0, 99) == 0);
      dwe = ($urandom_range(0, 1) != 0); drd = reg_t'($urandom_range(0, 3)); dtag = rtagv();
      cv = ($urandom_range(0, 1) != 0); ctag = rtagv();
      rwe = ($urandom_range(0, 1) != 0); rrd = reg_t'($urandom_range(0, 3));
      rtag = ($urandom_range(0, 1) != 0) ? mt[rrd] : rtagv();
      r1 = reg_t'($urandom_range(0, 3)); r2 = reg_t'($urandom_range(0, 15));
      #1;
      checks++;
      if (t1 != mt[r1] || p1 != mp[r1] || t2 != mt[r2] || p2 != mp[r2]) begin
        failures++; $display("FAIL step %0d r%0d: %0d%s model %0d%s", n, r1, t1, p1 ? "+" : "", mt[r1], mp[r1] ? "+" : "");
      end
      @(posedge clk);
      for (int r = 0; r < NUM_REGS; r++) begin
        if (flush) begin mt[r] = 0; mp[r] = 0; end
        else if (dwe && drd == reg_t'(r)) begin mt[r] = dtag; mp[r] = 0; end
        else if (rwe && rrd == reg_t'(r) && mt[r] == rtag) begin
          if (mt[r] != 0) n_clear++;
          mt[r] = 0; mp[r] = 0;
        end
        else if (cv && mt[r] != 0 && mt[r] == ctag) begin mp[r] = 1; n_plus++; end
      end
    end
    checks++;
    if (n_plus == 0 || n_clear == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
