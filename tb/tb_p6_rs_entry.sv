// tb_p6_rs_entry: allocates the station with random operand tags, broadcasts
// random tags on the CDB, and checks against a model that values are captured,
// that ready (and the issued operands) already reflect a CDB match in the
// same cycle, that issuing frees the station, and that flush empties it.
module tb_p6_rs_entry;
  import p6_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic flush = 0, alloc = 0, busy, ready, issue = 0;
  tag_t t1, t2, tag;
  word_t v1, v2;
  cdb_t cdb;
  issue_t io;
  p6_rs_entry dut (.clk_i(clk), .rst_ni(rst_n), .flush_i(flush), .alloc_i(alloc),
    .alloc_op_i(OP_MULF), .alloc_tag_i(tag_t'(6)), .alloc_t1_i(t1), .alloc_v1_i(v1),
    .alloc_t2_i(t2), .alloc_v2_i(v2), .alloc_imm_i(32'd12), .alloc_pc_i(32'h40),
    .cdb_i(cdb), .busy_o(busy), .tag_o(tag), .ready_o(ready), .issue_i(issue), .issue_o(io));
  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  initial begin
    tag_t mt1, mt2;
    word_t mv1, mv2;
    automatic int same_cycle = 0;
    cdb = '0; t1 = 0; t2 = 0; v1 = 0; v2 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!busy && !ready, "empty after reset");
    for (int n = 0; n < 300; n++) begin
      int steps;
      @(negedge clk);
      t1 = ($urandom_range(0, 1) != 0) ? tag_t'(0) : tag_t'($urandom_range(1, 7));
      t2 = ($urandom_range(0, 1) != 0) ? tag_t'(0) : tag_t'($urandom_range(1, 7));
      v1 = $urandom; v2 = $urandom;
      mt1 = t1; mt2 = t2; mv1 = (t1 == 0) ? v1 : 0; mv2 = (t2 == 0) ? v2 : 0;
      alloc = 1;
      @(negedge clk); alloc = 0;
      chk(busy && tag == 6, "allocated");
      steps = 0;
      while (1) begin
        bit rdy;
        cdb = '0;
        if ($urandom_range(0, 1) != 0) begin
          cdb.valid = 1; cdb.tag = tag_t'($urandom_range(1, 7)); cdb.value = $urandom;
        end
        if (cdb.valid && mt1 != 0 && cdb.tag == mt1) begin mt1 = 0; mv1 = cdb.value; end
        if (cdb.valid && mt2 != 0 && cdb.tag == mt2) begin mt2 = 0; mv2 = cdb.value; end
        rdy = (mt1 == 0 && mt2 == 0);
        if (n % 13 == 5 && steps == 1) begin
          flush = 1; #1;
          @(negedge clk); flush = 0; cdb = '0;
          chk(!busy, "flush empties");
          break;
        end
        issue = rdy;
        #1;
        chk(ready == rdy, "ready");
        if (rdy) begin
          if (cdb.valid) same_cycle++;
          chk(io.valid && io.v1 == mv1 && io.v2 == mv2 && io.tag == 6 && io.imm == 12 &&
              io.pc == 32'h40 && io.op == OP_MULF, "issued operands");
          @(negedge clk); issue = 0; cdb = '0;
          chk(!busy, "freed after issue");
          break;
        end
        @(negedge clk);
        steps++;
      end
    end
    chk(same_cycle > 0, "issue in the cycle of the last CDB match happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
