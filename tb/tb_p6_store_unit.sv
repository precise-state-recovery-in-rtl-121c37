// tb_p6_store_unit: a store's completion (tag, base + offset, data, fault)
// appears on the completion port two cycles after issue; flush drops it.
module tb_p6_store_unit;
  import p6_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic flush = 0, ready, present;
  issue_t iss;
  st_cmpl_t c;
  word_t caddr;
  p6_store_unit dut (.clk_i(clk), .rst_ni(rst_n), .flush_i(flush), .issue_i(iss), .ready_o(ready),
                     .cmpl_o(c), .chk_addr_o(caddr), .chk_present_i(present));
  assign present = caddr < 32'h100;
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
    iss = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      issue_t i;
      @(negedge clk);
      i = '0; i.valid = 1; i.op = OP_STF; i.tag = tag_t'($urandom_range(1, 7));
      i.v1 = $urandom; i.v2 = 4 * $urandom_range(0, 50); i.imm = 4 * $urandom_range(0, 20);
      iss = i;
      chk(ready, "always ready");
      @(negedge clk); iss = '0;
      chk(!c.valid, "not before C");
      if (n % 7 == 3) begin
        flush = 1; @(negedge clk); flush = 0;
        chk(!c.valid, "flushed");
      end else begin
        @(negedge clk);
        chk(c.valid && c.tag == i.tag && c.addr == i.v2 + i.imm && c.data == i.v1 &&
            c.exc == ((i.v2 + i.imm < 32'h100) ? EXC_NONE : EXC_PAGE_FAULT), "completion");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
