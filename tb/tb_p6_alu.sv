// tb_p6_alu: issues random ALU operations and checks each result, its tag and
// its latency (issued in cycle n, on the CDB request in cycle n+2), that a
// denied grant holds the result and blocks new issues, and that a taken
// branch reports a mispredict with the right target.
module tb_p6_alu;
  import p6_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic flush = 0, ready, grant;
  issue_t iss;
  cdb_t req;
  p6_alu dut (.clk_i(clk), .rst_ni(rst_n), .flush_i(flush), .issue_i(iss), .ready_o(ready),
              .req_o(req), .grant_i(grant));
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  function automatic cdb_t expect_res(issue_t i);
    cdb_t c = '0;
    c.valid = 1; c.tag = i.tag;
    case (i.op)
      OP_ADD:  c.value = i.v1 + i.v2;
      OP_ADDI: c.value = i.v1 + i.imm;
      OP_SUB:  c.value = i.v1 - i.v2;
      OP_BEQ: begin c.target = i.pc + i.imm; if (i.v1 == i.v2) c.exc = EXC_MISPREDICT; end
      OP_BNE: begin c.target = i.pc + i.imm; if (i.v1 != i.v2) c.exc = EXC_MISPREDICT; end
      default: ;
    endcase
    return c;
  endfunction
  initial begin
    issue_t i;
    cdb_t e;
    automatic opcode_e ops [5] = '{OP_ADD, OP_ADDI, OP_SUB, OP_BEQ, OP_BNE};
    iss = '0; grant = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      i = '0; i.valid = 1; i.op = ops[$urandom_range(0, 4)]; i.tag = tag_t'($urandom_range(1, 7));
      i.v1 = $urandom_range(0, 3); i.v2 = $urandom_range(0, 3); i.imm = $urandom; i.pc = $urandom;
      iss = i;
      chk(ready, "ready when idle");
      @(negedge clk); iss = '0;
      chk(!req.valid, "no result one cycle after issue");
      @(negedge clk);
      e = expect_res(i);
      chk(req.valid && req.tag == e.tag && req.exc == e.exc &&
          (i.op inside {OP_BEQ, OP_BNE} ? req.target == e.target : req.value == e.value),
          $sformatf("result of op %0h", i.op));
      if (n % 10 == 0) begin              // hold: CDB busy
        grant = 0;
        iss = i; iss.tag = tag_t'(i.tag + 1'b1);
        #1 chk(ready, "X empty accepts while C waits");
        @(negedge clk); iss = '0;
        chk(req.valid && req.tag == e.tag, "result held while not granted");
        chk(!ready, "stalled unit not ready");
        grant = 1;
        @(negedge clk);
        chk(req.valid && req.tag == tag_t'(i.tag + 1'b1), "second result after grant");
      end
    end
    // flush drops work in flight
    @(negedge clk); iss.valid = 1; iss.op = OP_ADD;
    @(negedge clk); iss = '0; flush = 1;
    @(negedge clk); flush = 0;
    chk(!req.valid, "flush drops results");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
