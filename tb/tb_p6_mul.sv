// tb_p6_mul: streams multiplies, one per cycle, and checks each product and
// tag arrives on the CDB request exactly LATENCY+1 cycles after issue (mulf in
// the example: S c4, CDB c8); then checks the stall when the grant is denied.
module tb_p6_mul;
  import p6_pkg::*;
  localparam int LAT = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic flush = 0, ready, grant = 1;
  issue_t iss;
  cdb_t req;
  p6_mul #(.LATENCY(LAT)) dut (.clk_i(clk), .rst_ni(rst_n), .flush_i(flush), .issue_i(iss),
                               .ready_o(ready), .req_o(req), .grant_i(grant));
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  issue_t hist [$];
  int cyc = 0;
  initial begin
    iss = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      cyc++;
      iss = '0;
      iss.valid = $urandom_range(0, 3) != 0; iss.op = OP_MULF; iss.tag = tag_t'($urandom_range(1, 7));
      iss.v1 = $urandom; iss.v2 = $urandom;
      hist.push_back(iss);
      if (hist.size() > LAT + 1) begin
        issue_t o;
        o = hist.pop_front();
        chk(req.valid == o.valid && (!o.valid || (req.tag == o.tag && req.value == o.v1 * o.v2)),
            $sformatf("cycle %0d result", cyc));
      end
    end
    @(negedge clk); iss = '0;
    iss.valid = 1; iss.tag = 3; iss.v1 = 6; iss.v2 = 7;
    @(negedge clk); iss = '0;
    repeat (LAT + 3) @(negedge clk);
    iss.valid = 1; iss.tag = 4; iss.v1 = 2; iss.v2 = 5;
    @(negedge clk); iss = '0;
    repeat (LAT - 1) @(negedge clk);
    grant = 0;
    @(negedge clk);
    chk(req.valid && req.tag == 4 && req.value == 10 && !ready, "held result, unit stalled");
    repeat (3) @(negedge clk);
    chk(req.valid && req.tag == 4, "still held");
    grant = 1;
    @(negedge clk);
    chk(!req.valid, "released after grant");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
