// tb_p6_cdb_arbiter: random request patterns; the grant must be the lowest
// requesting index and the bus must carry that requester's tag and value.
module tb_p6_cdb_arbiter;
  import p6_pkg::*;
  int checks = 0, failures = 0;
  cdb_t req [4];
  logic [3:0] gnt;
  cdb_t bus;
  p6_cdb_arbiter #(.N(4)) dut (.req_i(req), .grant_o(gnt), .cdb_o(bus));
  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 200; n++) begin
      int w;
      w = -1;
      for (int i = 0; i < 4; i++) begin
        req[i] = '0;
        req[i].valid = ($urandom_range(0, 1) != 0);
        req[i].tag   = tag_t'(i + 1);
        req[i].value = $urandom;
      end
      for (int i = 3; i >= 0; i--) if (req[i].valid) w = i;
      #1;
      checks++;
      if (w < 0) begin
        if (gnt != 0 || bus.valid) begin failures++; $display("FAIL idle"); end
      end else if (gnt != 4'(1 << w) || !bus.valid || bus.tag != req[w].tag || bus.value != req[w].value) begin
        failures++; $display("FAIL pattern: grant %b, expected index %0d", gnt, w);
      end
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
