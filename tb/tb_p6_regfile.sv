// tb_p6_regfile: random writes and reads against an array model; checks
// reset to zero and that a same-cycle read returns the old value.
module tb_p6_regfile;
  import p6_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we;
  reg_t wa, ra1, ra2, ra3;
  word_t wd, rd1, rd2, rd3;
  word_t model [NUM_REGS];
  p6_regfile dut (.clk_i(clk), .rst_ni(rst_n), .we_i(we), .waddr_i(wa), .wdata_i(wd),
                  .raddr1_i(ra1), .rdata1_o(rd1), .raddr2_i(ra2), .rdata2_o(rd2),
                  .raddr3_i(ra3), .rdata3_o(rd3));
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0; ra3 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NUM_REGS; i++) begin
      model[i] = 0;
      ra3 = reg_t'(i); #1;
      checks++; if (rd3 != 0) begin failures++; $display("FAIL reset r%0d", i); end
    end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = ($urandom_range(0, 1) != 0); wa = reg_t'($urandom); wd = $urandom;
      ra1 = reg_t'($urandom); ra2 = wa; ra3 = reg_t'($urandom);
      #1;
      checks++;
      if (rd1 != model[ra1] || rd2 != model[ra2] || rd3 != model[ra3]) begin
        failures++; $display("FAIL read at step %0d", n);
      end
      @(posedge clk);
      if (we) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
