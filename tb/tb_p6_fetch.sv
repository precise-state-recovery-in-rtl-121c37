// tb_p6_fetch: fetches from an instruction memory holding i*3+1 at word i
// and checks the F/D latch: sequential PCs, hold on stall, restart after a
// redirect (the next instruction comes from the new PC one cycle later),
// and no new instructions after halt.
module tb_p6_fetch;
  import p6_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic stall = 0, halt = 0, redirect = 0, fdv;
  word_t rpc = 0, ia, id, fpc, fin;
  word_t imem_wd = 0, imem_wa = 0;
  logic imem_we = 0;
  p6_imem #(.WORDS(256)) u_im (.clk_i(clk), .raddr_i(ia), .rdata_o(id),
                               .we_i(imem_we), .waddr_i(imem_wa), .wdata_i(imem_wd));
  p6_fetch dut (.clk_i(clk), .rst_ni(rst_n), .stall_i(stall), .halt_i(halt), .redirect_i(redirect),
    .redirect_pc_i(rpc), .imem_addr_o(ia), .imem_data_i(id), .fd_valid_o(fdv), .fd_pc_o(fpc),
    .fd_instr_o(fin));
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s (pc %h)", s, fpc); end
  endtask
  initial begin
    word_t exp_pc;
    @(negedge clk);
    imem_we = 1;
    for (int i = 0; i < 256; i++) begin imem_wa = i * 4; imem_wd = i * 3 + 1; @(negedge clk); end
    imem_we = 0;
    rst_n = 1;
    @(negedge clk);
    exp_pc = 0;
    for (int n = 0; n < 500; n++) begin
      chk(fdv && fpc == exp_pc && fin == exp_pc / 4 * 3 + 1, "latched instruction");
      stall = $urandom_range(0, 3) == 0;
      redirect = !stall && $urandom_range(0, 7) == 0;
      rpc = 4 * $urandom_range(0, 200);
      @(negedge clk);
      if (redirect) begin
        chk(!fdv, "latch emptied by redirect");
        redirect = 0;
        @(negedge clk);
        exp_pc = rpc;
      end else if (!stall) exp_pc = exp_pc + 4;
    end
    stall = 0; halt = 1;
    @(negedge clk); @(negedge clk);
    chk(!fdv, "halt stops fetch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
