// tb_p6_dmem: preload, retire writes, load reads, page present checks
// (environment set/clear and pmap set) and out-of-range faults, against a
// model.
module tb_p6_dmem;
  import p6_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  word_t lda, sta, wa, wd, mapa, ea, ewd, ldd, erd;
  logic ldp, stp, we, map, ewe, epwe, epp;
  word_t mem [256];
  bit    pres [16];
  p6_dmem dut (.clk_i(clk), .rst_ni(rst_n), .ld_addr_i(lda), .ld_rdata_o(ldd), .ld_present_o(ldp),
    .st_addr_i(sta), .st_present_o(stp), .we_i(we), .waddr_i(wa), .wdata_i(wd),
    .map_i(map), .map_addr_i(mapa), .ext_we_i(ewe), .ext_addr_i(ea), .ext_wdata_i(ewd),
    .ext_rdata_o(erd), .ext_page_we_i(epwe), .ext_page_present_i(epp));
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic bit mp(word_t a);
    return a < 1024 && pres[a[9:6]];
  endfunction
  initial begin
    we = 0; map = 0; ewe = 0; epwe = 0; lda = 0; sta = 0; wa = 0; wd = 0; mapa = 0; ea = 0; ewd = 0; epp = 0;
    @(negedge clk);
    ewe = 1;
    for (int i = 0; i < 256; i++) begin
      ea = i * 4; ewd = $urandom; mem[i] = ewd; @(negedge clk);
    end
    ewe = 0; epwe = 1;
    for (int p = 0; p < 16; p++) begin
      ea = p * 64; epp = ($urandom_range(0, 1) != 0); pres[p] = epp; @(negedge clk);
    end
    epwe = 0;
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      lda = $urandom_range(0, 1100) & ~32'd3; sta = $urandom_range(0, 1100);
      we = ($urandom_range(0, 1) != 0); wa = 4 * $urandom_range(0, 255); wd = $urandom;
      map = $urandom_range(0, 7) == 0; mapa = $urandom_range(0, 1023);
      #1;
      checks++;
      if (ldp != mp(lda) || stp != mp(sta) || (lda < 1024 && ldd != mem[lda[9:2]])) begin
        failures++; $display("FAIL step %0d addr %h", n, lda);
      end
      @(negedge clk);
      if (we) mem[wa[9:2]] = wd;
      if (map) pres[mapa[9:6]] = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
