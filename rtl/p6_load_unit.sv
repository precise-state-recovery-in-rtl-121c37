// p6_load_unit: load functional unit (behind the LD reservation station).
//
// X register: the issued ldf.  During X the effective address (operand 2 +
// immediate) is formed and presented both to the data memory and to the ROB's
// store-forwarding search; the youngest older completed store to the same
// word supplies the data, otherwise the memory word is used.  A load to a page
// that is not present completes with EXC_PAGE_FAULT, which is acted on only
// when the load reaches the ROB head.  The result waits in the C register for
// the CDB.  Timing as ldf in the slides: S c2, X c3, C c4.
//
// Loads run ahead of older stores whose address is still unknown (the second
// ldf of the slides' example executes before the first stf).  A store that
// completes (st_i) while a younger load to the same word sits in X or waits
// in C marks that load EXC_REPLAY; loads already in the ROB are marked there.
// A replayed load is re-executed from the ROB head.  The replay rule is this
// design's own; the slides leave load speculation for later.
module p6_load_unit
  import p6_pkg::*;
(
  input  logic   clk_i,
  input  logic   rst_ni,
  input  logic   flush_i,
  input  issue_t issue_i,
  output logic   ready_o,
  output cdb_t   req_o,
  input  logic   grant_i,
  // store completions, for replay detection
  input  st_cmpl_t st_i,
  input  tag_t   head_tag_i,
  // data memory read
  output word_t  mem_addr_o,
  input  word_t  mem_rdata_i,
  input  logic   mem_present_i,
  // ROB forwarding search
  output tag_t   fwd_tag_o,
  input  logic   fwd_hit_i,
  input  word_t  fwd_data_i
);

  issue_t x_q;
  cdb_t   c_q, x_res;
  logic   advance;
  word_t  addr;

  assign advance    = !c_q.valid || grant_i;
  assign ready_o    = !x_q.valid || advance;
  assign req_o      = c_q;
  assign addr       = x_q.v2 + x_q.imm;
  assign mem_addr_o = addr;
  assign fwd_tag_o  = x_q.tag;

  function automatic logic st_hits(logic v, tag_t t, word_t a);
    return st_i.valid && v && tag_younger(t, st_i.tag, head_tag_i) &&
           a[XLEN-1:2] == st_i.addr[XLEN-1:2];
  endfunction

  always_comb begin
    x_res       = '0;
    x_res.valid = x_q.valid;
    x_res.tag   = x_q.tag;
    x_res.addr  = addr;
    x_res.value = fwd_hit_i ? fwd_data_i : mem_rdata_i;
    x_res.exc   = !mem_present_i                    ? EXC_PAGE_FAULT :
                  st_hits(x_q.valid, x_q.tag, addr) ? EXC_REPLAY : EXC_NONE;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      x_q <= '0;
      c_q <= '0;
    end else if (flush_i) begin
      x_q.valid <= 1'b0;
      c_q.valid <= 1'b0;
    end else begin
      if (advance) c_q <= x_res;
      else if (st_hits(c_q.valid, c_q.tag, c_q.addr) && c_q.exc == EXC_NONE) c_q.exc <= EXC_REPLAY;
      if (ready_o) x_q <= issue_i;
    end
  end

endmodule
