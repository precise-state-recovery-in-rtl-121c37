// p6_store_unit: store functional unit (behind the ST reservation station).
//
// X register: the issued stf.  During X the address (operand 2 + immediate)
// is formed and checked against the page-present bits; the C register then
// reports <tag, address, data, fault> on the store-completion port, which the
// ROB always accepts, so this unit never stalls.  The store does not touch
// memory here: the data memory is written when the store retires, which keeps
// memory precise.  A store does not broadcast on the CDB (no register waits
// for it), matching the empty CDB when stf completes in the slides' example
// (S c8, X c9, C c10).
module p6_store_unit
  import p6_pkg::*;
(
  input  logic     clk_i,
  input  logic     rst_ni,
  input  logic     flush_i,
  input  issue_t   issue_i,
  output logic     ready_o,
  output st_cmpl_t cmpl_o,
  output word_t    chk_addr_o,
  input  logic     chk_present_i
);

  issue_t   x_q;
  st_cmpl_t c_q;

  assign ready_o    = 1'b1;
  assign cmpl_o     = c_q;
  assign chk_addr_o = x_q.v2 + x_q.imm;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      x_q <= '0;
      c_q <= '0;
    end else if (flush_i) begin
      x_q.valid <= 1'b0;
      c_q.valid <= 1'b0;
    end else begin
      c_q.valid <= x_q.valid;
      c_q.tag   <= x_q.tag;
      c_q.addr  <= chk_addr_o;
      c_q.data  <= x_q.v1;
      c_q.exc   <= chk_present_i ? EXC_NONE : EXC_PAGE_FAULT;
      x_q       <= issue_i;
    end
  end

endmodule
