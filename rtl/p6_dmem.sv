// p6_dmem: data memory (the D$ of the pipeline drawings) with page-present bits.
//
// WORDS 32-bit words, byte addressed (the low two address bits are ignored).
// Memory is divided into pages of PAGE_BYTES; a present bit per page decides
// whether an access faults.  Addresses beyond the memory are never present.
// Read ports (load data, present checks for the load and store units) are
// combinational.  The write port is driven by retire only, so memory only
// ever holds retired stores.  map_i sets the present bit of the page holding
// map_addr_i (the pmap instruction at retire).  The ext_* port lets the
// environment preload words and set or clear present bits, as an operating
// system would set up the page table; it has priority over retire writes.
// Neither the words nor the present bits are reset: the environment writes
// both before releasing the core from reset.
// The slides only name the D$; size, paging and ports are this design's.
module p6_dmem
  import p6_pkg::*;
#(
  parameter int unsigned WORDS      = 256,
  parameter int unsigned PAGE_BYTES = 64
) (
  input  logic  clk_i,
  input  logic  rst_ni,   // only blocks pmap updates during reset
  // load
  input  word_t ld_addr_i,
  output word_t ld_rdata_o,
  output logic  ld_present_o,
  // store check
  input  word_t st_addr_i,
  output logic  st_present_o,
  // retire write and page map
  input  logic  we_i,
  input  word_t waddr_i,
  input  word_t wdata_i,
  input  logic  map_i,
  input  word_t map_addr_i,
  // environment access
  input  logic  ext_we_i,
  input  word_t ext_addr_i,
  input  word_t ext_wdata_i,
  output word_t ext_rdata_o,
  input  logic  ext_page_we_i,
  input  logic  ext_page_present_i
);

  localparam int unsigned AW    = $clog2(WORDS);
  localparam int unsigned PAGES = WORDS * 4 / PAGE_BYTES;
  localparam int unsigned PW    = $clog2(PAGES);
  localparam int unsigned POFF  = $clog2(PAGE_BYTES);

  word_t            mem_q [WORDS];
  logic [PAGES-1:0] present_q;

  function automatic logic in_range(word_t a);
    return (a >> (AW + 2)) == '0;
  endfunction

  function automatic logic [PW-1:0] page_of(word_t a);
    return a[POFF +: PW];
  endfunction

  assign ld_rdata_o   = mem_q[ld_addr_i[2 +: AW]];
  assign ld_present_o = in_range(ld_addr_i) && present_q[page_of(ld_addr_i)];
  assign st_present_o = in_range(st_addr_i) && present_q[page_of(st_addr_i)];
  assign ext_rdata_o  = mem_q[ext_addr_i[2 +: AW]];

  always_ff @(posedge clk_i) begin
    if (ext_we_i)  mem_q[ext_addr_i[2 +: AW]] <= ext_wdata_i;
    else if (we_i) mem_q[waddr_i[2 +: AW]]    <= wdata_i;
  end

  // The page table, like the memory words, is set up by the environment and
  // is not changed by reset.
  always_ff @(posedge clk_i) begin
    if (map_i && rst_ni && in_range(map_addr_i)) present_q[page_of(map_addr_i)] <= 1'b1;
    if (ext_page_we_i) present_q[page_of(ext_addr_i)] <= ext_page_present_i;
  end

endmodule
