// pdp8_memory: the machine's main store, PAGES pages of WORDS_PER_PAGE
// twelve-bit words (40 and 200 octal: 4096 words in all).
//
// The address from the memory address register is split into a page number
// (bits 0-4) and a word address within the page (bits 5-11), as in the
// page/word structure of the store. A read is combinational: the memory
// buffer register takes rdata in the same event time (mem-mb). A write
// (mb-mem) stores wdata at the rising clock edge. The store is a plain RAM;
// the destructive read and rewrite of a core memory is not modelled, and the
// contents are not cleared by reset (they are loaded through the front panel).
module pdp8_memory
  import pdp8_pkg::*;
#(
  parameter int unsigned PAGES          = 32,
  parameter int unsigned WORDS_PER_PAGE = 128
) (
  input  logic  clk,
  input  word_t addr,
  input  logic  wr,
  input  word_t wdata,
  output word_t rdata
);

  localparam int unsigned DEPTH = PAGES * WORDS_PER_PAGE;

  word_t store [DEPTH];

  page_t       page;
  waddr_t      word;
  int unsigned index;

  assign page  = addr[0:PAGE_W-1];
  assign word  = addr[PAGE_W:WORD_W-1];
  // Pages or words beyond a reduced store wrap around.
  assign index = ((int'(page) % PAGES) * WORDS_PER_PAGE) + (int'(word) % WORDS_PER_PAGE);

  assign rdata = store[index];

  always_ff @(posedge clk) begin
    if (wr) store[index] <= wdata;
  end

endmodule
