// pdp8_mar: memory address register.
//
// Holds the twelve-bit address presented to memory. Three transfers load it,
// one per event time at most:
//   pc_mar    MAR <- PC                      (address of the next instruction)
//   mb_mar_pg MAR <- page, MB[5:11]          (direct operand address)
//   mb_mar    MAR <- MB                      (indirect operand address)
// For mb_mar_pg the page is page 0 when instruction bit 4 is 0 and the page
// held in the program counter when it is 1. The program counter has already
// advanced past the instruction by then, so an instruction in the last word of
// a page refers to the following page: a consequence of keeping the current
// page in the program counter. Reset clears the register.
module pdp8_mar
  import pdp8_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  ctl_t  ctl,
  input  word_t pc,
  input  word_t mb,
  output word_t mar
);

  page_t page_sel;
  assign page_sel = mb[B_PAGE] ? pc[0:PAGE_W-1] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             mar <= '0;
    else if (ctl.pc_mar)    mar <= pc;
    else if (ctl.mb_mar_pg) mar <= {page_sel, mb[PAGE_W:WORD_W-1]};
    else if (ctl.mb_mar)    mar <= mb;
  end

endmodule
