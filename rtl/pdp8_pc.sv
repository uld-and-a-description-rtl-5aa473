// pdp8_pc: program counter, kept as a PAGE_BITS page address and a
// WORD_BITS word address within the page.
//
// inc_pc advances the word address and carries into the page address when the
// word address wraps, so the counter as a whole counts 0000..7777 (octal) and
// wraps to 0000. It is used both to step to the next instruction and to skip
// one. mar_pc loads it from the memory address register (direct jumps, and
// the subroutine entry of JMS and of an interrupt); mb_pc loads it from the
// memory buffer (indirect jumps); sw_pc loads it from the switch
// register (front-panel load address). inc_pc may be issued together with a
// load only for the JMS entry sequence, which never does so, so the loads take
// priority. Reset clears the counter.
module pdp8_pc
  import pdp8_pkg::*;
#(
  parameter int unsigned PAGE_BITS = 5,
  parameter int unsigned WORD_BITS = 7
) (
  input  logic  clk,
  input  logic  rst_n,
  input  ctl_t  ctl,
  input  word_t mar,
  input  word_t mb,
  input  word_t sw,
  output word_t pc
);

  logic [PAGE_BITS-1:0] page_q;
  logic [WORD_BITS-1:0] word_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      page_q <= '0;
      word_q <= '0;
    end else if (ctl.mar_pc) begin
      {page_q, word_q} <= mar;
    end else if (ctl.mb_pc) begin
      {page_q, word_q} <= mb;
    end else if (ctl.sw_pc) begin
      {page_q, word_q} <= sw;
    end else if (ctl.inc_pc) begin
      word_q <= word_q + 1'b1;
      if (&word_q) page_q <= page_q + 1'b1;
    end
  end

  assign pc = {page_q, word_q};

endmodule
