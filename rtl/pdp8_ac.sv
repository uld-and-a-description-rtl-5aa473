// pdp8_ac: accumulator (twelve bits) and link (one bit).
//
// The commands below may share an event time only where the major state
// generator issues them together; within one event time they take effect in
// the order listed, each on the result of the one before:
//   clear_ac, clear_link        AC <- 0, L <- 0
//   cmp_ac, cmp_link            AC <- not AC, L <- not L
//   inc_ac                      {L,AC} + 1: a carry out of bit 0 flips L
//   ac_and_mb                   AC <- AC and MB
//   sw_or_ac                    AC <- AC or switch register
//   kbd_in                      AC[4:11] <- AC[4:11] or keyboard buffer
//   shift_ac                    {L,AC} <- shift register (ends a rotation)
//   add_step                    AC <- AC xor MB; L flips if bit 0 of both is 1
// add_step is one step of the serial addition: the carries AC and MB go to the
// memory buffer one place up (pdp8_mb), and repeating the step as many times as
// there are bits leaves AC = AC + MB with the carry out of bit 0 in the link,
// as TAD requires. Reset clears AC and L.
module pdp8_ac
  import pdp8_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  ctl_t        ctl,
  input  word_t       mb,
  input  word_t       sw,
  input  byte_t       tti,
  input  logic [0:12] shift_q,
  output word_t       ac,
  output logic        link
);

  word_t ac_d;
  logic  link_d;

  always_comb begin
    ac_d   = ac;
    link_d = link;
    if (ctl.clear_ac)   ac_d   = '0;
    if (ctl.clear_link) link_d = 1'b0;
    if (ctl.cmp_ac)     ac_d   = ~ac_d;
    if (ctl.cmp_link)   link_d = ~link_d;
    if (ctl.inc_ac) begin
      if (&ac_d) link_d = ~link_d;
      ac_d = ac_d + 1'b1;
    end
    if (ctl.ac_and_mb)  ac_d = ac_d & mb;
    if (ctl.sw_or_ac)   ac_d = ac_d | sw;
    if (ctl.kbd_in)     ac_d[WORD_W-BYTE_W:WORD_W-1] = ac_d[WORD_W-BYTE_W:WORD_W-1] | tti;
    if (ctl.shift_ac)   {link_d, ac_d} = shift_q;
    if (ctl.add_step) begin
      if (ac_d[0] & mb[0]) link_d = ~link_d;
      ac_d = ac_d ^ mb;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ac   <= '0;
      link <= 1'b0;
    end else begin
      ac   <= ac_d;
      link <= link_d;
    end
  end

endmodule
