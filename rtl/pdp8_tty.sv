// pdp8_tty: teletype interface: keyboard buffer and flag, teleprinter
// buffer and flag.
//
// The keyboard side: a one-cycle kbd_strobe from the teletype loads kbd_char
// into the eight-bit keyboard buffer (tti) and sets the keyboard flag (kbf).
// The program tests the flag (KSF, in the major state generator), clears it
// (kbd_clear) and ORs the buffer into the accumulator (kbd_in, in pdp8_ac).
// The teleprinter side: ptr_out loads accumulator bits 4-11 into the eight-bit
// teleprinter buffer (tto) and raises tpr_start for one cycle; the teletype
// answers with a one-cycle tpr_done when the character is printed, which sets
// the teleprinter flag (tpf). tpr_clear clears it. A flag set and cleared in
// the same cycle ends set, so no keystroke or completion is lost. Device codes
// (03 keyboard, 04 teleprinter) are those of the PDP-8 teletype. Reset clears
// buffers and flags.
module pdp8_tty
  import pdp8_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  ctl_t  ctl,
  input  word_t ac,
  input  logic  kbd_strobe,
  input  byte_t kbd_char,
  input  logic  tpr_done,
  output byte_t tti,
  output logic  kbf,
  output byte_t tto,
  output logic  tpf,
  output logic  tpr_start
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tti       <= '0;
      kbf       <= 1'b0;
      tto       <= '0;
      tpf       <= 1'b0;
      tpr_start <= 1'b0;
    end else begin
      if (kbd_strobe) begin
        tti <= kbd_char;
        kbf <= 1'b1;
      end else if (ctl.kbd_clear) begin
        kbf <= 1'b0;
      end
      if (tpr_done)           tpf <= 1'b1;
      else if (ctl.tpr_clear) tpf <= 1'b0;
      tpr_start <= ctl.ptr_out;
      if (ctl.ptr_out) tto <= ac[WORD_W-BYTE_W:WORD_W-1];
    end
  end

endmodule
