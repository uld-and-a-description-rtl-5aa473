// pdp8_top: the PDP-8-like machine.
//
// A twelve-bit single-accumulator computer with a 4096-word store of 32 pages
// of 128 words. The registers are wired along the data paths of the machine:
// program counter and memory buffer feed the memory address register; memory,
// accumulator, program counter and switch register feed the memory buffer; the
// memory buffer feeds the instruction register, the memory, the accumulator
// and the program counter; the
// accumulator and link rotate through the shift register; the teletype buffers
// connect to the accumulator. Every transfer is commanded by the major state
// generator (pdp8_major_state), one event time per clock.
//
// Interface: sw is the switch register; panel carries one-cycle front-panel
// key pulses (load address, deposit, examine, start, continue, stop); a
// program is loaded with load address and deposits and run with start.
// int_pulse is a one-cycle interrupt pulse from outside. The teletype
// attaches through kbd_strobe/kbd_char (a key struck) and
// tpr_start/tto/tpr_done (print a character, and its completion). The
// register outputs are the console lights (with the major state, the event
// time, the interrupt bit and the enable bit); instr_done pulses in the last
// event time of each instruction.
module pdp8_top
  import pdp8_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  word_t      sw,
  input  panel_t     panel,
  input  logic       int_pulse,
  input  logic       kbd_strobe,
  input  byte_t      kbd_char,
  input  logic       tpr_done,
  output logic       tpr_start,
  output byte_t      tto,
  output word_t      ac,
  output logic       link,
  output word_t      pc,
  output word_t      mb,
  output word_t      mar,
  output opcode_t    ir,
  output logic       run,
  output major_t     major,
  output logic [3:0] et,
  output logic       int_bit,
  output logic       enable,
  output logic       instr_done
);

  ctl_t        ctl;
  word_t       mem_rdata;
  logic        mb_zero;
  logic        is_mri;
  logic [0:12] shift_q;
  byte_t       tti;
  logic        kbf, tpf;
  logic        int_ok;

  pdp8_memory u_mem (
    .clk, .addr(mar), .wr(ctl.mb_mem), .wdata(mb), .rdata(mem_rdata)
  );

  pdp8_mar u_mar (.clk, .rst_n, .ctl, .pc, .mb, .mar);

  pdp8_pc u_pc (.clk, .rst_n, .ctl, .mar, .mb, .sw, .pc);

  pdp8_mb u_mb (
    .clk, .rst_n, .ctl, .mem_rdata, .ac, .pc, .sw, .mb, .mb_zero
  );

  pdp8_ir u_ir (.clk, .rst_n, .ctl, .mb, .ir, .is_mri);

  pdp8_shift u_shift (.clk, .rst_n, .ctl, .ac, .link, .q(shift_q));

  pdp8_ac u_ac (
    .clk, .rst_n, .ctl, .mb, .sw, .tti, .shift_q, .ac, .link
  );

  pdp8_tty u_tty (
    .clk, .rst_n, .ctl, .ac, .kbd_strobe, .kbd_char, .tpr_done,
    .tti, .kbf, .tto, .tpf, .tpr_start
  );

  pdp8_state_bits u_bits (
    .clk, .rst_n, .ctl, .int_pulse, .int_bit, .enable, .int_ok, .run
  );

  pdp8_major_state u_msg (
    .clk, .rst_n, .ir, .is_mri, .mb, .mar, .ac, .link, .mb_zero, .kbf, .tpf, .run,
    .int_ok, .panel, .ctl, .major, .et, .instr_done
  );

endmodule
