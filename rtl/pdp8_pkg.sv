// pdp8_pkg: types and constants shared by the PDP-8-like machine.
//
// Bits are numbered as on the PDP-8: bit 0 is the most significant bit of a
// twelve-bit word and bit 11 the least, so words are declared [0:11]. An
// address is a five-bit page (bits 0-4) followed by a seven-bit word address
// within the page (bits 5-11); memory holds 40 (octal) pages of 200 (octal)
// words. The eight operation codes, the microinstruction bit positions and
// the IOT device codes are those of the PDP-8 the machine is modelled on.
//
// ctl_t is the set of register-transfer commands the major state generator
// issues each event time (one clock). Each field is named after a data path
// of the machine, written source_destination, e.g. mb_mar is the transfer
// from memory buffer to memory address register.
package pdp8_pkg;

  localparam int unsigned WORD_W  = 12;
  localparam int unsigned PAGE_W  = 5;
  localparam int unsigned WADDR_W = 7;
  localparam int unsigned BYTE_W  = 8;

  typedef logic [0:WORD_W-1]  word_t;
  typedef logic [0:BYTE_W-1]  byte_t;
  typedef logic [0:PAGE_W-1]  page_t;
  typedef logic [0:WADDR_W-1] waddr_t;

  typedef enum logic [2:0] {
    OP_AND = 3'o0,
    OP_TAD = 3'o1,
    OP_ISZ = 3'o2,
    OP_DCA = 3'o3,
    OP_JMS = 3'o4,
    OP_JMP = 3'o5,
    OP_IOT = 3'o6,
    OP_OPR = 3'o7
  } opcode_t;

  typedef enum logic [1:0] {
    MS_FETCH   = 2'd0,
    MS_DEFER   = 2'd1,
    MS_EXECUTE = 2'd2,
    MS_PANEL   = 2'd3   // halted: front-panel operations
  } major_t;

  // Memory-reference instruction fields.
  localparam int unsigned B_IND  = 3;   // indirect (defer)
  localparam int unsigned B_PAGE = 4;   // 1: current page, 0: page 0

  // OPR group 1 (bit 3 = 0).
  localparam int unsigned B_GRP  = 3;
  localparam int unsigned B_CLA  = 4;
  localparam int unsigned B_CLL  = 5;
  localparam int unsigned B_CMA  = 6;
  localparam int unsigned B_CML  = 7;
  localparam int unsigned B_RAR  = 8;
  localparam int unsigned B_RAL  = 9;
  localparam int unsigned B_TWO  = 10;  // rotate twice
  localparam int unsigned B_IAC  = 11;
  // OPR group 2 (bit 3 = 1).
  localparam int unsigned B_SMA  = 5;
  localparam int unsigned B_SZA  = 6;
  localparam int unsigned B_SNL  = 7;
  localparam int unsigned B_REV  = 8;   // reverse skip sense
  localparam int unsigned B_OSR  = 9;
  localparam int unsigned B_HLT  = 10;

  // IOT device codes (bits 3-8).
  localparam logic [5:0] DEV_INT = 6'o00;
  localparam logic [5:0] DEV_KBD = 6'o03;
  localparam logic [5:0] DEV_TPR = 6'o04;

  typedef struct packed {
    logic stop;
    logic cont;
    logic start;
    logic examine;
    logic deposit;
    logic load_addr;
  } panel_t;

  typedef struct packed {
    // memory
    logic mem_mb;       // MB <- M[MAR]
    logic mb_mem;       // M[MAR] <- MB
    // memory address register
    logic pc_mar;       // MAR <- PC
    logic mb_mar_pg;    // MAR <- page-or-zero, MB[5:11]
    logic mb_mar;       // MAR <- MB (all twelve bits)
    // program counter
    logic mar_pc;       // PC <- MAR
    logic mb_pc;        // PC <- MB
    logic inc_pc;       // PC <- PC + 1 (also skip)
    logic sw_pc;        // PC <- switch register
    // memory buffer
    logic clear_mb;
    logic inc_mb;
    logic ac_mb;        // MB <- AC
    logic pc_mb;        // MB <- PC
    logic sw_mb;        // MB <- switch register
    // instruction register
    logic mb_ir;        // IR <- MB[0:2]
    logic force_jms;    // IR <- JMS (interrupt)
    // accumulator and link
    logic clear_ac;
    logic clear_link;
    logic cmp_ac;
    logic cmp_link;
    logic inc_ac;       // {L,AC} + 1
    logic ac_and_mb;    // AC <- AC and MB
    logic add_step;     // one serial-addition step: AC, MB, L together
    logic sw_or_ac;     // AC <- AC or SR
    logic kbd_in;       // AC[4:11] <- AC[4:11] or TTI
    logic shift_ac;     // {L,AC} <- shift register
    // shift register
    logic ac_shift;     // shift register <- rotated {L,AC}
    logic rot_left;
    logic rot_right;
    logic rot_two;
    // teletype
    logic kbd_clear;    // clear keyboard flag
    logic tpr_clear;    // clear teleprinter flag
    logic ptr_out;      // TTO <- AC[4:11], start printing
    // interrupt, enable, run bits
    logic ion;
    logic iof;
    logic int_ack;      // interrupt taken: clear int bit and enable
    logic set_run;
    logic clear_run;
    logic instr_end;    // last event time of an instruction
  } ctl_t;

endpackage
