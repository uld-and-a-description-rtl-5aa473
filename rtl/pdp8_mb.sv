// pdp8_mb: memory buffer register.
//
// Every word read from or written to memory passes through this register.
// Loads, at most one per event time (the major state generator never issues
// two in the same event time; the priority below only makes that definite):
//   mem_mb   MB <- memory read data          clear_mb MB <- 0
//   ac_mb    MB <- AC                        inc_mb   MB <- MB + 1
//   pc_mb    MB <- PC                        sw_mb    MB <- switch register
//   add_step MB <- (AC and MB) moved one place toward bit 0
// add_step is the carry half of the machine's serial addition: in the same
// event time the accumulator takes AC xor MB (see pdp8_ac). After as many steps
// as there are bits all carries have been absorbed and MB is zero.
// mb_zero reports an all-zero MB, the skip condition of ISZ. Reset clears MB.
module pdp8_mb
  import pdp8_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  ctl_t  ctl,
  input  word_t mem_rdata,
  input  word_t ac,
  input  word_t pc,
  input  word_t sw,
  output word_t mb,
  output logic  mb_zero
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            mb <= '0;
    else if (ctl.mem_mb)   mb <= mem_rdata;
    else if (ctl.clear_mb) mb <= '0;
    else if (ctl.ac_mb)    mb <= ac;
    else if (ctl.pc_mb)    mb <= pc;
    else if (ctl.sw_mb)    mb <= sw;
    else if (ctl.inc_mb)   mb <= mb + 1'b1;
    else if (ctl.add_step) mb <= (ac & mb) << 1;
  end

  assign mb_zero = (mb == '0);

endmodule
