// pdp8_ir: instruction register and operation decoder.
//
// A three-bit register holding the operation code, bits 0-2 of the
// instruction word, loaded from the memory buffer (mb_ir) in the fetch cycle.
// When an interrupt is taken the major state generator loads JMS instead
// (force_jms), so the interrupt runs as a JMS to location 0. is_mri flags the
// six memory-reference operations (AND, TAD, ISZ, DCA, JMS, JMP), which need an
// operand address; IOT and OPR do not. Reset loads AND (code 0).
module pdp8_ir
  import pdp8_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  ctl_t    ctl,
  input  word_t   mb,
  output opcode_t ir,
  output logic    is_mri
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             ir <= OP_AND;
    else if (ctl.force_jms) ir <= OP_JMS;
    else if (ctl.mb_ir)     ir <= opcode_t'(mb[0:2]);
  end

  assign is_mri = (ir != OP_IOT) && (ir != OP_OPR);

endmodule
