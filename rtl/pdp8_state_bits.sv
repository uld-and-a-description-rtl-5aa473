// pdp8_state_bits: the interrupt bit, the interrupt enable bit and the run bit.
//
// int_bit is set by a one-cycle int_pulse from the (external) interrupt source
// and stays set until the interrupt is taken (int_ack). The enable bit is set
// by ION and cleared by IOF and by int_ack. As on the PDP-8, a newly set
// enable does not allow an interrupt until the instruction after the ION has
// finished: ion_seen marks the ION instruction until its last event time
// (instr_end), where it moves to the delay bit; the end of the following
// instruction clears delay. int_ok tells the major state generator, at the
// first event time of a fetch, that it may take an interrupt instead. The run bit is set from the front panel (set_run) and cleared by
// HLT or the panel stop key (clear_run). Reset clears all bits.
module pdp8_state_bits
  import pdp8_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  ctl_t ctl,
  input  logic int_pulse,
  output logic int_bit,
  output logic enable,
  output logic int_ok,
  output logic run
);

  logic delay;
  logic ion_seen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      int_bit <= 1'b0;
      enable  <= 1'b0;
      delay   <= 1'b0;
      ion_seen <= 1'b0;
      run     <= 1'b0;
    end else begin
      if (int_pulse)        int_bit <= 1'b1;
      else if (ctl.int_ack) int_bit <= 1'b0;

      if (ctl.int_ack || ctl.iof) enable <= 1'b0;
      else if (ctl.ion)           enable <= 1'b1;

      if (ctl.instr_end) begin
        delay    <= ion_seen || ctl.ion;
        ion_seen <= 1'b0;
      end else if (ctl.ion) begin
        ion_seen <= 1'b1;
      end

      if (ctl.clear_run)    run <= 1'b0;
      else if (ctl.set_run) run <= 1'b1;
    end
  end

  assign int_ok = int_bit && enable && !delay;

endmodule
