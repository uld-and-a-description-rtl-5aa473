// tb_pdp8_tty: checks the keyboard buffer and flag (a strobe loads the code
// and sets the flag, clearing drops it, a strobe wins over a clear in the same
// cycle) and the teleprinter side (ptr_out loads accumulator bits 4-11 and
// pulses tpr_start once, tpr_done sets the flag, clearing drops it).
module tb_pdp8_tty;
  import pdp8_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  ctl_t  ctl = '0;
  word_t ac = '0;
  logic  kbd_strobe = 1'b0;
  byte_t kbd_char = '0;
  logic  tpr_done = 1'b0;
  byte_t tti, tto;
  logic  kbf, tpf, tpr_start;
  byte_t e_tti, e_tto;
  logic  e_kbf, e_tpf, e_start;
  int checks = 0, failures = 0;

  pdp8_tty dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {e_tti, e_tto, e_kbf, e_tpf, e_start} = '0;
    @(negedge clk); rst_n = 1'b1;
    for (int k = 0; k < 3000; k++) begin
      ctl = '0;
      ac = 12'($urandom);
      kbd_char   = 8'($urandom);
      kbd_strobe = ($urandom_range(0, 3) == 0);
      tpr_done   = ($urandom_range(0, 3) == 0);
      ctl.kbd_clear = 1'($urandom);
      ctl.tpr_clear = 1'($urandom);
      ctl.ptr_out   = ($urandom_range(0, 3) == 0);
      if (kbd_strobe) begin e_tti = kbd_char; e_kbf = 1'b1; end
      else if (ctl.kbd_clear) e_kbf = 1'b0;
      if (tpr_done) e_tpf = 1'b1;
      else if (ctl.tpr_clear) e_tpf = 1'b0;
      e_start = ctl.ptr_out;
      if (ctl.ptr_out) e_tto = byte_t'(ac & 12'o0377);
      @(negedge clk);
      checks++;
      if (tti !== e_tti || tto !== e_tto || kbf !== e_kbf || tpf !== e_tpf ||
          tpr_start !== e_start) begin
        failures++;
        if (failures < 10)
          $display("FAIL tti=%o tto=%o kbf=%b tpf=%b start=%b", tti, tto, kbf, tpf, tpr_start);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
