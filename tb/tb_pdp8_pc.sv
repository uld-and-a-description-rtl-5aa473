// tb_pdp8_pc: checks the program counter: increments across the end of a
// page (0177 -> 0200) and of memory (7777 -> 0000), loads from the memory
// address register, the memory buffer and the switch register, and random sequences of
// these against a twelve-bit counter model.
module tb_pdp8_pc;
  import pdp8_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  ctl_t  ctl = '0;
  word_t mar = '0, mb = '0, sw = '0, pc;
  word_t exp_pc;
  int checks = 0, failures = 0;

  pdp8_pc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step();
    @(negedge clk);
    checks++;
    if (pc !== exp_pc) begin
      failures++;
      if (failures < 10) $display("FAIL pc=%o expected %o", pc, exp_pc);
    end
    ctl = '0;
  endtask

  initial begin
    exp_pc = '0;
    @(negedge clk); rst_n = 1'b1;
    ctl = '0; ctl.sw_pc = 1'b1; sw = 12'o0177; exp_pc = 12'o0177; step();
    ctl.inc_pc = 1'b1; exp_pc = 12'o0200; step();
    ctl.mar_pc = 1'b1; mar = 12'o7777; exp_pc = 12'o7777; step();
    ctl.inc_pc = 1'b1; exp_pc = 12'o0000; step();
    for (int k = 0; k < 4000; k++) begin
      mar = 12'($urandom); sw = 12'($urandom); mb = 12'($urandom);
      case ($urandom_range(0, 5))
        5: begin ctl.mb_pc = 1'b1; exp_pc = mb; end
        0: begin ctl.mar_pc = 1'b1; exp_pc = mar; end
        1: begin ctl.sw_pc = 1'b1; exp_pc = sw; end
        2, 3: begin ctl.inc_pc = 1'b1; exp_pc = exp_pc + 12'd1; end
        default: ;
      endcase
      step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
