// tb_pdp8_ir: loads every operation code from bits 0-2 of the memory
// buffer, checks the memory-reference decode, that the register holds when
// not loaded, and that an interrupt forces JMS.
module tb_pdp8_ir;
  import pdp8_pkg::*;

  logic    clk = 1'b0, rst_n = 1'b0;
  ctl_t    ctl = '0;
  word_t   mb = '0;
  opcode_t ir;
  logic    is_mri;
  logic [2:0] exp_ir;
  int checks = 0, failures = 0;

  pdp8_ir dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_ir = 3'o0;
    @(negedge clk); rst_n = 1'b1;
    for (int k = 0; k < 2000; k++) begin
      ctl = '0;
      mb = 12'($urandom);
      case ($urandom_range(0, 3))
        0, 1: begin ctl.mb_ir = 1'b1; exp_ir = mb[0:2]; end
        2: begin ctl.force_jms = 1'b1; exp_ir = 3'o4; end
        default: ;
      endcase
      @(negedge clk);
      checks++;
      if (ir !== opcode_t'(exp_ir) || is_mri !== (exp_ir < 3'o6)) begin
        failures++;
        if (failures < 10) $display("FAIL ir=%o mri=%b expected %o", ir, is_mri, exp_ir);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
