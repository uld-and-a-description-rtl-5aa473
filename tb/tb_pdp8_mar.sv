// tb_pdp8_mar: checks each load of the memory address register: from the
// program counter, from the memory buffer with the page taken from the
// program counter (bit 4 set) or page 0 (bit 4 clear), and the full indirect
// address from the memory buffer; and that the register holds otherwise.
module tb_pdp8_mar;
  import pdp8_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  ctl_t  ctl = '0;
  word_t pc = '0, mb = '0, mar;
  word_t exp_mar;
  int checks = 0, failures = 0;

  pdp8_mar dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_mar = '0;
    @(negedge clk); rst_n = 1'b1;
    checks++; if (mar !== '0) failures++;
    for (int k = 0; k < 4000; k++) begin
      ctl = '0;
      pc = 12'($urandom); mb = 12'($urandom);
      case ($urandom_range(0, 3))
        0: begin ctl.pc_mar = 1'b1; exp_mar = pc; end
        1: begin
          ctl.mb_mar_pg = 1'b1;
          exp_mar = (mb[4] ? (pc & 12'o7600) : 12'o0000) | (mb & 12'o0177);
        end
        2: begin ctl.mb_mar = 1'b1; exp_mar = mb; end
        default: ;
      endcase
      @(negedge clk);
      checks++;
      if (mar !== exp_mar) begin
        failures++;
        if (failures < 10) $display("FAIL mar=%o expected %o", mar, exp_mar);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
