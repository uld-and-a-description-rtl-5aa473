// tb_pdp8_mb: checks every load of the memory buffer register (memory,
// accumulator, program counter, switches, clear, increment), the zero flag,
// and the carry half of a serial addition step, MB <- (AC and MB) moved one
// place toward bit 0; it also runs whole additions, with the sum half
// modelled here, and checks that twelve steps always leave MB at zero.
module tb_pdp8_mb;
  import pdp8_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  ctl_t  ctl = '0;
  word_t mem_rdata = '0, ac = '0, pc = '0, sw = '0;
  word_t mb;
  logic  mb_zero;
  word_t exp_mb;
  int checks = 0, failures = 0;

  pdp8_mb dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step();
    @(negedge clk);
    checks++;
    if (mb !== exp_mb || mb_zero !== (exp_mb == 12'o0)) begin
      failures++;
      if (failures < 10) $display("FAIL mb=%o expected %o", mb, exp_mb);
    end
    ctl = '0;
  endtask

  initial begin
    exp_mb = '0;
    @(negedge clk); rst_n = 1'b1;
    for (int k = 0; k < 4000; k++) begin
      mem_rdata = 12'($urandom); ac = 12'($urandom); pc = 12'($urandom); sw = 12'($urandom);
      case ($urandom_range(0, 7))
        0: begin ctl.mem_mb = 1'b1;  exp_mb = mem_rdata; end
        1: begin ctl.clear_mb = 1'b1; exp_mb = '0; end
        2: begin ctl.ac_mb = 1'b1;   exp_mb = ac; end
        3: begin ctl.pc_mb = 1'b1;   exp_mb = pc; end
        4: begin ctl.sw_mb = 1'b1;   exp_mb = sw; end
        5: begin ctl.inc_mb = 1'b1;  exp_mb = exp_mb + 12'd1; end
        6: begin
          ctl.add_step = 1'b1;
          // bit i of the result is the carry out of bit i+1
          for (int i = 0; i < 11; i++) exp_mb[i] = ac[i+1] & exp_mb[i+1];
          exp_mb[11] = 1'b0;
        end
        default: ;
      endcase
      step();
    end
    // whole serial additions: after twelve steps MB holds no carries
    for (int k = 0; k < 200; k++) begin
      word_t a, b, s;
      a = 12'($urandom); b = 12'($urandom);
      mem_rdata = b; ctl.mem_mb = 1'b1; exp_mb = b; step();
      s = a;
      for (int j = 0; j < 12; j++) begin
        ac = s;
        ctl.add_step = 1'b1;
        exp_mb = (s & exp_mb) << 1;
        s = s ^ mb;
        step();
      end
      checks++;
      if (s !== word_t'(a + b) || !mb_zero) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
