// tb_pdp8_shift: loads the shift register from random link and accumulator
// values with every rotate request (none, left, right, once or twice, and
// both directions at once) and compares with a rotation of the thirteen-bit
// ring computed here one bit at a time.
module tb_pdp8_shift;
  import pdp8_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  ctl_t  ctl = '0;
  word_t ac = '0;
  logic  link = 1'b0;
  logic [0:12] q, exp_q;
  int checks = 0, failures = 0;

  pdp8_shift dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_q = '0;
    @(negedge clk); rst_n = 1'b1;
    for (int k = 0; k < 3000; k++) begin
      logic [0:12] r;
      ctl = '0;
      ac = 12'($urandom); link = 1'($urandom);
      ctl.rot_left  = 1'($urandom);
      ctl.rot_right = 1'($urandom);
      ctl.rot_two   = 1'($urandom);
      ctl.ac_shift  = ($urandom_range(0, 3) != 0);
      if (ctl.ac_shift) begin
        r = {link, ac};
        if (ctl.rot_left != ctl.rot_right) begin
          repeat (ctl.rot_two ? 2 : 1) begin
            logic t;
            if (ctl.rot_left) begin
              t = r[0];
              for (int i = 0; i < 12; i++) r[i] = r[i+1];
              r[12] = t;
            end else begin
              t = r[12];
              for (int i = 12; i > 0; i--) r[i] = r[i-1];
              r[0] = t;
            end
          end
        end
        exp_q = r;
      end
      @(negedge clk);
      checks++;
      if (q !== exp_q) begin
        failures++;
        if (failures < 10) $display("FAIL q=%b expected %b", q, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
