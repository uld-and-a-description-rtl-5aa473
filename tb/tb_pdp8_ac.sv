// tb_pdp8_ac: drives the accumulator and link with random combinations of
// the group-1 style commands (clear, complement, increment) and with single
// transfers (AND with the memory buffer, OR of switches, OR of the keyboard
// buffer into bits 4-11, reload from the shift register), comparing with a
// thirteen-bit arithmetic model. It then runs complete serial additions, the
// memory buffer's carry half modelled here, and checks AC = AC + MB with the
// carry complementing the link after twelve steps.
module tb_pdp8_ac;
  import pdp8_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  ctl_t  ctl = '0;
  word_t mb = '0, sw = '0;
  byte_t tti = '0;
  logic [0:12] shift_q = '0;
  word_t ac;
  logic  link;
  logic [12:0] m;          // {link, ac} model, ordinary numbering
  int checks = 0, failures = 0;

  pdp8_ac dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step();
    @(negedge clk);
    checks++;
    if ({link, ac} !== m) begin
      failures++;
      if (failures < 10) $display("FAIL L,AC=%b,%o expected %b,%o", link, ac, m[12], m[11:0]);
    end
    ctl = '0;
  endtask

  initial begin
    m = '0;
    @(negedge clk); rst_n = 1'b1;
    for (int k = 0; k < 4000; k++) begin
      mb = 12'($urandom); sw = 12'($urandom); tti = 8'($urandom); shift_q = 13'($urandom);
      if ($urandom_range(0, 1)) begin
        ctl.clear_ac   = 1'($urandom);
        ctl.clear_link = 1'($urandom);
        ctl.cmp_ac     = 1'($urandom);
        ctl.cmp_link   = 1'($urandom);
        ctl.inc_ac     = 1'($urandom);
        if (ctl.clear_ac)   m[11:0] = '0;
        if (ctl.clear_link) m[12] = 1'b0;
        if (ctl.cmp_ac)     m[11:0] = ~m[11:0];
        if (ctl.cmp_link)   m[12] = ~m[12];
        if (ctl.inc_ac)     m = m + 13'd1;
      end else begin
        case ($urandom_range(0, 3))
          0: begin ctl.ac_and_mb = 1'b1; m[11:0] = m[11:0] & mb; end
          1: begin ctl.sw_or_ac = 1'b1;  m[11:0] = m[11:0] | sw; end
          2: begin ctl.kbd_in = 1'b1;    m[7:0] = m[7:0] | tti; end
          default: begin ctl.shift_ac = 1'b1; m = shift_q; end
        endcase
      end
      step();
    end
    for (int k = 0; k < 300; k++) begin
      word_t b, carries;
      logic [12:0] sum;
      b = 12'($urandom);
      sum = {1'b0, m[11:0]} + {1'b0, b};
      m = {m[12] ^ sum[12], sum[11:0]};
      carries = b;
      for (int j = 0; j < 12; j++) begin
        mb = carries;
        ctl.add_step = 1'b1;
        carries = (ac & carries) << 1;
        @(negedge clk);
        ctl = '0;
      end
      checks++;
      if ({link, ac} !== m) begin
        failures++;
        if (failures < 10) $display("FAIL add: L,AC=%b,%o expected %b,%o", link, ac, m[12], m[11:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
