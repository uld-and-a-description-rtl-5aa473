// tb_pdp8_state_bits: checks the run bit (set, cleared, clear wins), the
// interrupt bit (set by a pulse, held, cleared when taken), and the
// interrupt enable with its one-instruction delay: after an ION an interrupt
// is allowed only once the instruction that follows the ION has ended; IOF
// and taking an interrupt clear the enable.
//
// A second, random phase runs 3000 instructions of 3 to 18 event times. Each
// one issues ION, IOF or neither at a random event time, interrupt pulses and
// run set/clear commands arrive at random cycles, and a pending interrupt is
// taken at an instruction boundary when allowed (its first cycle carries the
// acknowledge). An instruction-level model, which only remembers whether the
// instruction that just ended was an ION, predicts int_bit, enable and run
// every cycle and int_ok at every instruction boundary.
module tb_pdp8_state_bits;
  import pdp8_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  ctl_t ctl = '0;
  logic int_pulse = 1'b0;
  logic int_bit, enable, int_ok, run;
  int checks = 0, failures = 0;

  pdp8_state_bits dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bits(input logic e_int, e_en, e_ok, e_run, input string what);
    checks++;
    if (int_bit !== e_int || enable !== e_en || int_ok !== e_ok || run !== e_run) begin
      failures++;
      $display("FAIL %s: int=%b en=%b ok=%b run=%b", what, int_bit, enable, int_ok, run);
    end
  endtask

  // One instruction of n event times; ion/iof issued in its first.
  task automatic instr(input int n, input bit ion, input bit iof);
    for (int i = 0; i < n; i++) begin
      ctl = '0;
      if (i == 0) begin ctl.ion = ion; ctl.iof = iof; end
      if (i == n - 1) ctl.instr_end = 1'b1;
      @(negedge clk);
    end
    ctl = '0;
  endtask

  initial begin
    @(negedge clk); rst_n = 1'b1;
    expect_bits(0, 0, 0, 0, "reset");
    ctl.set_run = 1'b1; @(negedge clk); ctl = '0;
    expect_bits(0, 0, 0, 1, "run set");
    int_pulse = 1'b1; @(negedge clk); int_pulse = 1'b0;
    expect_bits(1, 0, 0, 1, "interrupt pending, not enabled");
    instr(6, 1, 0);                       // ION
    expect_bits(1, 1, 0, 1, "after ION: delayed");
    instr(5, 0, 0);                       // the instruction after ION
    expect_bits(1, 1, 1, 1, "one instruction later: allowed");
    ctl.int_ack = 1'b1; @(negedge clk); ctl = '0;
    expect_bits(0, 0, 0, 1, "interrupt taken");
    instr(6, 1, 0);
    instr(6, 0, 1);                       // IOF
    int_pulse = 1'b1; @(negedge clk); int_pulse = 1'b0;
    expect_bits(1, 0, 0, 1, "IOF");
    instr(6, 1, 0);
    instr(3, 0, 0);
    expect_bits(1, 1, 1, 1, "enabled again");
    ctl.int_ack = 1'b1; int_pulse = 1'b1; @(negedge clk); ctl = '0; int_pulse = 1'b0;
    expect_bits(1, 0, 0, 1, "new pulse wins over acknowledge");
    ctl.set_run = 1'b1; ctl.clear_run = 1'b1; @(negedge clk); ctl = '0;
    expect_bits(1, 0, 0, 0, "clear run wins");

    // ---- random phase against the instruction-level model
    begin
      logic m_int, m_en, m_run, last_ion, take;
      int n, at, kind, n_taken = 0, n_delayed = 0;
      m_int = int_bit; m_en = enable; m_run = run; last_ion = 1'b0;
      for (int k = 0; k < 3000; k++) begin
        // instruction boundary: is an interrupt allowed now?
        checks++;
        if (int_ok !== (m_int && m_en && !last_ion)) begin
          failures++;
          $display("FAIL boundary %0d: int_ok=%b model int=%b en=%b last_ion=%b",
                   k, int_ok, m_int, m_en, last_ion);
        end
        if (m_int && m_en && last_ion) n_delayed++;
        take = m_int && m_en && !last_ion && ($urandom_range(0, 3) != 0);
        n    = $urandom_range(3, 18);
        at   = $urandom_range(0, n - 1);
        kind = take ? 0 : $urandom_range(0, 3);   // 1: ION, 2: IOF
        for (int i = 0; i < n; i++) begin
          ctl = '0;
          ctl.int_ack   = take && i == 0;
          ctl.ion       = kind == 1 && i == at;
          ctl.iof       = kind == 2 && i == at;
          ctl.instr_end = i == n - 1;
          ctl.set_run   = $urandom_range(0, 30) == 0;
          ctl.clear_run = $urandom_range(0, 30) == 0;
          int_pulse     = $urandom_range(0, 40) == 0;
          // model, cycle by cycle
          if (int_pulse)        m_int = 1'b1;
          else if (ctl.int_ack) m_int = 1'b0;
          if (ctl.int_ack || ctl.iof) m_en = 1'b0;
          else if (ctl.ion)           m_en = 1'b1;
          if (ctl.clear_run)    m_run = 1'b0;
          else if (ctl.set_run) m_run = 1'b1;
          @(negedge clk);
          checks++;
          if (int_bit !== m_int || enable !== m_en || run !== m_run) begin
            failures++;
            $display("FAIL instr %0d et %0d: int=%b/%b en=%b/%b run=%b/%b", k, i,
                     int_bit, m_int, enable, m_en, run, m_run);
          end
        end
        ctl = '0;
        int_pulse = 1'b0;
        last_ion = kind == 1;
        if (take) n_taken++;
      end
      checks++;
      if (n_taken == 0 || n_delayed == 0) begin
        failures++;
        $display("FAIL random phase: taken=%0d delayed=%0d", n_taken, n_delayed);
      end
      $display("random phase: interrupts taken %0d, held back by ION delay %0d",
               n_taken, n_delayed);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
