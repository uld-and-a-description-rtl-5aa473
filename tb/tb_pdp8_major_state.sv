// tb_pdp8_major_state: runs the major state generator on its own, with the
// instruction register and run bit modelled here and the instruction held in
// the memory buffer input. For each kind of instruction it checks the number
// of event times from the first event time of the fetch to the end of the
// instruction, and the transfers that make up its function: twelve serial
// addition steps for TAD, the skip of ISZ and of the group-2 and IOT tests,
// the auto-index increment and write-back in the defer cycle, rotation
// through the shift register, HLT, ION, the interrupt sequence (JMS to 0),
// and the front-panel deposit, start and continue keys.
module tb_pdp8_major_state;
  import pdp8_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  opcode_t    ir;
  logic       is_mri;
  word_t      mb = '0, mar = '0, ac = '0;
  logic       link = 1'b0, mb_zero = 1'b0, kbf = 1'b0, tpf = 1'b0;
  logic       run;
  logic       int_ok = 1'b0;
  panel_t     panel = '0;
  ctl_t       ctl;
  major_t     major;
  logic [3:0] et;
  logic       instr_done;
  int checks = 0, failures = 0;

  pdp8_major_state dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)             ir <= OP_AND;
    else if (ctl.force_jms) ir <= OP_JMS;
    else if (ctl.mb_ir)     ir <= opcode_t'(mb[0:2]);
  assign is_mri = ir < OP_IOT;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)             run <= 1'b0;
    else if (ctl.clear_run) run <= 1'b0;
    else if (ctl.set_run)   run <= 1'b1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  typedef struct {
    int cycles, add, skip, inc_mb, mb_mem, shift, halt, ion, int_ack, mar_pc, mb_pc, defer;
  } counts_t;

  // Runs one instruction from the first event time of its fetch.
  task automatic run_instr(input word_t w, output counts_t c);
    c = '{default: 0};
    mb = w;
    #1;
    check(major == MS_FETCH && et == 4'd0, $sformatf("%o starts at fetch 0", w));
    forever begin
      c.cycles++;
      if (ctl.add_step) c.add++;
      if (ctl.inc_pc && ((major == MS_FETCH && et >= 4'd3) || major == MS_EXECUTE)) c.skip++;
      if (ctl.inc_mb) c.inc_mb++;
      if (ctl.mb_mem) c.mb_mem++;
      if (ctl.ac_shift) c.shift++;
      if (ctl.clear_run) c.halt++;
      if (ctl.ion) c.ion++;
      if (ctl.int_ack) c.int_ack++;
      if (ctl.mar_pc) c.mar_pc++;
      if (ctl.mb_pc) c.mb_pc++;
      if (major == MS_DEFER) c.defer++;
      if (ctl.instr_end || c.cycles > 40) begin
        @(negedge clk);
        break;
      end
      @(negedge clk);
    end
  endtask

  task automatic press(input panel_t key);
    panel = key;
    @(negedge clk);
    panel = '0;
  endtask

  initial begin
    counts_t c;
    @(negedge clk); rst_n = 1'b1;
    @(negedge clk);
    check(major == MS_PANEL, "reset to panel");

    // panel deposit: MAR <- PC with MB <- SR, then write and advance
    press(6'b000010);
    check(ctl.pc_mar && ctl.sw_mb, "deposit first event time");
    @(negedge clk);
    check(ctl.mb_mem && ctl.inc_pc, "deposit second event time");
    @(negedge clk);
    press(6'b001000);                          // start
    check(ctl.set_run && ctl.clear_ac && ctl.clear_link, "start");
    @(negedge clk);

    run_instr(12'o0123, c);                    // AND direct
    check(c.cycles == 7, $sformatf("AND cycles %0d", c.cycles));
    run_instr(12'o1256, c);                    // TAD current page
    check(c.cycles == 18 && c.add == 12, $sformatf("TAD cycles %0d steps %0d", c.cycles, c.add));
    mar = 12'o0300;
    run_instr(12'o1500, c);                    // TAD indirect, no auto-index
    check(c.cycles == 22 && c.defer == 4 && c.inc_mb == 0, $sformatf("TAD I cycles %0d", c.cycles));
    mar = 12'o0012;
    run_instr(12'o1412, c);                    // TAD I 12: auto-index
    check(c.cycles == 23 && c.defer == 5 && c.inc_mb == 1 && c.mb_mem == 1,
          $sformatf("auto-index cycles %0d", c.cycles));
    mb_zero = 1'b1;
    run_instr(12'o2050, c);                    // ISZ, result zero
    check(c.cycles == 8 && c.skip == 1 && c.inc_mb == 1 && c.mb_mem == 1, "ISZ skip");
    mb_zero = 1'b0;
    run_instr(12'o2050, c);                    // ISZ, no skip
    check(c.cycles == 8 && c.skip == 0, "ISZ no skip");
    run_instr(12'o3050, c);                    // DCA
    check(c.cycles == 7 && c.mb_mem == 1, "DCA");
    run_instr(12'o4050, c);                    // JMS
    check(c.cycles == 8 && c.mb_mem == 1 && c.mar_pc == 1, "JMS");
    run_instr(12'o5050, c);                    // JMP direct
    check(c.cycles == 5 && c.mar_pc == 1, "JMP");
    mar = 12'o0050;
    run_instr(12'o5450, c);                    // JMP indirect
    check(c.cycles == 8 && c.mar_pc == 0 && c.mb_pc == 1, "JMP I");
    run_instr(12'o7200, c);                    // CLA
    check(c.cycles == 7 && c.shift == 0, "OPR group 1");
    run_instr(12'o7004, c);                    // RAL
    check(c.cycles == 8 && c.shift == 1, "RAL");
    run_instr(12'o7014, c);                    // RAL RAR: refused
    check(c.cycles == 7 && c.shift == 0, "both rotations refused");
    ac = 12'o4000;
    run_instr(12'o7500, c);                    // SMA, AC negative
    check(c.cycles == 6 && c.skip == 1, "SMA skip");
    run_instr(12'o7510, c);                    // SPA, AC negative
    check(c.skip == 0, "SPA no skip");
    link = 1'b0;
    run_instr(12'o7410, c);                    // SKP
    check(c.skip == 1, "SKP");
    kbf = 1'b1;
    run_instr(12'o6031, c);                    // KSF, flag set
    check(c.cycles == 6 && c.skip == 1, "KSF skip");
    kbf = 1'b0;
    run_instr(12'o6031, c);
    check(c.skip == 0, "KSF no skip");
    run_instr(12'o6001, c);                    // ION
    check(c.ion == 1, "ION");
    int_ok = 1'b1;
    run_instr(12'o7000, c);                    // interrupt instead of fetch
    int_ok = 1'b0;
    check(c.cycles == 5 && c.int_ack == 1 && c.mb_mem == 1 && c.mar_pc == 1 && ir == OP_JMS,
          $sformatf("interrupt cycles %0d ack %0d mem %0d marpc %0d ir %0d", c.cycles, c.int_ack, c.mb_mem, c.mar_pc, ir));
    run_instr(12'o7402, c);                    // HLT
    check(c.halt == 1 && c.cycles == 6, "HLT");
    @(negedge clk);
    check(major == MS_PANEL && !run, "halted in panel state");
    press(6'b010000);                          // continue
    check(ctl.set_run && !ctl.clear_ac, "continue");
    @(negedge clk);
    // stop key: run clears at the end of the current instruction
    panel = 6'b100000;
    run_instr(12'o7000, c);
    panel = '0;
    check(c.halt == 1, "stop key");
    @(negedge clk);
    check(major == MS_PANEL, "stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
