// tb_pdp8_top: end-to-end test of the PDP-8-like machine at its full size
// (4096 words).
//
// Phase 1 (directed): a program is loaded through the front panel (load
// address, deposit), started, and exercises the teletype: it waits for each
// keystroke (KSF), reads it (KRB), prints it (TLS), waits for the printer
// (TSF), counts three characters with ISZ, then jumps to a TAD placed in the
// last word of a page, which takes its operand from the following page because
// the current page is read from the already advanced program counter. The
// printed characters, the final accumulator, the program counter, and the
// counter word (read back with the panel examine key) are checked. A small
// teletype model in this file types characters and answers each print request
// after a delay.
//
// Phase 2 (random): all 4096 words are filled with random instructions through
// the panel, and the machine runs them while an instruction-level reference
// model, written here independently of the RTL, executes the same program.
// After every instruction the accumulator, link and program counter are
// compared; at the end all of memory is compared. Interrupt pulses are given
// at random instruction boundaries; HLT is answered with the continue key.
// Every 200 instructions the stop key halts the machine and it is restarted
// at a random address, so that the run does not stay in one loop.
//
// Phase 3 (interrupts): a main program adds 1 to AC 64 times with interrupts
// enabled while 15 interrupt pulses arrive; the handler at 0020 saves AC,
// counts, restores AC and returns with ION; JMP I 0. Some pulses arrive while
// the handler runs and must wait until it has returned. The final AC, the halt
// address and the count of interrupts taken are checked.
//
// Every mechanism of the machine is counted (defer, auto-index, interrupt,
// rotate, serial addition, skips, JMS, halt, stop, panel keys, keyboard and
// printer flags, the last-word-of-page addressing) and one that never happened
// counts as a failure.
module tb_pdp8_top;
  import pdp8_pkg::*;

  localparam int unsigned N_RANDOM = 30000;   // instructions in phase 2
  localparam int unsigned RESTART  = 200;     // stop and restart elsewhere
  localparam int unsigned WATCHDOG = 3_000_000;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  word_t   sw = '0;
  panel_t  panel = '0;
  logic    int_pulse = 1'b0;
  logic    kbd_strobe = 1'b0;
  byte_t   kbd_char = '0;
  logic    tpr_done = 1'b0;
  logic    tpr_start;
  byte_t   tto;
  word_t   ac, pc, mb, mar;
  logic    link, run, instr_done, int_bit, enable;
  opcode_t ir;
  major_t  major;
  logic [3:0] et;

  pdp8_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------
  // Front panel helpers
  task automatic press(input panel_t key);
    @(negedge clk);
    panel = key;
    @(negedge clk);
    panel = '0;
    repeat (4) @(negedge clk);
  endtask

  task automatic load_address(input word_t a);
    sw = a;
    press(6'b000001);
  endtask

  task automatic deposit(input word_t d);
    sw = d;
    press(6'b000010);
  endtask

  task automatic examine(output word_t d);
    press(6'b000100);
    d = mb;
  endtask

  task automatic wait_halt(input int max_cycles);
    int n = 0;
    do begin
      @(negedge clk);
      n++;
    end while ((run || major != MS_PANEL) && n < max_cycles);
    check(!run && major == MS_PANEL, "machine halted");
  endtask

  // ------------------------------------------------------------------
  // Mechanism counters, sampled from the control word every cycle.
  int n_defer, n_autoindex, n_int, n_rotate, n_add_step, n_isz_skip, n_opr_skip;
  int n_jms, n_jmp, n_halt, n_stop, n_kbd, n_print, n_iot_skip, n_deposit;
  int n_examine, n_load, n_start, n_cont, n_last_word, n_ion, n_iof, n_rot_refused;

  always @(negedge clk) if (rst_n) begin
    ctl_t c;
    c = dut.ctl;
    if (major == MS_DEFER && et == 4'd0) n_defer++;
    if (major == MS_DEFER && c.inc_mb)   n_autoindex++;
    if (c.int_ack)   n_int++;
    if (c.ac_shift)  n_rotate++;
    if (c.add_step)  n_add_step++;
    if (major == MS_EXECUTE && ir == OP_ISZ && c.inc_pc) n_isz_skip++;
    if (major == MS_FETCH && ir == OP_OPR && et == 4'd3 && c.inc_pc) n_opr_skip++;
    if (major == MS_FETCH && ir == OP_IOT && et >= 4'd3 && c.inc_pc) n_iot_skip++;
    if (major == MS_EXECUTE && ir == OP_JMS && c.mar_pc) n_jms++;
    if (ir == OP_JMP && (c.mar_pc || c.mb_pc)) n_jmp++;
    if (c.clear_run && major == MS_FETCH && ir == OP_OPR && mb[B_HLT]) n_halt++;
    if (major == MS_FETCH && ir == OP_OPR && !mb[B_GRP] && et == 4'd6 &&
        mb[B_RAL] && mb[B_RAR]) n_rot_refused++;
    if (c.mb_mar_pg && mb[B_PAGE] && pc[5:11] == '0) n_last_word++;
    if (c.ion) n_ion++;
    if (c.iof) n_iof++;
    if (kbd_strobe) n_kbd++;
    if (tpr_start)  n_print++;
    if (major == MS_PANEL && c.sw_mb)  n_deposit++;
    if (major == MS_PANEL && c.mem_mb) n_examine++;
    if (c.sw_pc) n_load++;
    if (c.set_run && c.clear_ac) n_start++;
    if (c.set_run && !c.clear_ac) n_cont++;
  end

  // ------------------------------------------------------------------
  // Teletype model: records printed characters, answers after a delay.
  byte_t printed[$];
  bit    tty_auto = 1'b1;

  always @(posedge clk) begin
    if (tpr_start && tty_auto) begin
      printed.push_back(tto);
      fork
        begin
          repeat (25) @(negedge clk);
          tpr_done = 1'b1;
          @(negedge clk);
          tpr_done = 1'b0;
        end
      join_none
    end
  end

  // ------------------------------------------------------------------
  // Reference model of the instruction set.
  word_t m_mem [4096];
  word_t m_ac, m_pc;
  logic  m_link, m_int, m_en, m_delay;

  function automatic word_t ea(input word_t instr, input word_t pc_next);
    word_t a, p;
    a = {instr[B_PAGE] ? pc_next[0:4] : 5'b0, instr[5:11]};
    if (instr[B_IND]) begin
      p = a;
      if (p[0:8] == 9'o001) m_mem[p] = m_mem[p] + 12'd1;
      a = m_mem[p];
    end
    return a;
  endfunction

  function automatic void model_step();
    word_t instr, a;
    logic [12:0] s;
    logic [0:12] r;
    logic ion_now, cond;
    ion_now = 1'b0;
    if (m_int && m_en && !m_delay) begin
      m_mem[0] = m_pc;
      m_pc     = 12'd1;
      m_en     = 1'b0;
      m_int    = 1'b0;
      m_delay  = 1'b0;
      return;
    end
    instr = m_mem[m_pc];
    m_pc  = m_pc + 12'd1;
    case (instr[0:2])
      3'o0: begin a = ea(instr, m_pc); m_ac = m_ac & m_mem[a]; end
      3'o1: begin
        a = ea(instr, m_pc);
        s = {1'b0, m_ac} + {1'b0, m_mem[a]};
        m_ac = s[11:0];
        if (s[12]) m_link = ~m_link;
      end
      3'o2: begin
        a = ea(instr, m_pc);
        m_mem[a] = m_mem[a] + 12'd1;
        if (m_mem[a] == '0) m_pc = m_pc + 12'd1;
      end
      3'o3: begin a = ea(instr, m_pc); m_mem[a] = m_ac; m_ac = '0; end
      3'o4: begin a = ea(instr, m_pc); m_mem[a] = m_pc; m_pc = a + 12'd1; end
      3'o5: begin a = ea(instr, m_pc); m_pc = a; end
      3'o6: begin
        case (instr[3:8])
          6'o00: begin
            if (instr[11]) begin m_en = 1'b1; ion_now = 1'b1; end
            if (instr[10]) m_en = 1'b0;
          end
          6'o03: if (instr[10]) m_ac = '0;   // keyboard flag and buffer are 0 here
          default: ;
        endcase
      end
      default: begin
        if (!instr[3]) begin
          if (instr[4]) m_ac = '0;
          if (instr[5]) m_link = 1'b0;
          if (instr[6]) m_ac = ~m_ac;
          if (instr[7]) m_link = ~m_link;
          if (instr[11]) begin
            s = {m_link, m_ac} + 13'd1;
            {m_link, m_ac} = s;
          end
          if (instr[9] != instr[8]) begin
            r = {m_link, m_ac};
            repeat (instr[10] ? 2 : 1) begin
              if (instr[9]) r = {r[1:12], r[0]};
              else          r = {r[12], r[0:11]};
            end
            {m_link, m_ac} = r;
          end
        end else begin
          cond = (instr[5] && m_ac[0]) || (instr[6] && m_ac == '0) || (instr[7] && m_link);
          if (cond ^ instr[8]) m_pc = m_pc + 12'd1;
          if (instr[4]) m_ac = '0;
          if (instr[9]) m_ac = m_ac | sw;
        end
      end
    endcase
    m_delay = ion_now;
  endfunction

  // Echo program at 0200 (octal).
  word_t prog1[9] = '{
    12'o6031,   // 0200 KSF          skip when a key has been struck
    12'o5200,   // 0201 JMP 0200
    12'o6036,   // 0202 KRB          AC <- keyboard buffer, clear flag
    12'o6046,   // 0203 TLS          print AC[4:11]
    12'o6041,   // 0204 TSF          skip when the printer is done
    12'o5204,   // 0205 JMP 0204
    12'o2220,   // 0206 ISZ 0220     count characters
    12'o5200,   // 0207 JMP 0200
    12'o5376    // 0210 JMP 0376
  };

  // Interrupt handler at 0020 (octal), entered through 0001.
  localparam int unsigned N_PULSES = 15;
  word_t handler[6] = '{
    12'o3030,   // 0020 DCA 0030     save AC
    12'o2031,   // 0021 ISZ 0031     count the interrupt
    12'o7000,   // 0022 NOP
    12'o1030,   // 0023 TAD 0030     restore AC
    12'o6001,   // 0024 ION          takes effect after the next instruction
    12'o5400    // 0025 JMP I 0      return
  };
  // Main program at 0200: adds 1 to AC 64 times with interrupts enabled.
  word_t mainprog[6] = '{
    12'o6001,   // 0200 ION
    12'o7300,   // 0201 CLA CLL
    12'o1210,   // 0202 TAD 0210
    12'o2211,   // 0203 ISZ 0211
    12'o5202,   // 0204 JMP 0202
    12'o7402    // 0205 HLT
  };

  // ------------------------------------------------------------------
  initial begin : main
    word_t w;
    byte_t typed[3];
    int    cyc;
    int    ninstr;
    bit    cmp_pending;
    bit    restarting;
    bit    finished;
    int    next_restart;

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // ---------------- phase 1: teletype echo and last word of a page
    load_address(12'o0200);
    foreach (prog1[i]) deposit(prog1[i]);
    load_address(12'o0220);  deposit(12'o7775);
    load_address(12'o0376);  deposit(12'o7300); deposit(12'o1201); deposit(12'o7402);
    deposit(12'o0123);       // 0401: operand seen from the last word of page 1
    examine(w);              // 0402 holds whatever; checks examine advances PC
    check(pc == 12'o0403, "examine advances the program counter");
    load_address(12'o0200);
    check(pc == 12'o0200, "load address");
    press(6'b001000);        // start
    typed[0] = 8'o301; typed[1] = 8'o302; typed[2] = 8'o215;
    for (int k = 0; k < 3; k++) begin
      repeat (60 + 17 * k) @(negedge clk);
      kbd_char   = typed[k];
      kbd_strobe = 1'b1;
      @(negedge clk);
      kbd_strobe = 1'b0;
    end
    wait_halt(20000);
    check(printed.size() == 3, "three characters printed");
    for (int k = 0; k < 3 && k < printed.size(); k++)
      check(printed[k] == typed[k], $sformatf("printed char %0d", k));
    check(ac == 12'o0123, $sformatf("TAD from last word used next page: AC=%o", ac));
    check(pc == 12'o0401, $sformatf("halt PC=%o", pc));
    load_address(12'o0220);
    examine(w);
    check(w == 12'o0000, "ISZ counter reached zero");

    // ---------------- phase 2: random program against the reference model
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    tty_auto = 1'b0;
    @(negedge clk);
    load_address(12'o0000);
    for (int i = 0; i < 4096; i++) begin
      // mostly random words, with more interrupt on/off instructions than
      // chance would give
      case ($urandom_range(0, 99))
        0, 1:    w = 12'o6001;  // ION
        2:       w = 12'o6002;  // IOF
        default: w = 12'($urandom);
      endcase
      m_mem[i] = w;
      deposit(w);
    end
    sw = 12'($urandom);
    w  = 12'($urandom_range(0, 4095));
    load_address(w);
    m_pc = w; m_ac = '0; m_link = 1'b0; m_int = 1'b0; m_en = 1'b0; m_delay = 1'b0;
    press(6'b001000);        // start
    ninstr = 0;
    cmp_pending = 1'b0;
    restarting = 1'b0;
    finished = 1'b0;
    next_restart = RESTART;
    cyc = 0;
    while (!finished) begin
      @(negedge clk);
      cyc++;
      int_pulse = 1'b0;
      if (cmp_pending) begin
        cmp_pending = 1'b0;
        check(ac == m_ac && link == m_link && pc == m_pc,
              $sformatf("instr %0d: AC=%o L=%b PC=%o, expected AC=%o L=%b PC=%o",
                        ninstr, ac, link, pc, m_ac, m_link, m_pc));
        if (ac != m_ac || link != m_link || pc != m_pc) begin
          m_ac = ac; m_link = link; m_pc = pc;   // resynchronise, keep going
        end
      end
      if (instr_done) begin
        model_step();
        ninstr++;
        cmp_pending = 1'b1;
        if ($urandom_range(0, 99) < 3) begin
          int_pulse = 1'b1;
          m_int = 1'b1;
        end
      end else if (!run && major == MS_PANEL && ninstr >= N_RANDOM) begin
        finished = 1'b1;     // stopped at an instruction boundary
      end else if (!run && major == MS_PANEL) begin
        if (restarting) begin
          // restart the random program somewhere else
          restarting = 1'b0;
          w = 12'($urandom);
          load_address(w);
          m_pc = w;
        end
        press(6'b010000);    // continue after HLT or stop
      end else if (!restarting && (ninstr >= next_restart || ninstr >= N_RANDOM) && run) begin
        restarting   = 1'b1;
        next_restart = next_restart + RESTART;
        panel = 6'b100000;   // stop key for one cycle
        @(negedge clk);
        panel = '0;
        n_stop++;
        // an instruction may have ended in this cycle
        if (instr_done) begin
          model_step();
          ninstr++;
          cmp_pending = 1'b1;
        end
      end
    end
    int_pulse = 1'b0;
    for (int i = 0; i < 4096; i++)
      check(dut.u_mem.store[i] == m_mem[i], $sformatf("memory %o", i));

    // ---------------- phase 3: interrupt handler round trips
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    load_address(12'o0001);
    deposit(12'o5020);                       // 0001 JMP 0020
    load_address(12'o0020);
    foreach (handler[i]) deposit(handler[i]);
    deposit(12'o0000);                       // 0026 (unused)
    deposit(12'o0000);                       // 0027
    deposit(12'o0000);                       // 0030 saved AC
    deposit(12'o0000);                       // 0031 interrupt count
    load_address(12'o0200);
    foreach (mainprog[i]) deposit(mainprog[i]);
    load_address(12'o0210);
    deposit(12'o0001);                       // 0210 constant 1
    deposit(12'o7700);                       // 0211 loop count -64
    load_address(12'o0200);
    press(6'b001000);                        // start
    repeat (50) @(negedge clk);
    for (int k = 0; k < N_PULSES; k++) begin
      int_pulse = 1'b1;
      @(negedge clk);
      int_pulse = 1'b0;
      repeat (96) @(negedge clk);
    end
    wait_halt(20000);
    check(ac == 12'o0100 && !link, $sformatf("handler preserved AC: %o", ac));
    check(pc == 12'o0206, $sformatf("main program halt PC=%o", pc));
    load_address(12'o0031);
    examine(w);
    check(w == 12'(N_PULSES), $sformatf("interrupts taken %0d of %0d", w, N_PULSES));

    // ---------------- mechanisms
    check(n_defer > 0, "defer cycle");
    check(n_autoindex > 0, "auto-index");
    check(n_int > 0, "interrupt taken");
    check(n_rotate > 0, "rotate through shift register");
    check(n_rot_refused > 0, "simultaneous left and right rotate refused");
    check(n_add_step > 0, "serial addition");
    check(n_isz_skip > 0, "ISZ skip");
    check(n_opr_skip > 0, "OPR group 2 skip");
    check(n_iot_skip > 0, "IOT flag skip");
    check(n_jms > 0, "JMS");
    check(n_jmp > 0, "JMP");
    check(n_halt > 0, "HLT");
    check(n_stop > 0, "stop key");
    check(n_kbd > 0, "keyboard strobe");
    check(n_print > 0, "teleprinter output");
    check(n_deposit > 0 && n_examine > 0 && n_load > 0 && n_start > 0 && n_cont > 0,
          "front panel keys");
    check(n_last_word > 0, "addressing from the last word of a page");
    check(n_ion > 0 && n_iof > 0, "ION and IOF");
    $display("mechanisms: defer=%0d autoindex=%0d int=%0d rotate=%0d rot_refused=%0d add_step=%0d isz_skip=%0d opr_skip=%0d iot_skip=%0d jms=%0d jmp=%0d hlt=%0d stop=%0d kbd=%0d print=%0d deposit=%0d examine=%0d load=%0d start=%0d cont=%0d last_word=%0d ion=%0d iof=%0d",
             n_defer, n_autoindex, n_int, n_rotate, n_rot_refused, n_add_step, n_isz_skip,
             n_opr_skip, n_iot_skip, n_jms, n_jmp, n_halt, n_stop, n_kbd, n_print,
             n_deposit, n_examine, n_load, n_start, n_cont, n_last_word, n_ion, n_iof);
    $display("random phase: %0d instructions in %0d cycles", ninstr, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


endmodule
