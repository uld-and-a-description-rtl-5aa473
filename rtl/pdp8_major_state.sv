// pdp8_major_state: the major state generator, the control unit of the
// machine.
//
// It steps through the major states fetch, defer and execute, one event time
// per clock, and in each event time issues a set of register transfers (ctl).
// Transfers issued together never modify the same register. While the run
// bit is clear it sits in the panel state and carries out front-panel keys.
//
// Fetch (FETCH, event times 0-7):
//   0  if the run bit is clear: go to the panel state.
//      if an interrupt may be taken: MB <- 0, IR <- JMS, acknowledge; event
//      time 8 then copies MB to MAR and the JMS execute cycle stores the
//      program counter in location 0 and continues at location 1.
//      otherwise MAR <- PC.
//   1  MB <- M[MAR]           2  IR <- MB[0:2], PC <- PC + 1
//   memory reference: 3 MAR <- page-or-zero, MB[5:11]; 4 go to defer when
//   bit 3 is set, else finish a direct JMP (PC <- MAR) or go to execute.
//   IOT: event times 3, 4, 5 issue the pulses selected by bits 11, 10, 9
//   (IOP1, IOP2, IOP4) to the device in bits 3-8.
//   OPR group 1 (bit 3 clear): 3 CLA CLL, 4 CMA CML, 5 IAC, 6 load the shift
//   register rotated (RAR, RAL, twice with bit 10), 7 copy it back.
//   OPR group 2 (bit 3 set): 3 skip test (SMA SZA SNL, reversed by bit 8),
//   4 CLA, 5 OSR and HLT.
// Defer (DEFER, 0-4): 0 MB <- M[MAR]; for a pointer in 0010-0017 (octal)
//   1 MB <- MB + 1, 2 M[MAR] <- MB (auto-index); 3 an indirect JMP ends
//   with PC <- MB, any other instruction takes MAR <- MB; 4 go to execute.
// Execute (EXECUTE):
//   AND  0 MB <- M[MAR]; 1 AC <- AC and MB.
//   TAD  0 MB <- M[MAR], count register <- 12; 1 one serial-addition step per
//        event time until the count register runs out (twelve steps).
//   ISZ  0 MB <- M[MAR]; 1 MB <- MB + 1; 2 M[MAR] <- MB, skip if MB is zero.
//   DCA  0 MB <- AC; 1 M[MAR] <- MB, AC <- 0.
//   JMS  0 MB <- PC; 1 M[MAR] <- MB, PC <- MAR; 2 PC <- PC + 1.
// Panel (PANEL): load address PC <- SR; deposit MAR <- PC, MB <- SR, then
//   M[MAR] <- MB, PC <- PC + 1; examine MAR <- PC, then MB <- M[MAR],
//   PC <- PC + 1; start clears AC and L and sets run; continue sets run. The
//   stop key clears run at the end of the current instruction.
// The last event time of each instruction raises ctl.instr_end.
//
// The three major states and the event-time structure follow the machine's
// description; the instruction set, the order of the microinstructions within
// a group and the panel keys are those of the PDP-8 it is modelled on; the
// number of event times in each major state is this design's own.
module pdp8_major_state
  import pdp8_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  opcode_t     ir,
  input  logic        is_mri,
  input  word_t       mb,
  input  word_t       mar,
  input  word_t       ac,
  input  logic        link,
  input  logic        mb_zero,
  input  logic        kbf,
  input  logic        tpf,
  input  logic        run,
  input  logic        int_ok,
  input  panel_t      panel,
  output ctl_t        ctl,
  output major_t      major,
  output logic [3:0]  et,
  output logic        instr_done
);

  localparam logic [3:0] ET_INT = 4'd8;

  typedef enum logic [2:0] {
    PN_IDLE, PN_LOAD, PN_DEP, PN_EXAM, PN_START, PN_CONT
  } panel_op_t;

  major_t     major_d;
  logic [3:0] et_d;
  logic [3:0] count, count_d;
  panel_op_t  pop, pop_d;
  logic       stop_req, stop_req_d;

  logic [5:0] dev;
  logic       skip_g2;
  logic       autoindex;

  assign dev       = mb[3:8];
  assign skip_g2   = mb[B_REV] ^ ((mb[B_SMA] & ac[0]) | (mb[B_SZA] & (ac == '0)) |
                                  (mb[B_SNL] & link));
  assign autoindex = (mar[0:8] == 9'o001);

  // One event time's worth of an IOT pulse to the selected device.
  function automatic ctl_t iot_pulse(ctl_t c, int unsigned pulse);
    ctl_t r = c;
    unique case (dev)
      DEV_INT: begin
        if (pulse == 1) r.ion = 1'b1;
        if (pulse == 2) r.iof = 1'b1;
      end
      DEV_KBD: begin
        if (pulse == 1 && kbf) r.inc_pc = 1'b1;       // KSF
        if (pulse == 2) begin r.clear_ac = 1'b1; r.kbd_clear = 1'b1; end  // KCC
        if (pulse == 4) r.kbd_in = 1'b1;              // KRS
      end
      DEV_TPR: begin
        if (pulse == 1 && tpf) r.inc_pc = 1'b1;       // TSF
        if (pulse == 2) r.tpr_clear = 1'b1;           // TCF
        if (pulse == 4) r.ptr_out = 1'b1;             // TPC
      end
      default: ;
    endcase
    return r;
  endfunction

  always_comb begin
    ctl        = '0;
    major_d    = major;
    et_d       = et + 4'd1;
    count_d    = count;
    pop_d      = pop;
    stop_req_d = stop_req || (panel.stop && run);

    unique case (major)
      // ------------------------------------------------------------ panel
      MS_PANEL: begin
        et_d = 4'd0;
        unique case (pop)
          PN_IDLE: begin
            if      (panel.start)     pop_d = PN_START;
            else if (panel.cont)      pop_d = PN_CONT;
            else if (panel.load_addr) pop_d = PN_LOAD;
            else if (panel.deposit)   pop_d = PN_DEP;
            else if (panel.examine)   pop_d = PN_EXAM;
          end
          PN_LOAD: begin
            ctl.sw_pc = 1'b1;
            pop_d     = PN_IDLE;
          end
          PN_DEP: begin
            if (et == 4'd0) begin
              ctl.pc_mar = 1'b1;
              ctl.sw_mb  = 1'b1;
              et_d       = 4'd1;
            end else begin
              ctl.mb_mem = 1'b1;
              ctl.inc_pc = 1'b1;
              pop_d      = PN_IDLE;
            end
          end
          PN_EXAM: begin
            if (et == 4'd0) begin
              ctl.pc_mar = 1'b1;
              et_d       = 4'd1;
            end else begin
              ctl.mem_mb = 1'b1;
              ctl.inc_pc = 1'b1;
              pop_d      = PN_IDLE;
            end
          end
          PN_START, PN_CONT: begin
            ctl.set_run = 1'b1;
            if (pop == PN_START) begin
              ctl.clear_ac   = 1'b1;
              ctl.clear_link = 1'b1;
            end
            stop_req_d = 1'b0;
            pop_d      = PN_IDLE;
            major_d    = MS_FETCH;
          end
          default: pop_d = PN_IDLE;
        endcase
      end
      // ------------------------------------------------------------ fetch
      MS_FETCH: begin
        unique case (et)
          4'd0: begin
            if (!run) begin
              major_d = MS_PANEL;
              et_d    = 4'd0;
            end else if (int_ok) begin
              ctl.clear_mb  = 1'b1;
              ctl.force_jms = 1'b1;
              ctl.int_ack   = 1'b1;
              et_d          = ET_INT;
            end else begin
              ctl.pc_mar = 1'b1;
            end
          end
          4'd1: ctl.mem_mb = 1'b1;
          4'd2: begin
            ctl.mb_ir  = 1'b1;
            ctl.inc_pc = 1'b1;
          end
          ET_INT: begin
            ctl.mb_mar = 1'b1;
            major_d    = MS_EXECUTE;
            et_d       = 4'd0;
          end
          default: begin
            // event times 3..7: depend on the instruction
            if (is_mri) begin
              if (et == 4'd3) begin
                ctl.mb_mar_pg = 1'b1;
              end else begin
                et_d = 4'd0;
                if (mb[B_IND]) begin
                  major_d = MS_DEFER;
                end else if (ir == OP_JMP) begin
                  ctl.mar_pc    = 1'b1;
                  ctl.instr_end = 1'b1;
                end else begin
                  major_d = MS_EXECUTE;
                end
              end
            end else if (ir == OP_IOT) begin
              if (et == 4'd3 && mb[11]) ctl = iot_pulse(ctl, 1);
              if (et == 4'd4 && mb[10]) ctl = iot_pulse(ctl, 2);
              if (et == 4'd5) begin
                if (mb[9]) ctl = iot_pulse(ctl, 4);
                ctl.instr_end = 1'b1;
                et_d          = 4'd0;
              end
            end else if (!mb[B_GRP]) begin
              // OPR group 1
              unique case (et)
                4'd3: begin
                  ctl.clear_ac   = mb[B_CLA];
                  ctl.clear_link = mb[B_CLL];
                end
                4'd4: begin
                  ctl.cmp_ac   = mb[B_CMA];
                  ctl.cmp_link = mb[B_CML];
                end
                4'd5: ctl.inc_ac = mb[B_IAC];
                4'd6: begin
                  if (mb[B_RAL] ^ mb[B_RAR]) begin
                    ctl.ac_shift  = 1'b1;
                    ctl.rot_left  = mb[B_RAL];
                    ctl.rot_right = mb[B_RAR];
                    ctl.rot_two   = mb[B_TWO];
                  end else begin
                    ctl.instr_end = 1'b1;
                    et_d          = 4'd0;
                  end
                end
                default: begin
                  ctl.shift_ac  = 1'b1;
                  ctl.instr_end = 1'b1;
                  et_d          = 4'd0;
                end
              endcase
            end else begin
              // OPR group 2
              unique case (et)
                4'd3: ctl.inc_pc   = skip_g2;
                4'd4: ctl.clear_ac = mb[B_CLA];
                default: begin
                  ctl.sw_or_ac  = mb[B_OSR];
                  ctl.clear_run = mb[B_HLT];
                  ctl.instr_end = 1'b1;
                  et_d          = 4'd0;
                end
              endcase
            end
          end
        endcase
      end
      // ------------------------------------------------------------ defer
      MS_DEFER: begin
        unique case (et)
          4'd0: ctl.mem_mb = 1'b1;
          4'd1: begin
            if (autoindex) ctl.inc_mb = 1'b1;
            else           et_d       = 4'd3;
          end
          4'd2: ctl.mb_mem = 1'b1;
          4'd3: begin
            if (ir == OP_JMP) begin
              ctl.mb_pc     = 1'b1;
              ctl.instr_end = 1'b1;
              major_d       = MS_FETCH;
              et_d          = 4'd0;
            end else begin
              ctl.mb_mar = 1'b1;
            end
          end
          default: begin
            et_d    = 4'd0;
            major_d = MS_EXECUTE;
          end
        endcase
      end
      // ---------------------------------------------------------- execute
      default: begin
        unique case (ir)
          OP_AND: begin
            if (et == 4'd0) ctl.mem_mb = 1'b1;
            else begin
              ctl.ac_and_mb = 1'b1;
              ctl.instr_end = 1'b1;
            end
          end
          OP_TAD: begin
            if (et == 4'd0) begin
              ctl.mem_mb = 1'b1;
              count_d    = 4'(WORD_W);
            end else begin
              ctl.add_step = 1'b1;
              count_d      = count - 4'd1;
              et_d         = et;
              if (count == 4'd1) ctl.instr_end = 1'b1;
            end
          end
          OP_ISZ: begin
            if (et == 4'd0)      ctl.mem_mb = 1'b1;
            else if (et == 4'd1) ctl.inc_mb = 1'b1;
            else begin
              ctl.mb_mem    = 1'b1;
              ctl.inc_pc    = mb_zero;
              ctl.instr_end = 1'b1;
            end
          end
          OP_DCA: begin
            if (et == 4'd0) ctl.ac_mb = 1'b1;
            else begin
              ctl.mb_mem    = 1'b1;
              ctl.clear_ac  = 1'b1;
              ctl.instr_end = 1'b1;
            end
          end
          default: begin  // JMS (JMP, IOT and OPR never reach execute)
            if (et == 4'd0) ctl.pc_mb = 1'b1;
            else if (et == 4'd1) begin
              ctl.mb_mem = 1'b1;
              ctl.mar_pc = 1'b1;
            end else begin
              ctl.inc_pc    = 1'b1;
              ctl.instr_end = 1'b1;
            end
          end
        endcase
        if (ctl.instr_end) begin
          major_d = MS_FETCH;
          et_d    = 4'd0;
        end
      end
    endcase

    // The stop key takes effect at the end of the instruction.
    if (ctl.instr_end && stop_req_d) begin
      ctl.clear_run = 1'b1;
      stop_req_d    = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      major    <= MS_PANEL;
      et       <= 4'd0;
      count    <= 4'd0;
      pop      <= PN_IDLE;
      stop_req <= 1'b0;
    end else begin
      major    <= major_d;
      et       <= et_d;
      count    <= count_d;
      pop      <= pop_d;
      stop_req <= stop_req_d;
    end
  end

  assign instr_done = ctl.instr_end;

endmodule
