// scram_clu: control logic unit of SCRAM.
//
// Purely combinational. Its inputs are the one-hot opcode lines q (from the
// IR(C) decoder), the one-hot step lines t0..t9 (from the timer decoder) and
// two status lines from AC (zero, negative). Its output is the set of
// control lines x1..x13 (plus three added lines, see scram_pkg) that are
// active during the current microstep; every register they enable loads on
// the next rising clock edge.
//
// The logic is written the way the document builds it: each microstep of
// the microprogram is an AND of one q line and one t line, and each control
// line is the OR of the microsteps that need it. Multiplexer selects are 0
// (MAR <- PC, AC <- MBR, MBR <- memory, ALU <- MBR) unless a microstep picks
// another input. Microprograms (q_k = opcode k):
//
//   fetch  t0 MAR<-PC     t1 MBR<-M, PC<-PC+1   t2 IR<-MBR
//   LDA q1 t3 MAR<-IR(O)  t4 MBR<-M  t5 AC<-MBR                       (end)
//   LDI q2 t3 MAR<-IR(O)  t4 MBR<-M  t5 MAR<-MBR t6 MBR<-M t7 AC<-MBR (end)
//   STA q3 t3 MAR<-IR(O)  t4 MBR<-AC t5 M<-MBR                        (end)
//   STI q4 t3 MAR<-IR(O)  t4 MBR<-M  t5 MAR<-MBR t6 MBR<-AC t7 M<-MBR (end)
//   ADD q5 t3 MAR<-IR(O)  t4 MBR<-M  t5 AD<-MBR  t6 AD<-AD+AC t7 AC<-AD (end)
//   SUB q6 t3 MAR<-IR(O)  t4 MBR<-M  t5 AD<-MBR  t6 AD<-AC-AD t7 AC<-AD (end)
//   JMP q7 t3 MBR<-AC     t4 AC<-IR(O) t5 PC<-AC t6 AC<-MBR           (end)
//   JMZ q8 as JMP when AC = 0, else t3 ends the instruction
//   JMN q9 as JMP when AC < 0, else t3 ends the instruction
//   HLT    t3 stop the timer (opcode 10 and every opcode with no meaning)
//
// No instruction needs more than eight steps, so t8 and t9 are decoded but
// unused; AC <- PC (AC multiplexer input 2) is wired but no instruction
// selects it.
//
// Fetch, LDA, LDI and ADD are the document's microprograms. STA, STI, SUB,
// the jumps and HLT are this design's: the document leaves STA, STI and JMZ
// as exercises and its datapath only lets PC load from AC, so a jump saves
// AC in MBR, passes the operand through AC into PC and restores AC.
module scram_clu
  import scram_pkg::*;
(
  input  logic [15:0]        q,
  input  logic [T_LINES-1:0] t,
  input  logic               ac_zero,
  input  logic               ac_neg,
  output ctrl_t              ctrl
);
  logic q_lda, q_ldi, q_sta, q_sti, q_add, q_sub, q_jmp, q_jmz, q_jmn, q_hlt;
  logic jump_taken;
  // microsteps, each one "what is transferred"
  logic s_mar_pc, s_mbr_mem, s_ir_mbr, s_mar_iro, s_mar_mbr, s_mbr_ac;
  logic s_mem_mbr, s_ac_mbr, s_ad_mbr, s_ad_acc, s_ac_ad, s_ac_iro, s_pc_ac;
  logic s_end;

  assign q_lda = q[OP_LDA];
  assign q_ldi = q[OP_LDI];
  assign q_sta = q[OP_STA];
  assign q_sti = q[OP_STI];
  assign q_add = q[OP_ADD];
  assign q_sub = q[OP_SUB];
  assign q_jmp = q[OP_JMP];
  assign q_jmz = q[OP_JMZ];
  assign q_jmn = q[OP_JMN];
  assign q_hlt = q[0] | (|q[15:OP_HLT]);

  // a jump whose condition holds at t3 (AC is untouched until t4)
  assign jump_taken = q_jmp | (q_jmz & ac_zero) | (q_jmn & ac_neg);

  always_comb begin
    s_mar_pc  = t[0];
    s_mbr_mem = t[1]
              | (t[4] & (q_lda | q_ldi | q_sti | q_add | q_sub))
              | (t[6] & q_ldi);
    s_ir_mbr  = t[2];
    s_mar_iro = t[3] & (q_lda | q_ldi | q_sta | q_sti | q_add | q_sub);
    s_mar_mbr = t[5] & (q_ldi | q_sti);
    s_mbr_ac  = (t[4] & q_sta) | (t[6] & q_sti) | (t[3] & jump_taken);
    s_mem_mbr = (t[5] & q_sta) | (t[7] & q_sti);
    s_ac_mbr  = (t[5] & q_lda) | (t[7] & q_ldi) | (t[6] & (q_jmp | q_jmz | q_jmn));
    s_ad_mbr  = t[5] & (q_add | q_sub);
    s_ad_acc  = t[6] & (q_add | q_sub);
    s_ac_ad   = t[7] & (q_add | q_sub);
    s_ac_iro  = t[4] & (q_jmp | q_jmz | q_jmn);
    s_pc_ac   = t[5] & (q_jmp | q_jmz | q_jmn);
    s_end     = (t[5] & (q_lda | q_sta))
              | (t[7] & (q_ldi | q_sti | q_add | q_sub))
              | (t[6] & (q_jmp | q_jmz | q_jmn))
              | (t[3] & (q_jmz | q_jmn) & !jump_taken);

    ctrl           = '0;
    ctrl.ir_load   = s_ir_mbr;                           // x1
    ctrl.mbr_load  = s_mbr_mem | s_mbr_ac;               // x2
    ctrl.pc_load   = s_pc_ac;                            // x3
    ctrl.mar_load  = s_mar_pc | s_mar_iro | s_mar_mbr;   // x4
    ctrl.mem_read  = s_mbr_mem;                          // x5
    ctrl.t_clear   = s_end;                              // x6
    ctrl.mbr_sel   = s_mbr_ac;                           // x7
    ctrl.alu_sel   = s_ad_acc;                           // x8
    ctrl.ad_load   = s_ad_mbr | s_ad_acc;                // x9
    ctrl.mar_sel   = s_mar_mbr ? MAR_FROM_MBR            // x10
                   : s_mar_iro ? MAR_FROM_IRO : MAR_FROM_PC;
    ctrl.ac_sel    = s_ac_ad  ? AC_FROM_ALU              // x11
                   : s_ac_iro ? AC_FROM_IRO : AC_FROM_MBR;
    ctrl.ac_load   = s_ac_mbr | s_ac_ad | s_ac_iro;      // x12
    ctrl.pc_inc    = t[1];                               // x13
    ctrl.mem_write = s_mem_mbr;
    ctrl.alu_sub   = s_ad_acc & q_sub;
    ctrl.halt      = t[3] & q_hlt;
  end
endmodule
