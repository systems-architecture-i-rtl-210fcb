// tb_scram_clu: checks the control logic unit for every opcode, every timer
// step t0..t9 and every value of the AC status lines. The reference is the
// microprogram written out as a table of register transfers per instruction
// (one entry per step), each transfer mapped to the control lines it needs.
// Every line not named by a transfer must be low and every mux select at 0.
module tb_scram_clu;
  import scram_pkg::*;

  typedef enum int {
    T_NONE, T_MAR_PC, T_FETCH_MEM, T_IR_MBR, T_MAR_IRO, T_MBR_MEM, T_MAR_MBR,
    T_MBR_AC, T_MEM_MBR, T_AC_MBR, T_AD_MBR, T_AD_ADD, T_AD_SUB, T_AC_AD,
    T_AC_IRO, T_PC_AC, T_HALT
  } xfer_e;

  logic [15:0] q;
  logic [9:0]  t;
  logic        ac_zero, ac_neg;
  ctrl_t       ctrl;
  int checks = 0, failures = 0;

  scram_clu dut (.q, .t, .ac_zero, .ac_neg, .ctrl);

  // what happens in step s of opcode op; `last` is set on an instruction's
  // final step. A conditional jump decides at t3: a jump not taken ends
  // there, so its later steps are only reached when it was taken and the
  // reference gives them the jump's transfers whatever the status lines say.
  function automatic xfer_e step_of(int op, int s, bit z, bit n, output bit last);
    xfer_e prog[$];
    bit taken;
    last = 1'b0;
    case (s)
      0: return T_MAR_PC;
      1: return T_FETCH_MEM;
      2: return T_IR_MBR;
      default: ;
    endcase
    taken = (op == 7) || (op == 8 && z) || (op == 9 && n) || s > 3;
    case (op)
      1: prog = '{T_MAR_IRO, T_MBR_MEM, T_AC_MBR};
      2: prog = '{T_MAR_IRO, T_MBR_MEM, T_MAR_MBR, T_MBR_MEM, T_AC_MBR};
      3: prog = '{T_MAR_IRO, T_MBR_AC, T_MEM_MBR};
      4: prog = '{T_MAR_IRO, T_MBR_MEM, T_MAR_MBR, T_MBR_AC, T_MEM_MBR};
      5: prog = '{T_MAR_IRO, T_MBR_MEM, T_AD_MBR, T_AD_ADD, T_AC_AD};
      6: prog = '{T_MAR_IRO, T_MBR_MEM, T_AD_MBR, T_AD_SUB, T_AC_AD};
      7, 8, 9: prog = taken ? '{T_MBR_AC, T_AC_IRO, T_PC_AC, T_AC_MBR} : '{T_NONE};
      default: prog = '{T_HALT};
    endcase
    if (s - 3 >= prog.size()) return T_NONE;
    last = (s - 3 == prog.size() - 1) && (prog[s - 3] != T_HALT);
    return prog[s - 3];
  endfunction

  function automatic ctrl_t ctrl_of(xfer_e x, bit last);
    ctrl_t c = '0;
    case (x)
      T_MAR_PC:    begin c.mar_load = 1; c.mar_sel = 2'd0; end
      T_FETCH_MEM: begin c.mem_read = 1; c.mbr_load = 1; c.pc_inc = 1; end
      T_IR_MBR:    c.ir_load = 1;
      T_MAR_IRO:   begin c.mar_load = 1; c.mar_sel = 2'd1; end
      T_MBR_MEM:   begin c.mem_read = 1; c.mbr_load = 1; end
      T_MAR_MBR:   begin c.mar_load = 1; c.mar_sel = 2'd2; end
      T_MBR_AC:    begin c.mbr_load = 1; c.mbr_sel = 1; end
      T_MEM_MBR:   c.mem_write = 1;
      T_AC_MBR:    begin c.ac_load = 1; c.ac_sel = 2'd0; end
      T_AD_MBR:    begin c.ad_load = 1; c.alu_sel = 0; end
      T_AD_ADD:    begin c.ad_load = 1; c.alu_sel = 1; end
      T_AD_SUB:    begin c.ad_load = 1; c.alu_sel = 1; c.alu_sub = 1; end
      T_AC_AD:     begin c.ac_load = 1; c.ac_sel = 2'd3; end
      T_AC_IRO:    begin c.ac_load = 1; c.ac_sel = 2'd1; end
      T_PC_AC:     c.pc_load = 1;
      T_HALT:      c.halt = 1;
      default: ;
    endcase
    c.t_clear = last;
    return c;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int op = 0; op < 16; op++)
      for (int s = 0; s < 10; s++)
        for (int f = 0; f < 4; f++) begin
          bit last;
          xfer_e x;
          ctrl_t want;
          q = 16'd1 << op;
          t = 10'd1 << s;
          ac_zero = f[0];
          ac_neg = f[1];
          x = step_of(op, s, f[0], f[1], last);
          want = ctrl_of(x, last);
          #1;
          checks++;
          if (ctrl !== want) begin
            failures++;
            $display("op %0d t%0d z=%0d n=%0d: ctrl=%b want %b", op, s, f[0], f[1], ctrl, want);
          end
        end
    // the fetch and LDA values of the two gate-level figures
    q = 16'd1 << OP_LDA; ac_zero = 0; ac_neg = 0;
    t = 10'd1 << 0; #1; checks++;
    if (!(ctrl.mar_load && ctrl.mar_sel == MAR_FROM_PC)) failures++;
    t = 10'd1 << 1; #1; checks++;
    if (!(ctrl.mem_read && ctrl.pc_inc && ctrl.mbr_load && !ctrl.mbr_sel)) failures++;
    t = 10'd1 << 2; #1; checks++;
    if (!ctrl.ir_load) failures++;
    t = 10'd1 << 5; #1; checks++;
    if (!(ctrl.ac_load && ctrl.ac_sel == AC_FROM_MBR && ctrl.t_clear)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
