// tb_scram: end-to-end test of the SCRAM computer at its default size.
//
// Loads random programs through the host port, runs them, and after every
// instruction compares PC, AC and all 16 memory words with an
// instruction-level reference model kept in this testbench. It also checks
// the number of clock cycles each instruction takes (LDA/STA 6, LDI, STI,
// ADD, SUB 8, JMP and taken JMZ/JMN 7, untaken JMZ/JMN 4, HLT stops after
// 4) and counts how often each mechanism happened: every opcode, both
// outcomes of JMZ and JMN, indirect addressing, adder carry and subtract
// borrow, the PC wrapping from 15 to 0, halting by HLT and by an unused
// opcode. A mechanism that never happened is a failure.
module tb_scram;
  import scram_pkg::*;

  localparam int PROGRAMS  = 400;
  localparam int MAX_INSNS = 150;

  logic clk = 1'b0, rst_n = 1'b0;
  logic host_we = 1'b0;
  logic [3:0] host_addr = '0;
  logic [7:0] host_wdata = '0, host_rdata;
  logic halted;
  logic [3:0] pc, mar, t_step;
  logic [7:0] ir, mbr, ac, ad;
  ctrl_t ctrl;

  scram dut (
    .clk, .rst_n, .host_we, .host_addr, .host_wdata, .host_rdata,
    .halted, .pc, .ir, .mar, .mbr, .ac, .ad, .t_step, .ctrl
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // reference model state
  logic [7:0] m_mem [16];
  logic [3:0] m_pc;
  logic [7:0] m_ac;

  // mechanism counters
  int n_op [16];
  int n_jmz_taken = 0, n_jmz_not = 0, n_jmn_taken = 0, n_jmn_not = 0;
  int n_carry = 0, n_borrow = 0, n_pc_wrap = 0, n_hlt_op = 0, n_hlt_other = 0;

  // execute one instruction in the model; returns its cycle count, or 4 with
  // `halts` set for a halting opcode
  function automatic int model_step(output bit halts);
    logic [7:0] insn;
    logic [3:0] op, x, ptr;
    halts = 1'b0;
    insn = m_mem[m_pc];
    op = insn[7:4];
    x = insn[3:0];
    n_op[op]++;
    if (m_pc == 4'd15) n_pc_wrap++;
    m_pc = m_pc + 4'd1;
    case (op)
      4'd1: begin m_ac = m_mem[x]; return 6; end
      4'd2: begin ptr = m_mem[x][3:0]; m_ac = m_mem[ptr]; return 8; end
      4'd3: begin m_mem[x] = m_ac; return 6; end
      4'd4: begin ptr = m_mem[x][3:0]; m_mem[ptr] = m_ac; return 8; end
      4'd5: begin
        if (int'(m_ac) + int'(m_mem[x]) > 255) n_carry++;
        m_ac = m_ac + m_mem[x]; return 8;
      end
      4'd6: begin
        if (m_mem[x] > m_ac) n_borrow++;
        m_ac = m_ac - m_mem[x]; return 8;
      end
      4'd7: begin m_pc = x; return 7; end
      4'd8: if (m_ac == 8'd0) begin n_jmz_taken++; m_pc = x; return 7; end
            else begin n_jmz_not++; return 4; end
      4'd9: if (m_ac[7]) begin n_jmn_taken++; m_pc = x; return 7; end
            else begin n_jmn_not++; return 4; end
      default: begin
        halts = 1'b1;
        if (op == 4'd10) n_hlt_op++; else n_hlt_other++;
        return 4;
      end
    endcase
  endfunction

  function automatic logic [7:0] random_word();
    int r;
    r = $urandom_range(0, 99);
    if (r < 70) return {4'($urandom_range(1, 9)), 4'($urandom)};  // instruction
    if (r < 73) return {4'd10, 4'($urandom)};                      // HLT
    if (r < 75) return {4'($urandom_range(11, 15)), 4'($urandom)}; // unused opcode
    if (r < 80) return 8'd0;
    return 8'($urandom);
  endfunction

  task automatic compare_state(int prog, int insn);
    checks++;
    if (pc !== m_pc || ac !== m_ac) begin
      failures++;
      $display("prog %0d insn %0d: pc=%0d ac=%h want pc=%0d ac=%h", prog, insn, pc, ac, m_pc, m_ac);
    end
    for (int a = 0; a < 16; a++) begin
      checks++;
      if (dut.u_mem.mem[a] !== m_mem[a]) begin
        failures++;
        $display("prog %0d insn %0d: mem[%0d]=%h want %h", prog, insn, a, dut.u_mem.mem[a], m_mem[a]);
      end
    end
  endtask

  initial begin
    repeat (PROGRAMS * MAX_INSNS * 10) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (n_op[i]) n_op[i] = 0;
    for (int p = 0; p < PROGRAMS; p++) begin
      // hold in reset and load the program
      @(negedge clk);
      rst_n = 1'b0;
      for (int a = 0; a < 16; a++) begin
        m_mem[a] = random_word();
        host_we = 1'b1; host_addr = 4'(a); host_wdata = m_mem[a];
        @(negedge clk);
      end
      host_we = 1'b0;
      @(negedge clk);
      rst_n = 1'b1;
      m_pc = '0; m_ac = '0;
      for (int i = 0; i < MAX_INSNS; i++) begin
        bit halts;
        int want, got;
        want = model_step(halts);
        got = 0;
        do begin
          @(posedge clk); #1;
          got++;
        end while (t_step != 4'd0 && !halted && got < 20);
        checks++;
        if (got != want || halted != halts) begin
          failures++;
          $display("prog %0d insn %0d (op %0d): %0d cycles halted=%b, want %0d halted=%b",
                   p, i, ir[7:4], got, halted, want, halts);
        end
        compare_state(p, i);
        if (halts) begin
          // stays halted
          repeat (3) @(posedge clk);
          #1;
          checks++;
          if (!halted || t_step != 4'd3 || pc !== m_pc) begin
            failures++; $display("prog %0d: did not stay halted", p);
          end
          break;
        end
      end
    end

    // every mechanism must have happened
    for (int op = 1; op <= 10; op++) begin
      checks++;
      if (n_op[op] == 0) begin failures++; $display("opcode %0d never executed", op); end
    end
    checks++; if (n_jmz_taken == 0 || n_jmz_not == 0) begin failures++; $display("JMZ outcome missing"); end
    checks++; if (n_jmn_taken == 0 || n_jmn_not == 0) begin failures++; $display("JMN outcome missing"); end
    checks++; if (n_carry == 0)     begin failures++; $display("no adder carry"); end
    checks++; if (n_borrow == 0)    begin failures++; $display("no subtract borrow"); end
    checks++; if (n_pc_wrap == 0)   begin failures++; $display("PC never wrapped"); end
    checks++; if (n_hlt_op == 0)    begin failures++; $display("HLT never executed"); end
    checks++; if (n_hlt_other == 0) begin failures++; $display("unused opcode never halted"); end
    $display("opcodes LDA %0d LDI %0d STA %0d STI %0d ADD %0d SUB %0d JMP %0d JMZ %0d JMN %0d HLT %0d",
             n_op[1], n_op[2], n_op[3], n_op[4], n_op[5], n_op[6], n_op[7], n_op[8], n_op[9], n_op[10]);
    $display("JMZ taken %0d/not %0d, JMN taken %0d/not %0d, carry %0d, borrow %0d, pc wrap %0d, halts %0d+%0d",
             n_jmz_taken, n_jmz_not, n_jmn_taken, n_jmn_not, n_carry, n_borrow, n_pc_wrap, n_hlt_op, n_hlt_other);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
