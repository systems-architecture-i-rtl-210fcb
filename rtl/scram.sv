// scram: SCRAM, a Simple but Complete Random Access Machine.
//
// An 8-bit accumulator machine with a 16-word memory that holds both program
// and data. Each instruction word is a 4-bit opcode (upper nibble) and a
// 4-bit operand address (lower nibble). The datapath has the registers PC,
// IR, MAR, MBR, AC and the ALU's AD, joined by four multiplexers:
//
//   MAR  <- mux(x10): 0 PC, 1 IR(O), 2 MBR            (3 unused, reads 0)
//   MBR  <- mux(x7):  0 memory, 1 AC
//   AC   <- mux(x11): 0 MBR, 1 IR(O), 2 PC, 3 ALU (AD)
//   ALU  <- mux(x8):  0 MBR, 1 AC
//   PC   <- AC (LOAD x3) or PC + 1 (INC x13)
//   IR   <- MBR;  memory is addressed by MAR and written from MBR
//
// The timer T counts microsteps, one per clock; its decoded lines t0..t9
// and the decoded opcode lines q go to the CLU, which raises the control
// lines of the current microstep. An instruction takes 3 fetch steps and
// 1 to 5 execute steps: LDA and STA 6 cycles, LDI, STI, ADD and SUB 8,
// JMP and a taken JMZ/JMN 7, a JMZ/JMN not taken 4. HLT stops the timer
// at its t3 and raises `halted`.
//
// The register set, the multiplexers and their inputs, the control line
// numbering and the fetch/LDA/LDI/ADD microprograms follow the document;
// the host memory port, the reset, the status lines from AC to the CLU and
// the remaining microprograms are this design's (see scram_clu).
//
// Assertions at the end check rules the microprogram keeps: exactly one
// step line active while running, no PC load and increment together, no
// memory read and write together, the unconnected MAR input never selected.
//
// Use: hold rst_n low, write the program with host_we/host_addr/host_wdata,
// release rst_n; execution starts at address 0. Results can be read back
// through host_addr/host_rdata.
module scram
  import scram_pkg::*;
#(
  parameter int unsigned WORD_W_P = WORD_W,
  parameter int unsigned ADDR_W_P = ADDR_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                host_we,
  input  logic [ADDR_W_P-1:0] host_addr,
  input  logic [WORD_W_P-1:0] host_wdata,
  output logic [WORD_W_P-1:0] host_rdata,
  output logic                halted,
  output logic [ADDR_W_P-1:0] pc,
  output logic [WORD_W_P-1:0] ir,
  output logic [ADDR_W_P-1:0] mar,
  output logic [WORD_W_P-1:0] mbr,
  output logic [WORD_W_P-1:0] ac,
  output logic [WORD_W_P-1:0] ad,
  output logic [T_W-1:0]      t_step,
  output ctrl_t               ctrl
);
  localparam int unsigned W  = WORD_W_P;
  localparam int unsigned AW = ADDR_W_P;

  logic [W-1:0]  mem_rdata, mbr_d, ac_d, alu_operand;
  logic [AW-1:0] mar_d, ir_o;
  logic [15:0]   q;
  logic [T_LINES-1:0] t;

  assign ir_o = ir[AW-1:0];

  // ---------------- control ----------------
  scram_timer #(.T_W(T_W)) u_timer (
    .clk, .rst_n, .clear(ctrl.t_clear), .stop(ctrl.halt), .t(t_step), .halted
  );

  scram_decoder #(.IN_W(T_W), .OUTS(T_LINES)) u_t_dec (.in(t_step), .out(t));

  scram_decoder #(.IN_W(OPC_W), .OUTS(16)) u_q_dec (
    .in(ir[W-1 -: OPC_W]), .out(q)
  );

  scram_clu u_clu (
    .q, .t, .ac_zero(ac == '0), .ac_neg(ac[W-1]), .ctrl
  );

  // ---------------- registers ----------------
  scram_pc #(.W(AW)) u_pc (
    .clk, .rst_n, .load(ctrl.pc_load), .inc(ctrl.pc_inc), .d(ac[AW-1:0]), .q(pc)
  );

  scram_reg #(.W(W)) u_ir (
    .clk, .rst_n, .load(ctrl.ir_load), .d(mbr), .q(ir)
  );

  scram_reg #(.W(AW)) u_mar (
    .clk, .rst_n, .load(ctrl.mar_load), .d(mar_d), .q(mar)
  );

  scram_reg #(.W(W)) u_mbr (
    .clk, .rst_n, .load(ctrl.mbr_load), .d(mbr_d), .q(mbr)
  );

  scram_reg #(.W(W)) u_ac (
    .clk, .rst_n, .load(ctrl.ac_load), .d(ac_d), .q(ac)
  );

  // ---------------- multiplexers ----------------
  scram_mux #(.W(AW), .N(4)) u_mar_mux (
    .sel(ctrl.mar_sel),
    .in('{AW'(0), mbr[AW-1:0], ir_o, pc}),
    .out(mar_d)
  );

  scram_mux #(.W(W), .N(2)) u_mbr_mux (
    .sel(ctrl.mbr_sel), .in('{ac, mem_rdata}), .out(mbr_d)
  );

  scram_mux #(.W(W), .N(4)) u_ac_mux (
    .sel(ctrl.ac_sel),
    .in('{ad, W'(pc), W'(ir_o), mbr}),
    .out(ac_d)
  );

  scram_mux #(.W(W), .N(2)) u_alu_mux (
    .sel(ctrl.alu_sel), .in('{ac, mbr}), .out(alu_operand)
  );

  // ---------------- ALU and memory ----------------
  scram_alu #(.W(W)) u_alu (
    .clk, .rst_n, .load_ad(ctrl.ad_load), .acc(ctrl.alu_sel), .sub(ctrl.alu_sub),
    .operand(alu_operand), .ad
  );

  scram_memory #(.W(W), .ADDR_W(AW)) u_mem (
    .clk, .addr(mar), .read(ctrl.mem_read), .write(ctrl.mem_write), .wdata(mbr),
    .rdata(mem_rdata), .host_we, .host_addr, .host_wdata, .host_rdata
  );

  // ---------------- rules the microprogram keeps ----------------
  // at most one timer step line is active, and it always is while running
  a_one_step: assert property (@(posedge clk) disable iff (!rst_n)
    !halted |-> $onehot(t));
  // PC is never loaded and incremented in the same step
  a_pc_single: assert property (@(posedge clk) disable iff (!rst_n)
    !(ctrl.pc_load && ctrl.pc_inc));
  // memory is never read and written in the same step
  a_mem_rw: assert property (@(posedge clk) disable iff (!rst_n)
    !(ctrl.mem_read && ctrl.mem_write));
  // the MAR multiplexer's unconnected input is never selected
  a_mar_sel: assert property (@(posedge clk) disable iff (!rst_n)
    ctrl.mar_sel != 2'd3);
  // MBR is not loaded in the step that writes it to memory
  a_mbr_stable: assert property (@(posedge clk) disable iff (!rst_n)
    ctrl.mem_write |-> !ctrl.mbr_load);
endmodule
