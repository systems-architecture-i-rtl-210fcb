// scram_pkg: sizes, opcodes and the control-line bundle shared by the SCRAM
// modules.
//
// SCRAM has 8-bit words, a 16-word memory (4 address bits) and instructions
// made of a 4-bit opcode (the upper nibble, IR(C)) and a 4-bit operand (the
// lower nibble, IR(O)). Opcodes 1..8 are the document's encodings. JMN and
// HLT have no printed encoding; this design gives JMN the next code (9, the
// q9 line) and HLT code 10, and any opcode without a meaning (0, 11..15)
// also halts.
//
// ctrl_t carries the CLU output lines. x1..x13 are the lines of the
// datapath figure; mem_write, alu_sub and halt are lines this design adds
// because the printed figure has no line for a memory write, a subtraction
// or stopping the machine.
package scram_pkg;

  localparam int unsigned WORD_W = 8;   // word width
  localparam int unsigned ADDR_W = 4;   // memory address width (16 words)
  localparam int unsigned OPC_W  = 4;   // opcode width
  localparam int unsigned T_W    = 4;   // timer width
  localparam int unsigned T_LINES = 10; // decoded timer lines t0..t9

  typedef enum logic [OPC_W-1:0] {
    OP_LDA = 4'd1,
    OP_LDI = 4'd2,
    OP_STA = 4'd3,
    OP_STI = 4'd4,
    OP_ADD = 4'd5,
    OP_SUB = 4'd6,
    OP_JMP = 4'd7,
    OP_JMZ = 4'd8,
    OP_JMN = 4'd9,
    OP_HLT = 4'd10
  } opcode_e;

  // MAR multiplexer inputs (select = x10)
  localparam logic [1:0] MAR_FROM_PC  = 2'd0;
  localparam logic [1:0] MAR_FROM_IRO = 2'd1;
  localparam logic [1:0] MAR_FROM_MBR = 2'd2;
  // AC multiplexer inputs (select = x11)
  localparam logic [1:0] AC_FROM_MBR  = 2'd0;
  localparam logic [1:0] AC_FROM_IRO  = 2'd1;
  localparam logic [1:0] AC_FROM_PC   = 2'd2;
  localparam logic [1:0] AC_FROM_ALU  = 2'd3;

  typedef struct packed {
    logic       ir_load;   // x1  IR LOAD
    logic       mbr_load;  // x2  MBR LOAD
    logic       pc_load;   // x3  PC LOAD (from AC)
    logic       mar_load;  // x4  MAR LOAD
    logic       mem_read;  // x5  memory READ
    logic       t_clear;   // x6  timer CLEAR (timer increments otherwise)
    logic       mbr_sel;   // x7  MBR mux: 0 memory, 1 AC
    logic       alu_sel;   // x8  ALU mux: 0 MBR, 1 AC
    logic       ad_load;   // x9  LOAD AD
    logic [1:0] mar_sel;   // x10 MAR mux select
    logic [1:0] ac_sel;    // x11 AC mux select
    logic       ac_load;   // x12 AC LOAD
    logic       pc_inc;    // x13 PC INC
    logic       mem_write; // added: memory write strobe
    logic       alu_sub;   // added: ALU subtracts instead of adds
    logic       halt;      // added: stop the timer
  } ctrl_t;

endpackage
