// scram_alu: arithmetic unit with its internal register AD.
//
// The ALU's operand comes from the ALU multiplexer (MBR when x8 = 0, AC when
// x8 = 1). On a clock edge with LOAD AD (x9) high, AD takes:
//   acc = 0            : the operand                (AD <- MBR)
//   acc = 1, sub = 0   : AD + operand               (AD <- AD + AC)
//   acc = 1, sub = 1   : operand - AD               (AD <- AC - AD)
// AD is the ALU's output, which the AC multiplexer can select (AC <- AD).
// Arithmetic is 8-bit two's complement and wraps on overflow.
//
// The AD register and the ADD steps are the document's. Using x8 also as the
// "load or add" choice, and the subtract input used by SUB, are this
// design's: the document gives no microprogram for SUB.
module scram_alu #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load_ad,
  input  logic         acc,
  input  logic         sub,
  input  logic [W-1:0] operand,
  output logic [W-1:0] ad
);
  logic [W-1:0] result;

  always_comb begin
    if (!acc)     result = operand;
    else if (sub) result = operand - ad;
    else          result = ad + operand;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)       ad <= '0;
    else if (load_ad) ad <= result;
  end
endmodule
