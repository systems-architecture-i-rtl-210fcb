// scram_decoder: binary to one-hot decoder.
//
// Combinational: out[i] is high exactly when in == i; codes of OUTS or more
// raise no line. SCRAM has two: one turns the opcode IR(C) into the lines
// q0..q15 that tell the CLU which instruction runs, the other turns the
// timer T into the step lines t0..t9.
module scram_decoder #(
  parameter int unsigned IN_W = 4,
  parameter int unsigned OUTS = 16
) (
  input  logic [IN_W-1:0] in,
  output logic [OUTS-1:0] out
);
  always_comb begin
    for (int unsigned i = 0; i < OUTS; i++)
      out[i] = (in == IN_W'(i));
  end
endmodule
