// scram_pc: program counter.
//
// A 4-bit register with a parallel LOAD (control line x3, fed from the AC
// output) and an INC input (x13) that adds one, modulo 16, as in the fetch
// step "PC <- PC + 1". Both act on the rising clock edge; the CLU never
// raises both, and LOAD wins if it did. Reset to address 0 is this design's
// choice.
module scram_pc #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         inc,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
    else if (inc)  q <= q + W'(1);
  end
endmodule
