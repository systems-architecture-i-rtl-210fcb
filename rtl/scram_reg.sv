// scram_reg: parallel-load register, used for IR, MAR, MBR and AC.
//
// On a rising clock edge with `load` high the register takes `d`; otherwise
// it holds. The LOAD inputs are the document's; the synchronous active-low
// reset to zero is this design's choice.
module scram_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end
endmodule
