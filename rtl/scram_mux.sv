// scram_mux: N-input word multiplexer.
//
// Combinational: `out` is `in[sel]`. SCRAM uses four of them: 4-input ones in
// front of MAR (select x10) and AC (select x11), and 2-input ones in front of
// MBR (x7) and the ALU (x8). A select beyond N-1 gives zero.
module scram_mux #(
  parameter int unsigned W = 8,
  parameter int unsigned N = 4,
  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [SW-1:0]     sel,
  input  logic [N-1:0][W-1:0] in,
  output logic [W-1:0]      out
);
  always_comb begin
    out = '0;
    for (int unsigned i = 0; i < N; i++)
      if (sel == SW'(i)) out = in[i];
  end
endmodule
