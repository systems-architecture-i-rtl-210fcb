// scram_timer: the timer T that sequences the microsteps.
//
// T is a counter. Every clock edge it either clears to 0 (CLEAR, control
// line x6, raised in the last microstep of each instruction) or increments
// (its INC input is the inverse of x6, as drawn in the datapath figure), so
// one instruction runs through t0, t1, t2, ... until the CLU clears it. The
// value goes to a decoder that forms the step lines t0..t9.
//
// `stop` (raised by the CLU for HLT) is this design's addition: it sets the
// `halted` flag, and while the flag is set T holds its value, so the machine
// does nothing more until reset.
module scram_timer #(
  parameter int unsigned T_W = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clear,
  input  logic           stop,
  output logic [T_W-1:0] t,
  output logic           halted
);
  logic run;
  assign run = !halted && !stop;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      t      <= '0;
      halted <= 1'b0;
    end else begin
      if (stop)       halted <= 1'b1;
      if (run) begin
        if (clear)    t <= '0;
        else          t <= t + T_W'(1);
      end
    end
  end
endmodule
