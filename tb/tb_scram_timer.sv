// tb_scram_timer: checks the timer T: it counts one per clock, CLEAR returns
// it to 0 on the next edge, and `stop` freezes it and raises `halted` until
// reset.
module tb_scram_timer;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, stop = 1'b0;
  logic [3:0] t;
  logic halted;
  int model;
  int checks = 0, failures = 0;

  scram_timer dut (.clk, .rst_n, .clear, .stop, .t, .halted);

  always #5 clk = ~clk;

  task automatic expect_state(int tv, bit hv, string what);
    checks++;
    if (t !== 4'(tv) || halted !== hv) begin
      failures++;
      $display("%s: t=%0d halted=%b want %0d %b", what, t, halted, tv, hv);
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk);
    expect_state(0, 0, "reset");
    rst_n = 1'b1; model = 0;
    // instruction-length runs: count up to a random last step, then clear
    for (int i = 0; i < 100; i++) begin
      int last;
      last = $urandom_range(3, 7);
      while (model != last) begin
        @(posedge clk); #1; model++;
        expect_state(model, 0, "count");
        @(negedge clk);
      end
      clear = 1'b1;
      @(posedge clk); #1; model = 0;
      expect_state(0, 0, "clear");
      @(negedge clk); clear = 1'b0;
    end
    // run to step 3 and stop
    repeat (3) @(posedge clk);
    @(negedge clk);
    expect_state(3, 0, "before stop");
    stop = 1'b1;
    @(posedge clk); #1;
    expect_state(3, 1, "stop");
    @(negedge clk); stop = 1'b0;
    repeat (5) begin
      @(posedge clk); #1;
      expect_state(3, 1, "halted hold");
    end
    @(negedge clk); rst_n = 1'b0;
    @(posedge clk); #1;
    expect_state(0, 0, "reset after halt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
