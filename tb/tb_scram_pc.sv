// tb_scram_pc: checks the program counter: reset to 0, INC adds one modulo
// 16 (including the wrap from 15 to 0), LOAD takes the input, LOAD wins over
// INC, hold when neither is raised.
module tb_scram_pc;
  localparam int W = 4;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, inc = 1'b0;
  logic [W-1:0] d = '0, q;
  int model;
  int checks = 0, failures = 0, wraps = 0;

  scram_pc dut (.clk, .rst_n, .load, .inc, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk);
    checks++; if (q !== 4'd0) failures++;
    rst_n = 1'b1; model = 0;
    for (int i = 0; i < 400; i++) begin
      load = ($urandom_range(0, 7) == 0);
      inc  = (i < 40) ? 1'b1 : 1'($urandom_range(0, 1));
      d    = W'($urandom);
      @(posedge clk); #1;
      if (load) model = d;
      else if (inc) begin
        if (model == 15) wraps++;
        model = (model + 1) % 16;
      end
      checks++;
      if (q !== W'(model)) begin failures++; $display("step %0d: q=%0d want %0d", i, q, model); end
      @(negedge clk);
    end
    checks++; if (wraps == 0) begin failures++; $display("no wrap seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
