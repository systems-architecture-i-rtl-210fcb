// tb_scram_reg: checks the parallel-load register: reset to zero, load on
// LOAD, hold otherwise, against a model value kept in the testbench.
module tb_scram_reg;
  localparam int W = 8;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [W-1:0] d = '0, q, model;
  int checks = 0, failures = 0;

  scram_reg dut (.clk, .rst_n, .load, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk);
    checks++; if (q !== '0) begin failures++; $display("reset: q=%h", q); end
    rst_n = 1'b1; model = '0;
    for (int i = 0; i < 300; i++) begin
      load = 1'($urandom_range(0, 1));
      d    = W'($urandom);
      @(posedge clk); #1;
      if (load) model = d;
      checks++;
      if (q !== model) begin failures++; $display("step %0d: q=%h want %h", i, q, model); end
      @(negedge clk);
    end
    rst_n = 1'b0; @(posedge clk); #1;
    checks++; if (q !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
