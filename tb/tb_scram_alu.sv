// tb_scram_alu: checks the ALU and its register AD through the three
// operations SCRAM uses: AD <- operand, AD <- AD + operand and
// AD <- operand - AD, all modulo 256, plus hold when LOAD AD is low.
module tb_scram_alu;
  localparam int W = 8;
  logic clk = 1'b0, rst_n = 1'b0, load_ad = 1'b0, acc = 1'b0, sub = 1'b0;
  logic [W-1:0] operand = '0, ad;
  int model;
  int checks = 0, failures = 0, carries = 0, borrows = 0;

  scram_alu dut (.clk, .rst_n, .load_ad, .acc, .sub, .operand, .ad);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk);
    checks++;
    if (ad !== '0) begin failures++; $display("reset: ad=%h", ad); end
    rst_n = 1'b1; model = 0;
    for (int i = 0; i < 500; i++) begin
      int op;
      op = $urandom_range(0, 3);   // 0 load, 1 add, 2 sub, 3 hold
      load_ad = (op != 3);
      acc     = (op == 1 || op == 2);
      sub     = (op == 2);
      operand = W'($urandom);
      @(posedge clk); #1;
      case (op)
        0: model = operand;
        1: begin if (model + operand > 255) carries++; model = (model + operand) % 256; end
        2: begin if (operand < model) borrows++; model = (operand - model + 256) % 256; end
        default: ;
      endcase
      checks++;
      if (ad !== W'(model)) begin failures++; $display("step %0d op %0d: ad=%0d want %0d", i, op, ad, model); end
      @(negedge clk);
    end
    checks++;
    if (carries == 0 || borrows == 0) begin failures++; $display("carries=%0d borrows=%0d", carries, borrows); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
