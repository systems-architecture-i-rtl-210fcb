// tb_scram_mux: checks a 4-input and a 2-input word multiplexer for every
// select value with random inputs.
module tb_scram_mux;
  localparam int W = 8;
  logic [1:0] sel4;
  logic [0:0] sel2;
  logic [3:0][W-1:0] in4;
  logic [1:0][W-1:0] in2;
  logic [W-1:0] out4, out2;
  int checks = 0, failures = 0;

  scram_mux #(.W(W), .N(4)) dut4 (.sel(sel4), .in(in4), .out(out4));
  scram_mux #(.W(W), .N(2)) dut2 (.sel(sel2), .in(in2), .out(out2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      for (int k = 0; k < 4; k++) in4[k] = W'($urandom);
      for (int k = 0; k < 2; k++) in2[k] = W'($urandom);
      sel4 = 2'(i % 4);
      sel2 = 1'(i % 2);
      #1;
      checks++;
      if (out4 !== in4[i % 4]) begin failures++; $display("mux4 sel=%0d out=%h", sel4, out4); end
      checks++;
      if (out2 !== in2[i % 2]) begin failures++; $display("mux2 sel=%0d out=%h", sel2, out2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
