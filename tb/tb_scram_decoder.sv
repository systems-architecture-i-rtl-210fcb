// tb_scram_decoder: checks the 4-to-16 opcode decoder and the 4-to-10 timer
// decoder for every input code: exactly the line of that code is high, and
// codes 10..15 raise no timer line.
module tb_scram_decoder;
  logic [3:0] in;
  logic [15:0] q;
  logic [9:0] t;
  int checks = 0, failures = 0;

  scram_decoder dut_q (.in, .out(q));
  scram_decoder #(.IN_W(4), .OUTS(10)) dut_t (.in, .out(t));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 16; c++) begin
      in = 4'(c);
      #1;
      checks++;
      if (q !== (16'd1 << c)) begin failures++; $display("q dec in=%0d out=%b", c, q); end
      checks++;
      if (t !== ((c < 10) ? (10'd1 << c) : 10'd0)) begin failures++; $display("t dec in=%0d out=%b", c, t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
