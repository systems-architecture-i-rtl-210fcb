// tb_scram_programs: runs the two small example programs of the SCRAM
// instruction set on the full-size machine.
//
// 1. Multiplication by repeated addition, x * y for x >= 0 and any y, laid
//    out in the 16-word memory as program words 0..9 and data words 10..13:
//       0 LDA 10   1 JMZ 9    2 LDA 13   3 ADD 11   4 STA 13
//       5 LDA 10   6 SUB 12   7 STA 10   8 JMP 1    9 HLT
//      10 x       11 y       12 1       13 result (0)
//    The result word must hold x*y modulo 256, x must count down to 0, and
//    the run must take 17 + 51*x cycles (one loop pass is JMZ 4 + LDA 6 +
//    ADD 8 + STA 6 + LDA 6 + SUB 8 + STA 6 + JMP 7 = 51 cycles).
// 2. The three-instruction program LDA 1 / ADD 2 / STA 3 assembled into
//    words 0..2 (11h, 52h, 33h). Its operands are its own instruction words,
//    so AC = 52h + 33h = 85h is stored at word 3, executed next as JMZ 5
//    (not taken), and word 4 (0) halts. The testbench prints the step-by-
//    step trace of opcode line q, timer step t and the raised control lines,
//    and checks the sequence of timer steps.
module tb_scram_programs;
  import scram_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic host_we = 1'b0;
  logic [3:0] host_addr = '0;
  logic [7:0] host_wdata = '0, host_rdata;
  logic halted;
  logic [3:0] pc, mar, t_step;
  logic [7:0] ir, mbr, ac, ad;
  ctrl_t ctrl;

  scram dut (
    .clk, .rst_n, .host_we, .host_addr, .host_wdata, .host_rdata,
    .halted, .pc, .ir, .mar, .mbr, .ac, .ad, .t_step, .ctrl
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input logic [7:0] image [16]);
    @(negedge clk);
    rst_n = 1'b0;
    for (int a = 0; a < 16; a++) begin
      host_we = 1'b1; host_addr = 4'(a); host_wdata = image[a];
      @(negedge clk);
    end
    host_we = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  function automatic logic [7:0] peek(int a);
    return dut.u_mem.mem[a];
  endfunction

  // run until halted; returns the number of cycles
  task automatic run(output int cycles);
    cycles = 0;
    do begin
      @(posedge clk); #1;
      cycles++;
    end while (!halted && cycles < 50000);
  endtask

  function automatic string ctrl_lines(ctrl_t c);
    string s = "";
    if (c.ir_load)   s = {s, " x1"};
    if (c.mbr_load)  s = {s, " x2"};
    if (c.pc_load)   s = {s, " x3"};
    if (c.mar_load)  s = {s, " x4"};
    if (c.mem_read)  s = {s, " x5"};
    if (c.t_clear)   s = {s, " x6"};
    if (c.mbr_sel)   s = {s, " x7"};
    if (c.alu_sel)   s = {s, " x8"};
    if (c.ad_load)   s = {s, " x9"};
    if (c.mar_sel != 0) s = {s, $sformatf(" x10=%0d", c.mar_sel)};
    if (c.ac_sel != 0)  s = {s, $sformatf(" x11=%0d", c.ac_sel)};
    if (c.ac_load)   s = {s, " x12"};
    if (c.pc_inc)    s = {s, " x13"};
    if (c.mem_write) s = {s, " write"};
    if (c.alu_sub)   s = {s, " sub"};
    if (c.halt)      s = {s, " halt"};
    return s;
  endfunction

  initial begin
    logic [7:0] image [16];
    int cycles, n_mult = 0;

    // ---- multiplication ----
    for (int x = 0; x <= 12; x++)
      for (int y = -9; y <= 20; y += 7) begin
        image = '{8'h1A, 8'h89, 8'h1D, 8'h5B, 8'h3D, 8'h1A, 8'h6C, 8'h3A,
                  8'h71, 8'hA0, 8'(x), 8'(y), 8'd1, 8'd0, 8'd0, 8'd0};
        load(image);
        run(cycles);
        n_mult++;
        checks++;
        if (peek(13) !== 8'(x * y) || peek(10) !== 8'd0) begin
          failures++;
          $display("mult %0d*%0d: result %0d x %0d", x, y, $signed(peek(13)), peek(10));
        end
        checks++;
        if (cycles != 17 + 51 * x) begin
          failures++;
          $display("mult %0d*%0d: %0d cycles, want %0d", x, y, cycles, 17 + 51 * x);
        end
      end
    $display("multiplication: %0d runs", n_mult);

    // ---- LDA 1 / ADD 2 / STA 3 with trace ----
    begin
      int steps [$];
      int want [$];
      image = '{8'h11, 8'h52, 8'h33, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00,
                8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00};
      load(image);
      $display("trace: pc  q   t  control lines");
      while (!halted && steps.size() < 100) begin
        #1;
        steps.push_back(t_step);
        $display("trace: %2d  q%0d  t%0d %s", pc, ir[7:4], t_step, ctrl_lines(ctrl));
        @(posedge clk);
        #1;
        if (halted) break;
        @(negedge clk);
      end
      // LDA 6 steps, ADD 8, STA 6, JMZ not taken 4, halt 4 (t0..t3)
      for (int s = 0; s < 6; s++) want.push_back(s);
      for (int s = 0; s < 8; s++) want.push_back(s);
      for (int s = 0; s < 6; s++) want.push_back(s);
      for (int s = 0; s < 4; s++) want.push_back(s);
      for (int s = 0; s < 4; s++) want.push_back(s);
      checks++;
      if (steps != want) begin
        failures++;
        $display("trace: %0d steps, want %0d", steps.size(), want.size());
      end
      checks++;
      if (peek(3) !== 8'h85 || ac !== 8'h85 || pc !== 4'd5) begin
        failures++;
        $display("LDA/ADD/STA: m[3]=%h ac=%h pc=%0d", peek(3), ac, pc);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
