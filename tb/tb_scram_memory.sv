// tb_scram_memory: checks the 16 x 8 memory: host writes, CPU writes from
// MBR, combinational CPU reads gated by READ, host reads, and host priority
// when both write in the same cycle. A shadow array is the reference.
module tb_scram_memory;
  localparam int W = 8, AW = 4;
  logic clk = 1'b0;
  logic [AW-1:0] addr = '0, host_addr = '0;
  logic read = 1'b0, write = 1'b0, host_we = 1'b0;
  logic [W-1:0] wdata = '0, host_wdata = '0, rdata, host_rdata;
  logic [W-1:0] shadow [16];
  int checks = 0, failures = 0;

  scram_memory dut (
    .clk, .addr, .read, .write, .wdata, .rdata,
    .host_we, .host_addr, .host_wdata, .host_rdata
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill through the host port
    for (int a = 0; a < 16; a++) begin
      @(negedge clk);
      host_we = 1'b1; host_addr = 4'(a); host_wdata = W'($urandom); shadow[a] = host_wdata;
    end
    @(negedge clk); host_we = 1'b0;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      addr = 4'($urandom); host_addr = 4'($urandom);
      read = 1'($urandom_range(0, 1));
      write = ($urandom_range(0, 2) == 0);
      host_we = ($urandom_range(0, 5) == 0);
      wdata = W'($urandom); host_wdata = W'($urandom);
      #1;
      checks++;
      if (rdata !== (read ? shadow[addr] : '0)) begin failures++; $display("cpu read a=%0d r=%b got %h", addr, read, rdata); end
      checks++;
      if (host_rdata !== shadow[host_addr]) begin failures++; $display("host read a=%0d got %h", host_addr, host_rdata); end
      @(posedge clk);
      if (host_we) shadow[host_addr] = host_wdata;
      else if (write) shadow[addr] = wdata;
    end
    @(negedge clk); host_we = 1'b0; write = 1'b0;
    for (int a = 0; a < 16; a++) begin
      host_addr = 4'(a); #1;
      checks++;
      if (host_rdata !== shadow[a]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
