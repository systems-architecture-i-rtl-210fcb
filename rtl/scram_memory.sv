// scram_memory: the 16-word, 8-bit memory that holds program and data.
//
// The CPU side is addressed by MAR. With `read` (control line x5) high,
// `rdata` shows the addressed word combinationally, so "MBR <- M" completes
// in the one microstep after MAR was loaded; with `read` low `rdata` is 0.
// With `write` high the word in MBR (`wdata`) is written at the rising clock
// edge.
//
// The host side is this design's addition: it lets a testbench or loader put
// a program in memory (normally while the CPU is held in reset) and read
// results back. A host write takes precedence over a CPU write to the same
// cycle. The memory is not cleared by reset.
module scram_memory #(
  parameter int unsigned W      = 8,
  parameter int unsigned ADDR_W = 4
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              read,
  input  logic              write,
  input  logic [W-1:0]      wdata,
  output logic [W-1:0]      rdata,
  input  logic              host_we,
  input  logic [ADDR_W-1:0] host_addr,
  input  logic [W-1:0]      host_wdata,
  output logic [W-1:0]      host_rdata
);
  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [W-1:0] mem [DEPTH];

  assign rdata      = read ? mem[addr] : '0;
  assign host_rdata = mem[host_addr];

  always_ff @(posedge clk) begin
    if (host_we)    mem[host_addr] <= host_wdata;
    else if (write) mem[addr]      <= wdata;
  end
endmodule
