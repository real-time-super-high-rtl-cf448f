// sram_sp: single-port synchronous SRAM, one read or one write per cycle.
// Read data appear on rdata one cycle after a read (en=1, we=0) and hold
// until the next read.  Written as an array; a memory compiler's single-port
// macro of the same size takes its place in silicon.
module sram_sp #(
  parameter int unsigned W     = 80,
  parameter int unsigned DEPTH = 10240
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [W-1:0]             wdata,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata <= mem[addr];
    end
  end
endmodule
