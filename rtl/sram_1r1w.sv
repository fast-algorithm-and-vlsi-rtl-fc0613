// sram_1r1w: two-port (one read, one write) SRAM bank, the memory type the
// transform buffers are built from.
//
// Written as an array so that synthesis can map it to a memory macro. Both
// ports are synchronous: a write with we=1 stores wdata at waddr at the
// clock edge; a read with re=1 returns mem[raddr] on rdata after the edge
// (one cycle latency) and rdata holds its value while re=0. A read of an
// address written in an earlier cycle sees the new data; a read and a write
// of the same address in the same cycle return the old data (the schedules
// that use this bank never do that).
module sram_1r1w #(
  parameter int DEPTH = 256,
  parameter int W     = 16,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end
endmodule
