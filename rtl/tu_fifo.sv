// tu_fifo: small synchronous FIFO that carries transform-unit information
// (size, buffer base address, DST flag, zero-row flags) from one pipeline
// stage to the next, so that each stage can work on a different TU.
//
// Register array with read and write pointers. Interface: push/full on the
// write side, pop/empty and dout on the read side; dout shows the oldest
// entry while not empty (first-word fall-through). A push and a pop in the
// same cycle are allowed; count gives the number of stored entries.
// The FIFOs between the stages are named by the document; the depth and the
// contents of an entry are this design's choices.
module tu_fifo #(
  parameter int W     = 16,
  parameter int DEPTH = 4,
  localparam int PW   = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] din,
  output logic         full,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic [PW:0]  count
);
  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] wp, rp;

  assign full  = (count == (PW + 1)'(DEPTH));
  assign empty = (count == '0);
  assign dout  = mem[rp];

  wire do_push = push && !full;
  wire do_pop  = pop && !empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_push) wp <= (int'(wp) == DEPTH - 1) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (int'(rp) == DEPTH - 1) ? '0 : rp + 1'b1;
      count <= count + (PW + 1)'(do_push) - (PW + 1)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= din;
  end
endmodule
