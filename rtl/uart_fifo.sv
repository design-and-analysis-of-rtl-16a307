// uart_fifo: synchronous first-in first-out buffer for the UART.
//
// DEPTH entries of WIDTH bits in a circular array with read and write
// pointers one bit wider than the index, so full and empty are told apart
// by the extra bit. `rdata` always shows the oldest entry (first-word fall
// through); `rd` removes it at the clock edge, `wr` appends `wdata`. A write
// when full and a read when empty are ignored; a write and a read in the same
// cycle both happen. The FIFO itself is the document's; its depth (16) is
// this design's choice.
module uart_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rstn,
  input  logic                     wr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     rd,
  output logic [WIDTH-1:0]         rdata,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH):0]   count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;
  logic             do_wr, do_rd;

  assign count = wptr - rptr;
  assign empty = (wptr == rptr);
  assign full  = (count == (AW+1)'(DEPTH));
  assign do_wr = wr && !full;
  assign do_rd = rd && !empty;
  assign rdata = mem[rptr[AW-1:0]];

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= wdata;
  end

  // A power-of-two depth keeps the pointer arithmetic above exact.
  initial assert ((1 << AW) == DEPTH) else $error("uart_fifo: DEPTH must be a power of two");

endmodule
