// dual_port_ram_sync: simple dual-port RAM with synchronous ports.
//
// Port A writes: with we_a high, din_a is stored at addr_a on the clock
// edge. Port B reads: addr_b is sampled on the clock edge and dout_b shows
// that word from the next cycle on (one cycle of read latency). Both ports
// share one clock. A read of the word being written returns the old data.
// Contents are not reset. This is the image buffer memory of the VGA
// peripheral; the document names the block, its size and width are set by
// the instantiating module.
module dual_port_ram_sync #(
  parameter int unsigned ADDR_W = 14,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned DEPTH  = 1 << ADDR_W
) (
  input  logic              clk,
  input  logic              we_a,
  input  logic [ADDR_W-1:0] addr_a,
  input  logic [DATA_W-1:0] din_a,
  input  logic [ADDR_W-1:0] addr_b,
  output logic [DATA_W-1:0] dout_b
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_a && 32'(addr_a) < DEPTH) mem[addr_a] <= din_a;
  end

  always_ff @(posedge clk) begin
    dout_b <= mem[addr_b];
  end

endmodule
