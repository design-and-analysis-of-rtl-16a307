// ahb_bram: internal program/data memory on AHB-Lite (4 KB by default).
//
// A word-wide array of MEM_BYTES/4 words. The address phase of a selected,
// active transfer is registered (word address, write flag, byte-lane mask);
// in the data phase a write updates the enabled byte lanes at the clock edge
// that ends it, and a read returns the addressed word combinationally from
// the registered address. Every transfer completes with no wait state and
// an OKAY response. Byte, halfword and word writes are supported through the
// lane mask; reads always return the whole word and the master picks lanes.
// The address wraps within the memory, so the 0x0000_0000-0x4FFF_FFFF
// region aliases the 4 KB.
// The 4 KB size is the document's; the timing, the byte lanes and the
// optional INIT_FILE (a hex image loaded with $readmemh, none by default) are
// this design's choices. A read directly after a write to the same word sees
// the new data, because the write happens before the read's data phase.
module ahb_bram
  import ahb_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 4096,
  parameter string       INIT_FILE = ""
) (
  input  logic     hclk,
  input  logic     hresetn,
  input  logic     hsel,
  input  ahb_req_t req,
  output ahb_rsp_t rsp
);

  localparam int unsigned WORDS = MEM_BYTES / 4;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  logic          dp_write;
  logic [AW-1:0] dp_addr;
  logic [3:0]    dp_mask;

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      dp_write <= 1'b0;
      dp_addr  <= '0;
      dp_mask  <= '0;
    end else if (req.hready) begin
      dp_write <= hsel && is_active(req.htrans) && req.hwrite;
      if (hsel && is_active(req.htrans)) begin
        dp_addr <= req.haddr[AW+1:2];
        dp_mask <= byte_mask(req.hsize, req.haddr[1:0]);
      end
    end
  end

  always_ff @(posedge hclk) begin
    if (dp_write) begin
      for (int b = 0; b < 4; b++)
        if (dp_mask[b]) mem[dp_addr][8*b +: 8] <= req.hwdata[8*b +: 8];
    end
  end

  assign rsp.hrdata    = mem[dp_addr];
  assign rsp.hreadyout = 1'b1;
  assign rsp.hresp     = 1'b0;

endmodule
