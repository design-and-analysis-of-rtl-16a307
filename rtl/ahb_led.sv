// ahb_led: LED peripheral on AHB-Lite.
//
// One register, at every address of the peripheral's region, whose low
// NLED bits drive the board LEDs (a 1 lights an LED). A write stores
// HWDATA[NLED-1:0] at the end of its data phase; a read returns the register
// zero-extended. No wait states, OKAY responses, register cleared by reset.
// The eight LEDs are the document's; the register layout is this design's.
module ahb_led
  import ahb_pkg::*;
#(
  parameter int unsigned NLED = 8
) (
  input  logic            hclk,
  input  logic            hresetn,
  input  logic            hsel,
  input  ahb_req_t        req,
  output ahb_rsp_t        rsp,
  output logic [NLED-1:0] led
);

  logic dp_write;

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn)        dp_write <= 1'b0;
    else if (req.hready) dp_write <= hsel && is_active(req.htrans) && req.hwrite;
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn)      led <= '0;
    else if (dp_write) led <= req.hwdata[NLED-1:0];
  end

  assign rsp.hrdata    = 32'(led);
  assign rsp.hreadyout = 1'b1;
  assign rsp.hresp     = 1'b0;

endmodule
