// ahb_gpio: general purpose input/output port on AHB-Lite.
//
// NBITS pins, each an input or an output as its bit of the data direction
// register says (1 = output). Registers, by address bit 2:
//   0x0 DATA  write: output data register; read: pin value, which for an
//             output pin is the output register and for an input pin the
//             synchronised external input.
//   0x4 DIR   data direction register, read/write.
// External inputs pass a two-flop synchroniser, so a switch change shows in
// DATA two clocks later. gpio_out and gpio_dir are meant for a tri-state pad
// outside the design (gpio_dir = output enable). No wait states, OKAY
// responses, both registers cleared by reset (all pins inputs).
// The data direction register is the document's; the width default (8, the
// board's switches and LEDs), the register offsets and the synchroniser are
// this design's choices.
module ahb_gpio
  import ahb_pkg::*;
#(
  parameter int unsigned NBITS = 8
) (
  input  logic             hclk,
  input  logic             hresetn,
  input  logic             hsel,
  input  ahb_req_t         req,
  output ahb_rsp_t         rsp,
  input  logic [NBITS-1:0] gpio_in,
  output logic [NBITS-1:0] gpio_out,
  output logic [NBITS-1:0] gpio_dir
);

  logic             dp_write;
  logic             dp_reg;      // 0 = DATA, 1 = DIR
  logic [NBITS-1:0] in_meta, in_sync;
  logic [NBITS-1:0] pins;

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      dp_write <= 1'b0;
      dp_reg   <= 1'b0;
    end else if (req.hready) begin
      dp_write <= hsel && is_active(req.htrans) && req.hwrite;
      if (hsel && is_active(req.htrans)) dp_reg <= req.haddr[2];
    end
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      gpio_out <= '0;
      gpio_dir <= '0;
    end else if (dp_write) begin
      if (dp_reg) gpio_dir <= req.hwdata[NBITS-1:0];
      else        gpio_out <= req.hwdata[NBITS-1:0];
    end
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      in_meta <= '0;
      in_sync <= '0;
    end else begin
      in_meta <= gpio_in;
      in_sync <= in_meta;
    end
  end

  assign pins          = (gpio_dir & gpio_out) | (~gpio_dir & in_sync);
  assign rsp.hrdata    = dp_reg ? 32'(gpio_dir) : 32'(pins);
  assign rsp.hreadyout = 1'b1;
  assign rsp.hresp     = 1'b0;

endmodule
