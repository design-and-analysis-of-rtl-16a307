// ahb_vga: VGA peripheral on AHB-Lite (text console plus image buffer).
//
// Drives a 640x480, 60 Hz VGA port with 8-bit colour (RRRGGGBB: rgb[7:5]
// red, rgb[4:2] green, rgb[1:0] blue) from two sources: vga_console shows
// text in the upper band of the screen and vga_image shows a stored image in
// the lower band. A lit text pixel takes the text colour register; the rest
// of the text band is black; the image band shows the stored colours.
// vga_sync supplies the timing. rgb, hsync and vsync are registered on the
// last clock of each pixel, so all three are delayed by the same one pixel.
// Registers (offset within the peripheral's region):
//   0x0000           write: send a character to the console (HWDATA[7:0])
//   0x0004           text colour, read/write, reset 0xFF (white)
//   0x10000+4*n      write: colour of image pixel n = y*160 + x (HWDATA[7:0])
// Other reads return 0; the image is write-only from the bus. A console write
// that comes while the console is still clearing its buffer after reset is
// held with HREADYOUT low until the console accepts it, so the bus sees wait
// states. Responses are OKAY.
// The sub-blocks (sync, console with font ROM, image with dual-port RAM)
// and the 8-bit colour output are the document's; the register map, the
// screen split and the colour-mixing rule are this design's choices.
module ahb_vga
  import ahb_pkg::*;
#(
  parameter int unsigned CON_COLS = 80,
  parameter int unsigned CON_ROWS = 30,
  parameter int unsigned IMG_W    = 160,
  parameter int unsigned IMG_H    = 60,
  parameter int unsigned IMG_SCALE = 4
) (
  input  logic       hclk,
  input  logic       hresetn,
  input  logic       hsel,
  input  ahb_req_t   req,
  output ahb_rsp_t   rsp,
  output logic       hsync,
  output logic       vsync,
  output logic [7:0] rgb
);

  localparam int unsigned IMG_AW = $clog2(IMG_W * IMG_H);

  logic        dp_write, dp_img;
  logic [13:0] dp_word;          // HADDR[15:2] of the data phase
  logic [7:0]  text_colour;
  logic        con_ready, con_wr, con_sel, col_sel;

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      dp_write <= 1'b0;
      dp_img   <= 1'b0;
      dp_word  <= '0;
    end else if (req.hready) begin
      dp_write <= hsel && is_active(req.htrans) && req.hwrite;
      if (hsel && is_active(req.htrans)) begin
        dp_img  <= req.haddr[16];
        dp_word <= req.haddr[15:2];
      end
    end
  end

  assign con_sel = !dp_img && dp_word == 14'd0;
  assign col_sel = !dp_img && dp_word == 14'd1;
  assign con_wr  = dp_write && con_sel && con_ready;

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn)                  text_colour <= 8'hFF;
    else if (dp_write && col_sel)  text_colour <= req.hwdata[7:0];
  end

  assign rsp.hrdata    = col_sel ? 32'(text_colour) : 32'd0;
  assign rsp.hreadyout = !(dp_write && con_sel && !con_ready);
  assign rsp.hresp     = 1'b0;

  // ---------------- display ----------------
  logic       hs, vs, video_on, p_tick;
  logic [9:0] px, py;
  logic       con_region, text_on, text_on_q, con_region_q;
  logic [7:0] img_colour;

  vga_sync u_sync (
    .clk(hclk), .rstn(hresetn), .hsync(hs), .vsync(vs), .video_on(video_on),
    .p_tick(p_tick), .pixel_x(px), .pixel_y(py)
  );

  vga_console #(.COLS(CON_COLS), .ROWS(CON_ROWS)) u_console (
    .clk(hclk), .rstn(hresetn), .wr_en(con_wr), .wr_char(req.hwdata[7:0]),
    .ready(con_ready), .pixel_x(px), .pixel_y(py),
    .in_region(con_region), .text_on(text_on)
  );

  vga_image #(.IMG_W(IMG_W), .IMG_H(IMG_H), .SCALE(IMG_SCALE), .Y0(CON_ROWS * 8)) u_image (
    .clk(hclk), .rstn(hresetn),
    .wr_en(dp_write && dp_img), .wr_addr(IMG_AW'(dp_word)), .wr_data(req.hwdata[7:0]),
    .pixel_x(px), .pixel_y(py), .in_region(), .colour(img_colour)
  );

  // The image colour is one clock late; delay the console result to match.
  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      text_on_q    <= 1'b0;
      con_region_q <= 1'b0;
    end else begin
      text_on_q    <= text_on;
      con_region_q <= con_region;
    end
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      hsync <= 1'b1;
      vsync <= 1'b1;
      rgb   <= '0;
    end else if (p_tick) begin
      hsync <= hs;
      vsync <= vs;
      if (!video_on)         rgb <= '0;
      else if (con_region_q) rgb <= text_on_q ? text_colour : 8'h00;
      else                   rgb <= img_colour;
    end
  end

endmodule
