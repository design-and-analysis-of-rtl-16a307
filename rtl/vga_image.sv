// vga_image: image buffer of the VGA peripheral.
//
// Holds one 8-bit colour (RRRGGGBB) per pixel of an IMG_W x IMG_H image in a
// dual_port_ram_sync. The image fills the screen band that starts at line
// Y0; each stored pixel is shown as a SCALE x SCALE block, so the defaults
// (160 x 60, scale 4, from line 240) cover the lower half of a 640x480
// screen. The bus writes pixel number y*IMG_W + x through the write port;
// the display side computes the pixel number from pixel_x/pixel_y and reads
// through the other port. `colour` arrives one clock after the position
// (the RAM's read latency) and is 0 outside the image; `in_region` is
// combinational. The document gives the image buffer's purpose; its size,
// placement and scaling are this design's choices.
module vga_image #(
  parameter int unsigned IMG_W = 160,
  parameter int unsigned IMG_H = 60,
  parameter int unsigned SCALE = 4,
  parameter int unsigned Y0    = 240,
  localparam int unsigned AW   = $clog2(IMG_W * IMG_H)
) (
  input  logic          clk,
  input  logic          rstn,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [7:0]    wr_data,
  input  logic [9:0]    pixel_x,
  input  logic [9:0]    pixel_y,
  output logic          in_region,
  output logic [7:0]    colour
);

  localparam int unsigned SH = $clog2(SCALE);

  logic [9:0]    ix, iy;
  logic [AW-1:0] rd_addr;
  logic [7:0]    ram_q;
  logic          in_region_q;

  assign iy = (pixel_y - 10'(Y0)) >> SH;
  assign ix = pixel_x >> SH;
  assign in_region = (pixel_y >= 10'(Y0)) && (32'(iy) < IMG_H) && (32'(ix) < IMG_W);
  assign rd_addr   = AW'(32'(iy) * IMG_W + 32'(ix));

  dual_port_ram_sync #(.ADDR_W(AW), .DATA_W(8), .DEPTH(IMG_W * IMG_H)) u_ram (
    .clk(clk), .we_a(wr_en), .addr_a(wr_addr), .din_a(wr_data),
    .addr_b(rd_addr), .dout_b(ram_q)
  );

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) in_region_q <= 1'b0;
    else       in_region_q <= in_region;
  end

  assign colour = in_region_q ? ram_q : 8'h00;

  initial assert ((1 << SH) == SCALE) else $error("vga_image: SCALE must be a power of two");

endmodule
