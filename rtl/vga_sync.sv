// vga_sync: timing generator for a 640x480, 60 Hz VGA display.
//
// A divider makes a pixel tick every CLK_DIV clocks (25 MHz from the 50 MHz
// system clock). Two vga_counter instances count pixels in a line
// (H_TOTAL = 800) and lines in a frame (V_TOTAL = 525); the line counter
// steps when the pixel counter wraps. hsync and vsync are active low,
// asserted during the sync part of the blanking intervals:
//   horizontal: 640 visible, 16 front porch, 96 sync, 48 back porch
//   vertical:   480 visible, 10 front porch,  2 sync, 33 back porch
// video_on is high for visible pixels. pixel_x/pixel_y give the current
// position; they change on the clock edge where p_tick is high, so p_tick
// marks the last clock of each pixel. Outputs are combinational from the
// counters. The document names the block and its counter sub-block; the
// 640x480 standard timing and the clock ratio are this design's choices.
module vga_sync #(
  parameter int unsigned CLK_DIV  = 2,
  parameter int unsigned H_VISIBLE = 640,
  parameter int unsigned H_FRONT  = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BACK   = 48,
  parameter int unsigned V_VISIBLE = 480,
  parameter int unsigned V_FRONT  = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BACK   = 33
) (
  input  logic        clk,
  input  logic        rstn,
  output logic        hsync,
  output logic        vsync,
  output logic        video_on,
  output logic        p_tick,
  output logic [9:0]  pixel_x,
  output logic [9:0]  pixel_y
);

  localparam int unsigned H_TOTAL = H_VISIBLE + H_FRONT + H_SYNC + H_BACK;
  localparam int unsigned V_TOTAL = V_VISIBLE + V_FRONT + V_SYNC + V_BACK;
  localparam int unsigned HW = $clog2(H_TOTAL);
  localparam int unsigned VW = $clog2(V_TOTAL);

  logic [HW-1:0] hcount;
  logic [VW-1:0] vcount;
  logic          hlast;
  logic          div_last;

  if (CLK_DIV > 1) begin : g_div
    logic [$clog2(CLK_DIV)-1:0] div_cnt;
    vga_counter #(.N(CLK_DIV)) u_div (
      .clk(clk), .rstn(rstn), .en(1'b1), .count(div_cnt), .last(div_last)
    );
  end else begin : g_nodiv
    assign div_last = 1'b1;
  end

  assign p_tick = div_last;

  vga_counter #(.N(H_TOTAL)) u_hcnt (
    .clk(clk), .rstn(rstn), .en(p_tick), .count(hcount), .last(hlast)
  );

  vga_counter #(.N(V_TOTAL)) u_vcnt (
    .clk(clk), .rstn(rstn), .en(p_tick && hlast), .count(vcount), .last()
  );

  assign hsync = !((hcount >= HW'(H_VISIBLE + H_FRONT)) &&
                   (hcount <  HW'(H_VISIBLE + H_FRONT + H_SYNC)));
  assign vsync = !((vcount >= VW'(V_VISIBLE + V_FRONT)) &&
                   (vcount <  VW'(V_VISIBLE + V_FRONT + V_SYNC)));
  assign video_on = (hcount < HW'(H_VISIBLE)) && (vcount < VW'(V_VISIBLE));
  assign pixel_x  = 10'(hcount);
  assign pixel_y  = 10'(vcount);

endmodule
