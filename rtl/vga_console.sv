// vga_console: text console of the VGA peripheral.
//
// A character buffer of COLS x ROWS 7-bit codes covers the top band of the
// screen in 8x8 pixel cells (80 x 30 cells = the upper 240 lines of a
// 640x480 screen by default). Characters arrive one at a time on
// wr_en/wr_char and are written at a cursor that moves right; a line feed
// (0x0A) moves the cursor to the start of the next line, a carriage return
// (0x0D) to the start of the current one, and after the last column the
// cursor wraps to the next line. After the last line it returns to the top
// line (no scrolling). Both cursor and buffer are cleared by reset
// (the buffer holds spaces, done by a sweep of COLS*ROWS clocks after
// reset; characters written meanwhile wait in no queue and are dropped, so
// `ready` says when the console accepts them).
// Display side: for the position pixel_x/pixel_y it reads the cell's code,
// looks up the glyph row in font_rom and sets text_on when the pixel is
// part of the character; in_region says the position is in the text band.
// Both are combinational. The document describes the console only as
// displaying text in hardware; buffer size, cursor rules and cell size are
// this design's choices.
module vga_console #(
  parameter int unsigned COLS = 80,
  parameter int unsigned ROWS = 30
) (
  input  logic       clk,
  input  logic       rstn,
  input  logic       wr_en,
  input  logic [7:0] wr_char,
  output logic       ready,
  input  logic [9:0] pixel_x,
  input  logic [9:0] pixel_y,
  output logic       in_region,
  output logic       text_on
);

  localparam int unsigned CELLS = COLS * ROWS;
  localparam int unsigned AW    = $clog2(CELLS);
  localparam int unsigned CW    = $clog2(COLS);
  localparam int unsigned RWD   = $clog2(ROWS);

  logic [6:0]     buffer [CELLS];
  logic [CW-1:0]  col;
  logic [RWD-1:0] row;
  logic           clearing;
  logic [AW-1:0]  clr_addr;
  logic [AW-1:0]  wr_addr;
  logic           wr_lf, wr_cr;

  logic [AW-1:0]  rd_addr;
  logic [6:0]     rd_code;
  logic [7:0]     glyph_row;

  assign ready   = !clearing;
  assign wr_lf   = (wr_char == 8'h0A);
  assign wr_cr   = (wr_char == 8'h0D);
  assign wr_addr = AW'(32'(row) * COLS + 32'(col));

  // Cursor and clear sweep.
  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      col      <= '0;
      row      <= '0;
      clearing <= 1'b1;
      clr_addr <= '0;
    end else if (clearing) begin
      if (32'(clr_addr) == CELLS - 1) clearing <= 1'b0;
      clr_addr <= clr_addr + 1'b1;
    end else if (wr_en) begin
      if (wr_cr) begin
        col <= '0;
      end else if (wr_lf || 32'(col) == COLS - 1) begin
        col <= '0;
        row <= (32'(row) == ROWS - 1) ? '0 : row + 1'b1;
      end else begin
        col <= col + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (clearing)                       buffer[clr_addr] <= 7'h20;
    else if (wr_en && !wr_lf && !wr_cr) buffer[wr_addr]  <= wr_char[6:0];
  end

  // Display lookup.
  assign in_region = (32'(pixel_y) < ROWS * 8) && (32'(pixel_x) < COLS * 8);
  assign rd_addr   = AW'(32'(pixel_y[9:3]) * COLS + 32'(pixel_x[9:3]));
  assign rd_code   = in_region ? buffer[rd_addr] : 7'h20;

  font_rom u_font (
    .code(rd_code), .row(pixel_y[2:0]), .bits(glyph_row)
  );

  assign text_on = in_region && glyph_row[3'd7 - pixel_x[2:0]];

endmodule
