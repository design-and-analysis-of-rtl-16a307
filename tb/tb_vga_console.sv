// tb_vga_console: waits for the post-reset clear, writes text with line
// feeds, carriage return and line wrap, then scans every pixel of the text
// band and compares text_on with the glyph the cursor rules put there
// (glyph bits from a reference font_rom instance). Uses a 12 x 4 console.
module tb_vga_console;
  localparam int COLS = 12, ROWS = 4;
  logic clk = 0, rstn = 0, wr_en = 0;
  logic [7:0] wr_char = 0;
  logic ready, in_region, text_on;
  logic [9:0] pixel_x = 0, pixel_y = 0;
  logic [6:0] ref_code;
  logic [2:0] ref_row;
  logic [7:0] ref_bits;
  byte screen [ROWS][COLS];
  int checks = 0, failures = 0, lit = 0;

  always #5 clk = ~clk;

  vga_console #(.COLS(COLS), .ROWS(ROWS)) dut (
    .clk(clk), .rstn(rstn), .wr_en(wr_en), .wr_char(wr_char), .ready(ready),
    .pixel_x(pixel_x), .pixel_y(pixel_y), .in_region(in_region), .text_on(text_on));

  font_rom ref_font (.code(ref_code), .row(ref_row), .bits(ref_bits));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // text and the screen it must give: "HELLO", new line, "TEST",
    // carriage return over "TE" with "12", then a line longer than COLS
    string text = {"HELLO", 8'h0A, "TEST", 8'h0D, "12", 8'h0A, "ABCDEFGHIJKLMN"};
    int col = 0, row = 0;
    foreach (screen[r, c]) screen[r][c] = " ";
    repeat (2) @(negedge clk);
    rstn = 1;
    @(negedge clk);
    checks++;
    if (ready) begin failures++; $display("FAIL ready during clear"); end
    wait (ready);
    @(negedge clk);
    foreach (text[i]) begin
      byte ch;
      ch = text[i];
      wr_en = 1; wr_char = ch;
      @(negedge clk);
      if (ch == 8'h0D) col = 0;
      else if (ch == 8'h0A) begin col = 0; row = (row + 1) % ROWS; end
      else begin
        screen[row][col] = ch;
        if (col == COLS - 1) begin col = 0; row = (row + 1) % ROWS; end
        else col++;
      end
    end
    wr_en = 0;
    @(negedge clk);
    for (int y = 0; y < ROWS * 8 + 4; y++) begin
      for (int x = 0; x < COLS * 8 + 4; x++) begin
        logic exp_on, exp_in;
        pixel_x = 10'(x);
        pixel_y = 10'(y);
        exp_in = (y < ROWS * 8) && (x < COLS * 8);
        ref_code = exp_in ? 7'(screen[y / 8][x / 8]) : 7'h20;
        ref_row  = 3'(y % 8);
        #1;
        exp_on = exp_in && ref_bits[7 - x % 8];
        checks++;
        if (text_on != exp_on || in_region != exp_in) begin
          failures++;
          if (failures < 10) $display("FAIL pixel %0d,%0d: on %b/%b in %b/%b", x, y, text_on, exp_on, in_region, exp_in);
        end
        if (exp_on) lit++;
      end
    end
    checks++;
    if (lit == 0) begin failures++; $display("FAIL no lit pixels expected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
