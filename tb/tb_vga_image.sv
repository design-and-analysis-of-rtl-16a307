// tb_vga_image: writes a pattern into a 16 x 8 image (scale 2, starting at
// line 20), then sweeps positions over and around the image band and checks
// the colour one clock after each position and the in_region flag.
module tb_vga_image;
  localparam int W = 16, H = 8, S = 2, Y0 = 20;
  localparam int AW = $clog2(W * H);
  logic clk = 0, rstn = 0, wr_en = 0;
  logic [AW-1:0] wr_addr = 0;
  logic [7:0] wr_data = 0, colour;
  logic [9:0] pixel_x = 0, pixel_y = 0;
  logic in_region;
  logic [7:0] img [W * H];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vga_image #(.IMG_W(W), .IMG_H(H), .SCALE(S), .Y0(Y0)) dut (
    .clk(clk), .rstn(rstn), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .pixel_x(pixel_x), .pixel_y(pixel_y), .in_region(in_region), .colour(colour));

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rstn = 1;
    for (int i = 0; i < W * H; i++) begin
      img[i] = 8'($urandom_range(1, 255));
      wr_en = 1; wr_addr = AW'(i); wr_data = img[i];
      @(negedge clk);
    end
    wr_en = 0;
    for (int y = Y0 - 3; y < Y0 + H * S + 3; y++) begin
      for (int x = 0; x < W * S + 4; x++) begin
        logic ein;
        logic [7:0] ecol;
        pixel_x = 10'(x);
        pixel_y = 10'(y);
        ein  = (y >= Y0) && (y < Y0 + H * S) && (x < W * S);
        ecol = ein ? img[((y - Y0) / S) * W + x / S] : 8'h00;
        #1;
        checks++;
        if (in_region != ein) begin failures++; $display("FAIL in_region at %0d,%0d", x, y); end
        @(negedge clk);
        checks++;
        if (colour != ecol) begin
          failures++;
          if (failures < 10) $display("FAIL colour at %0d,%0d: %h expected %h", x, y, colour, ecol);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
