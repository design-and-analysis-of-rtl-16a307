// tb_vga_sync: runs two full 640x480 frames at the default timing and
// checks, cycle by cycle, the pixel position, hsync, vsync and video_on
// against counters kept by the testbench: 800 pixels x 525 lines, a pixel
// every 2 clocks, hsync low for pixels 656-751, vsync low for lines 490-491.
module tb_vga_sync;
  logic clk = 0, rstn = 0;
  logic hsync, vsync, video_on, p_tick;
  logic [9:0] pixel_x, pixel_y;
  int checks = 0, failures = 0;
  int hs_pulses = 0, vs_pulses = 0;

  always #5 clk = ~clk;

  vga_sync dut (.clk(clk), .rstn(rstn), .hsync(hsync), .vsync(vsync), .video_on(video_on),
                .p_tick(p_tick), .pixel_x(pixel_x), .pixel_y(pixel_y));

  initial begin
    #40000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int h = 0, v = 0, phase = 0;
    logic hs_q = 1, vs_q = 1;
    repeat (2) @(negedge clk);
    rstn = 1;
    for (longint c = 0; c < 2 * 2 * 800 * 525; c++) begin
      logic ehs, evs, eon;
      ehs = !(h >= 656 && h < 752);
      evs = !(v >= 490 && v < 492);
      eon = (h < 640) && (v < 480);
      checks++;
      if (pixel_x != 10'(h) || pixel_y != 10'(v) || hsync != ehs || vsync != evs ||
          video_on != eon || p_tick != (phase == 1)) begin
        failures++;
        if (failures < 10)
          $display("FAIL c=%0d pos %0d,%0d exp %0d,%0d hs %b/%b vs %b/%b on %b/%b tick %b",
                   c, pixel_x, pixel_y, h, v, hsync, ehs, vsync, evs, video_on, eon, p_tick);
      end
      if (!hsync && hs_q) hs_pulses++;
      if (!vsync && vs_q) vs_pulses++;
      hs_q = hsync;
      vs_q = vsync;
      @(negedge clk);
      if (phase == 1) begin
        if (h == 799) begin h = 0; v = (v == 524) ? 0 : v + 1; end
        else h++;
      end
      phase = 1 - phase;
    end
    checks++;
    if (hs_pulses != 2 * 525 || vs_pulses != 2) begin
      failures++; $display("FAIL pulses: %0d hsync, %0d vsync", hs_pulses, vs_pulses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
