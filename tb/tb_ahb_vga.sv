// tb_ahb_vga: full-size VGA peripheral test. Right after reset it writes
// the text colour (green, 0x1C) and the text "HELLO", new line, "TEST 123"
// while the console is still clearing (so the bus sees wait states), then
// fills the whole 160 x 60 image. It then checks every pixel of one complete
// 640x480 frame, plus hsync and vsync, against a picture built here: glyphs
// from a reference font_rom in the text band, the written image in the
// image band, black in the blanking. A pixel k (counted from reset) is
// registered on rising edge 2(k+1) after reset.
module tb_ahb_vga;
  import ahb_pkg::*;

  logic hclk = 0, hresetn = 0;
  ahb_req_t req;
  ahb_rsp_t rsp;
  logic [31:0] haddr, hwdata;
  logic [1:0] htrans;
  logic hwrite;
  logic [2:0] hsize;
  logic hsync, vsync;
  logic [7:0] rgb;
  logic [6:0] ref_code;
  logic [2:0] ref_row;
  logic [7:0] ref_bits;
  int checks = 0, failures = 0;
  byte screen [30][80];
  logic [7:0] img [160 * 60];
  bit setup_done = 0;

  always #5 hclk = ~hclk;

  ahb_master_bfm bfm (.hclk(hclk), .hready(rsp.hreadyout), .hrdata(rsp.hrdata), .haddr(haddr),
                      .htrans(htrans), .hwrite(hwrite), .hsize(hsize), .hwdata(hwdata));
  assign req = '{haddr: haddr, htrans: htrans_e'(htrans), hwrite: hwrite, hsize: hsize_e'(hsize),
                 hwdata: hwdata, hready: rsp.hreadyout};

  ahb_vga dut (.hclk(hclk), .hresetn(hresetn), .hsel(1'b1), .req(req), .rsp(rsp),
               .hsync(hsync), .vsync(vsync), .rgb(rgb));

  font_rom ref_font (.code(ref_code), .row(ref_row), .bits(ref_bits));

  initial begin
    #30000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bus side
  initial begin
    logic [31:0] q;
    string l1 = "HELLO", l2 = "TEST 123";
    foreach (screen[r, c]) screen[r][c] = " ";
    foreach (l1[i]) screen[0][i] = l1[i];
    foreach (l2[i]) screen[1][i] = l2[i];
    repeat (2) @(negedge hclk);
    hresetn = 1;
    bfm.write(32'h5000_0004, 32'h1C);
    bfm.read(32'h5000_0004, q);
    checks++;
    if (q != 32'h1C) begin failures++; $display("FAIL colour read %h", q); end
    foreach (l1[i]) bfm.write(32'h5000_0000, 32'(l1[i]));
    bfm.write(32'h5000_0000, 32'h0A);
    foreach (l2[i]) bfm.write(32'h5000_0000, 32'(l2[i]));
    checks++;
    if (bfm.waits == 0) begin failures++; $display("FAIL no wait state during console clear"); end
    for (int i = 0; i < 160 * 60; i++) begin
      img[i] = 8'(i * 7 + i / 160);
      bfm.write(32'h5001_0000 + 32'(4 * i), 32'(img[i]));
    end
    setup_done = 1;
  end

  // display side
  initial begin
    longint n = 0;
    int green = 0;
    @(posedge hresetn);
    forever begin
      @(posedge hclk);
      n++;
      if (n % 2 == 0) begin
        longint k;
        k = n / 2 - 1;
        if (k >= 420000) begin
          int h, v;
          logic [7:0] exp;
          logic ehs, evs;
          h = int'(k % 800);
          v = int'((k / 800) % 525);
          @(negedge hclk);
          if (k == 420000 && !setup_done) begin
            failures++; $display("FAIL setup not finished before frame 1");
          end
          if (h >= 640 || v >= 480) exp = 8'h00;
          else if (v < 240) begin
            ref_code = 7'(screen[v / 8][h / 8]);
            ref_row  = 3'(v % 8);
            #1;
            exp = ref_bits[7 - h % 8] ? 8'h1C : 8'h00;
          end else exp = img[((v - 240) / 4) * 160 + h / 4];
          ehs = !(h >= 656 && h < 752);
          evs = !(v >= 490 && v < 492);
          checks++;
          if (rgb != exp || hsync != ehs || vsync != evs) begin
            failures++;
            if (failures < 10) $display("FAIL pixel %0d,%0d: rgb %h/%h hs %b/%b vs %b/%b",
                                        h, v, rgb, exp, hsync, ehs, vsync, evs);
          end
          if (exp == 8'h1C && v < 240) green++;
          if (k == 839999) begin
            checks++;
            if (green == 0) begin failures++; $display("FAIL no text pixels"); end
            $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
            $finish;
          end
        end
      end
    end
  end
endmodule
