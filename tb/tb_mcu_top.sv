// tb_mcu_top: end-to-end test of the microcontroller system at its default
// parameters (50 MHz clock, 19200 bps, 640x480 VGA, 1 kHz display loop).
// The bus-functional master plays the program the processor would run:
//   0. A pipelined run of nine back-to-back transfers hopping between
//      memory, LED, VGA, timer and an unmapped address; it sets the text
//      colour and writes the 'H' of "HELLO", which stalls mid-run because
//      the console is still clearing. Every read is checked.
//   1. VGA: the rest of "HELLO" on the console while it is still
//      clearing (wait states), image band filled with red (0xE0);
//      a whole frame is then sampled and the green pixels counted against
//      the glyphs.
//   2. GPIO/LED: switches read through GPIO (all inputs) are copied to the
//      LEDs; then GPIO pins are made outputs and driven.
//   3. Memory: "TEST" stored as four byte writes, read back as one word.
//   4. UART: the four bytes are read from memory and sent; the serial line
//      is decoded here (19200 bps = 2608 clocks per bit at 50 MHz with the
//      16x divider) and looped back into the receiver, whose FIFO is read;
//      then "HELLO" is sent and checked the same way.
//   5. Timer: periodic mode with the /16 and /256 prescalers, interrupt
//      period measured; free-running wrap; interrupt clear.
//   6. 7-segment: the timer count is written to the four digit registers
//      and the multiplexed display is decoded over one 1 ms loop.
//   7. A read outside the memory map returns 0.
// Each mechanism is counted; one that never happened is a failure.
module tb_mcu_top;
  logic        hclk = 0, hresetn = 0;
  logic [31:0] haddr, hwdata, hrdata;
  logic [1:0]  htrans;
  logic        hwrite, hready, hresp;
  logic [2:0]  hsize;
  logic [7:0]  gpio_in = 0, gpio_out, gpio_dir, led, vga_rgb;
  logic        uart_tx, vga_hsync, vga_vsync, timer_irq;
  logic [6:0]  seg;
  logic [3:0]  an;
  logic [6:0]  ref_code;
  logic [2:0]  ref_row;
  logic [7:0]  ref_bits;

  int checks = 0, failures = 0;
  longint cyc = 0;

  // mechanism counters
  int n_wait = 0, n_gpio_in = 0, n_gpio_out = 0, n_byte_write = 0, n_uart_tx = 0,
      n_uart_rx = 0, n_pre16 = 0, n_pre256 = 0, n_irq = 0, n_wrap = 0, n_7seg = 0,
      n_unmapped = 0, n_vga_text = 0, n_vga_image = 0, n_pipe = 0;

  localparam int BIT_CLKS = 2608;

  always #10 hclk = ~hclk;      // 50 MHz
  always @(posedge hclk) cyc <= cyc + 1;

  ahb_master_bfm bfm (.hclk(hclk), .hready(hready), .hrdata(hrdata), .haddr(haddr),
                      .htrans(htrans), .hwrite(hwrite), .hsize(hsize), .hwdata(hwdata));

  mcu_top dut (
    .hclk(hclk), .hresetn(hresetn), .haddr(haddr), .htrans(htrans), .hwrite(hwrite),
    .hsize(hsize), .hwdata(hwdata), .hrdata(hrdata), .hready(hready), .hresp(hresp),
    .gpio_in(gpio_in), .gpio_out(gpio_out), .gpio_dir(gpio_dir), .led(led),
    .uart_rx(uart_tx), .uart_tx(uart_tx), .seg(seg), .an(an),
    .vga_hsync(vga_hsync), .vga_vsync(vga_vsync), .vga_rgb(vga_rgb), .timer_irq(timer_irq));

  font_rom ref_font (.code(ref_code), .row(ref_row), .bits(ref_bits));

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %h expected %h", what, got, exp); end
  endtask

  // ---------- UART line decoder ----------
  logic [7:0] line_bytes [$];
  initial begin
    @(posedge hresetn);
    forever begin
      logic [9:0] frame;
      longint t0;
      @(negedge uart_tx);
      t0 = cyc;
      for (int b = 0; b < 10; b++) begin
        repeat (BIT_CLKS / 2) @(posedge hclk);
        frame[b] = uart_tx;
        repeat (BIT_CLKS / 2 - 2) begin
          @(posedge hclk);
          if (uart_tx != frame[b] && b != 9) begin
            checks++; failures++; $display("FAIL UART bit %0d shorter than %0d clocks", b, BIT_CLKS);
          end
        end
        if (b < 9) repeat (2) @(posedge hclk);
      end
      chk("UART start bit", frame[0], 0);
      chk("UART stop bit", frame[9], 1);
      line_bytes.push_back(frame[8:1]);
      n_uart_tx++;
    end
  end

  // ---------- timer interrupt edges ----------
  longint irq_rises [$];
  logic irq_q = 0;
  always @(posedge hclk) begin
    irq_q <= timer_irq;
    if (timer_irq && !irq_q) irq_rises.push_back(cyc);
  end

  // ---------- VGA frame sampler ----------
  int green = 0, red = 0, samples = 0;
  bit sample_on = 0;
  initial begin
    forever begin
      @(posedge hclk);
      if (sample_on) begin
        @(negedge hclk);
        if (vga_rgb == 8'h1C) green++;
        if (vga_rgb == 8'hE0) red++;
        samples++;
        @(posedge hclk);        // one sample per pixel (2 clocks)
      end
    end
  end

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q, v;
    string hello = "HELLO";
    int exp_green;
    repeat (3) @(negedge hclk);
    hresetn = 1;

    // 0. pipelined back-to-back transfers hopping between slaves, started
    //    while the console is still clearing so the VGA beat stalls mid-run
    begin
      logic [31:0] sa [9] = '{32'h0000_0100, 32'h5000_0004, 32'h0000_0100, 32'h5000_0000,
                              32'h5200_0000, 32'h5500_0000, 32'h5000_0004, 32'h6000_0000,
                              32'h5500_0000};
      logic        sw [9] = '{1, 1, 0, 1, 0, 1, 0, 0, 0};
      logic [31:0] sd [9] = '{32'h1234_5678, 32'h1C, 0, 32'(hello[0]), 0, 32'h5A, 0, 0, 0};
      logic [31:0] se [9] = '{0, 0, 32'h1234_5678, 0, 32'h0000_FFFF, 0, 32'h1C, 0, 32'h5A};
      int w0, bad;
      for (int i = 0; i < 9; i++) begin
        bfm.seq_addr[i]  = sa[i];
        bfm.seq_write[i] = sw[i];
        bfm.seq_data[i]  = sd[i];
      end
      w0 = int'(bfm.waits);
      bfm.run_seq(9);
      bad = failures;
      for (int i = 0; i < 9; i++)
        if (!sw[i]) chk($sformatf("pipelined beat %0d", i), bfm.seq_data[i], se[i]);
      if (failures == bad && int'(bfm.waits) > w0) n_pipe++;
    end

    // 1. VGA
    for (int i = 1; i < hello.len(); i++) bfm.write(32'h5000_0000, 32'(hello[i]));
    n_wait = int'(bfm.waits);
    for (int i = 0; i < 160 * 60; i++) bfm.write(32'h5001_0000 + 32'(4 * i), 32'hE0);
    exp_green = 0;
    foreach (hello[i])
      for (int r = 0; r < 8; r++) begin
        ref_code = 7'(hello[i]);
        ref_row  = 3'(r);
        #1;
        exp_green += $countones(ref_bits);
      end
    fork
      begin
        @(negedge hclk);
        sample_on = 1;
        wait (samples == 800 * 525);
        sample_on = 0;
        chk("VGA green text pixels", green, exp_green);
        chk("VGA red image pixels", red, 640 * 240);
        if (green > 0) n_vga_text++;
        if (red > 0) n_vga_image++;
      end
      begin
        // 2. GPIO -> LED
        bfm.write(32'h5300_0004, 32'h00);
        for (int t = 0; t < 6; t++) begin
          gpio_in = 8'($urandom);
          bfm.idle(3);
          bfm.read(32'h5300_0000, q);
          chk("GPIO switches", q, 32'(gpio_in));
          bfm.write(32'h5500_0000, q);
          @(negedge hclk);
          chk("LEDs follow switches", 32'(led), 32'(gpio_in));
          n_gpio_in++;
        end
        bfm.write(32'h5300_0004, 32'hF0);
        bfm.write(32'h5300_0000, 32'hA5);
        gpio_in = 8'h0F;
        bfm.idle(3);
        bfm.read(32'h5300_0000, q);
        chk("GPIO mixed", q, 32'hAF);
        chk("GPIO out pins", 32'(gpio_out & gpio_dir), 32'hA0);
        n_gpio_out++;

        // 3. memory
        begin
          string t = "TEST";
          foreach (t[i]) begin bfm.write(32'h0000_0100 + 32'(i), 32'(t[i]) << (8 * i), 3'b000); n_byte_write++; end
        end
        bfm.read(32'h0000_0100, q);
        chk("BRAM word", q, 32'h5453_4554);

        // 4. UART: send the stored bytes
        for (int i = 0; i < 4; i++) begin
          bfm.read(32'h0000_0100, q);
          bfm.write(32'h5100_0000, 32'(q >> (8 * i)) & 32'hFF);
        end
        wait (line_bytes.size() == 4);
        bfm.idle(3 * BIT_CLKS);
        chk("UART T", line_bytes[0], "T");
        chk("UART E", line_bytes[1], "E");
        chk("UART S", line_bytes[2], "S");
        chk("UART T", line_bytes[3], "T");
        for (int i = 0; i < 4; i++) begin
          bfm.read(32'h5100_0000, q);
          chk("UART loopback", q, 32'(line_bytes[i]));
          if (q == 32'(line_bytes[i])) n_uart_rx++;
        end
        // "HELLO" to the serial terminal as well
        foreach (hello[i]) bfm.write(32'h5100_0000, 32'(hello[i]));
        wait (line_bytes.size() == 9);
        bfm.idle(3 * BIT_CLKS);
        foreach (hello[i]) begin
          chk($sformatf("UART HELLO %0d", i), 32'(line_bytes[4 + i]), 32'(hello[i]));
          bfm.read(32'h5100_0000, q);
          chk("UART HELLO loopback", q, 32'(hello[i]));
        end
        bfm.read(32'h5100_0004, q);
        chk("UART status idle, queues empty", q & 32'h1F, 32'h0A);

        // 5. timer: periodic, /16 then /256
        for (int p = 0; p < 2; p++) begin
          int load, factor;
          load = (p == 0) ? 9 : 2;
          factor = (p == 0) ? 16 : 256;
          bfm.write(32'h5200_0008, 0);
          bfm.write(32'h5200_000C, 0);
          bfm.write(32'h5200_0000, 32'(load));
          irq_rises.delete();
          bfm.write(32'h5200_0008, (p == 0) ? 32'b0111 : 32'b1011);
          while (irq_rises.size() < 3) begin
            @(negedge hclk);
            if (timer_irq) begin bfm.write(32'h5200_000C, 0); n_irq++; end
          end
          chk("timer period", 32'(irq_rises[2] - irq_rises[1]), 32'((load + 1) * factor));
          if (p == 0) n_pre16++; else n_pre256++;
        end
        // free-running wrap
        bfm.write(32'h5200_0008, 0);
        bfm.write(32'h5200_0000, 1);
        bfm.write(32'h5200_0008, 32'b0001);
        bfm.idle(10);
        bfm.read(32'h5200_0004, q);
        checks++;
        if (q >= 32'hFFFF_FF00) n_wrap++;
        else begin failures++; $display("FAIL free-running wrap %h", q); end
        bfm.write(32'h5200_000C, 0);
        bfm.read(32'h5200_000C, q);
        chk("irq cleared", q, 0);

        // 6. 7-segment shows the timer count, counting down from FFFF with /16
        bfm.write(32'h5200_0008, 0);
        bfm.write(32'h5200_0000, 32'hFFFF);
        bfm.write(32'h5200_0008, 32'b0101);
        bfm.idle(200);
        bfm.read(32'h5200_0004, v);
        checks++;
        if (v > 32'hFFFF || v < 32'hFFF0) begin failures++; $display("FAIL timer count %h", v); end
        for (int d = 0; d < 4; d++) bfm.write(32'h5400_0000 + 32'(4 * d), (v >> (4 * d)) & 32'hF);
        begin
          int shown [4];
          int seen_mask;
          seen_mask = 0;
          for (int c = 0; c < 50_000; c++) begin
            @(negedge hclk);
            for (int d = 0; d < 4; d++)
              if (an == ~(4'b1 << d)) begin
                shown[d] = seg_to_hex(seg);
                seen_mask |= 1 << d;
              end
          end
          chk("all four digits scanned in 1 ms", seen_mask, 4'hF);
          for (int d = 0; d < 4; d++) chk("7-seg digit", shown[d], int'((v >> (4 * d)) & 32'hF));
          n_7seg++;
        end

        // 7. outside the map
        bfm.read(32'h6000_0000, q);
        chk("unmapped read", q, 0);
        chk("unmapped response", hresp, 0);
        n_unmapped++;
      end
    join

    // every mechanism must have happened
    begin
      int counts [15];
      string names [15];
      counts = '{n_wait, n_gpio_in, n_gpio_out, n_byte_write, n_uart_tx, n_uart_rx,
                          n_pre16, n_pre256, n_irq, n_wrap, n_7seg, n_unmapped, n_vga_text, n_vga_image, n_pipe};
      names = '{"wait state", "GPIO input", "GPIO output", "byte write", "UART tx",
                            "UART rx", "prescale 16", "prescale 256", "timer interrupt",
                            "free-running wrap", "7-seg scan", "unmapped access", "VGA text",
                            "VGA image", "pipelined mixed"};
      for (int i = 0; i < 15; i++) begin
        $display("mechanism %-18s %0d", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) begin failures++; $display("FAIL mechanism %s never happened", names[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int seg_to_hex(logic [6:0] s);
    // active-low {g,f,e,d,c,b,a} patterns of 0..F
    logic [6:0] pat [16] = '{7'h40, 7'h79, 7'h24, 7'h30, 7'h19, 7'h12, 7'h02, 7'h78,
                             7'h00, 7'h10, 7'h08, 7'h03, 7'h46, 7'h21, 7'h06, 7'h0E};
    for (int i = 0; i < 16; i++) if (pat[i] == s) return i;
    return -1;
  endfunction
endmodule
