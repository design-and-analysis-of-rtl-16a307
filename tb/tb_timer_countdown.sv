// tb_timer_countdown: the timer demonstration run on the whole system at its
// default parameters. The timer is loaded with 0xFFFF in periodic mode with
// the /16 prescaler; a program loop (played by the bus-functional master)
// keeps reading the count and writing its four hex digits to the 7-segment
// registers. The testbench decodes the multiplexed display once per 1 ms
// loop and checks that its leading digit counts down from F to 0 in step
// with the elapsed clocks and starts again from F, twice, with interrupts
// exactly 65536 x 16 clocks apart.
module tb_timer_countdown;
  logic        hclk = 0, hresetn = 0;
  logic [31:0] haddr, hwdata, hrdata;
  logic [1:0]  htrans;
  logic        hwrite, hready, hresp;
  logic [2:0]  hsize;
  logic [7:0]  gpio_out, gpio_dir, led, vga_rgb;
  logic        uart_tx, vga_hsync, vga_vsync, timer_irq;
  logic [6:0]  seg;
  logic [3:0]  an;
  int checks = 0, failures = 0;
  longint cyc = 0, t_enable = -1;
  longint irq_at [$];
  bit done = 0;

  localparam longint PERIOD = 65536 * 16;

  always #10 hclk = ~hclk;
  always @(posedge hclk) cyc <= cyc + 1;

  ahb_master_bfm bfm (.hclk(hclk), .hready(hready), .hrdata(hrdata), .haddr(haddr),
                      .htrans(htrans), .hwrite(hwrite), .hsize(hsize), .hwdata(hwdata));

  mcu_top dut (
    .hclk(hclk), .hresetn(hresetn), .haddr(haddr), .htrans(htrans), .hwrite(hwrite),
    .hsize(hsize), .hwdata(hwdata), .hrdata(hrdata), .hready(hready), .hresp(hresp),
    .gpio_in(8'h00), .gpio_out(gpio_out), .gpio_dir(gpio_dir), .led(led),
    .uart_rx(1'b1), .uart_tx(uart_tx), .seg(seg), .an(an),
    .vga_hsync(vga_hsync), .vga_vsync(vga_vsync), .vga_rgb(vga_rgb), .timer_irq(timer_irq));

  function automatic int seg_to_hex(logic [6:0] s);
    logic [6:0] pat [16];
    pat = '{7'h40, 7'h79, 7'h24, 7'h30, 7'h19, 7'h12, 7'h02, 7'h78,
            7'h00, 7'h10, 7'h08, 7'h03, 7'h46, 7'h21, 7'h06, 7'h0E};
    for (int i = 0; i < 16; i++) if (pat[i] == s) return i;
    return -1;
  endfunction

  logic irq_q = 0;
  always @(posedge hclk) begin
    irq_q <= timer_irq;
    if (hresetn && timer_irq && !irq_q) irq_at.push_back(cyc);
  end

  initial begin
    #120ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // program: start the timer, then copy the count to the display forever
  initial begin
    logic [31:0] v;
    repeat (3) @(negedge hclk);
    hresetn = 1;
    bfm.write(32'h5200_0000, 32'hFFFF);
    bfm.write(32'h5200_0008, 32'b0111);      // enable, periodic, /16
    t_enable = cyc;
    while (!done) begin
      bfm.read(32'h5200_0004, v);
      for (int d = 0; d < 4; d++) bfm.write(32'h5400_0000 + 32'(4 * d), (v >> (4 * d)) & 32'hF);
      if (timer_irq) bfm.write(32'h5200_000C, 0);
    end
  end

  // display observer: the most significant digit, decoded once per 1 ms
  // loop (the lower digits change faster than the loop at this prescale)
  initial begin
    int shown [4];
    int top, prev, reloads, samples, lowest;
    longint e_start, e_end;
    prev = 16;
    reloads = 0;
    samples = 0;
    lowest = 15;
    wait (t_enable >= 0);
    while (reloads < 2 || samples < 3) begin
      int mask;
      mask = 0;
      e_start = 32'hFFFF - (((cyc - t_enable) % PERIOD) / 16);
      for (int c = 0; c < 50_000; c++) begin
        @(negedge hclk);
        for (int d = 0; d < 4; d++)
          if (an == ~(4'b1 << d)) begin shown[d] = seg_to_hex(seg); mask |= 1 << d; end
      end
      e_end = 32'hFFFF - (((cyc - t_enable) % PERIOD) / 16);
      top = shown[3];
      checks++;
      if (mask != 4'hF || shown[0] < 0 || shown[1] < 0 || shown[2] < 0 || shown[3] < 0) begin
        failures++; $display("FAIL display not decodable");
      end
      // the digit shown must lie between the counts at the loop's start and end
      if (e_end <= e_start) begin
        checks++;
        if (top > int'(e_start >> 12) || top < int'(e_end >> 12)) begin
          failures++; $display("FAIL top digit %h, count went from %h to %h", top, e_start, e_end);
        end
      end
      if (top > prev) begin
        reloads++;
        samples = 0;
        checks++;
        if (lowest != 0) begin failures++; $display("FAIL reload before reaching zero (lowest %h)", lowest); end
      end else samples++;
      if (top < lowest) lowest = top;
      prev = top;
    end
    done = 1;
    checks++;
    if (irq_at.size() < 2 || irq_at[0] - t_enable < PERIOD - 16 || irq_at[0] - t_enable > PERIOD + 4
        || irq_at[1] - irq_at[0] != PERIOD) begin
      failures++;
      $display("FAIL interrupts at %0d and %0d clocks, expected about %0d and exactly %0d apart",
               irq_at.size() > 0 ? irq_at[0] - t_enable : -1, irq_at.size() > 1 ? irq_at[1] - t_enable : -1,
               PERIOD, PERIOD);
    end
    $display("countdown: lowest top digit %h, %0d reload(s), interrupt after %0d clocks", lowest, reloads,
             irq_at.size() ? irq_at[0] - t_enable : -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
