// mcu_top: AHB-Lite microcontroller system without its processor.
//
// One AHB-Lite master, seven slaves. The master's signals are the ports
// haddr..hwdata (in) and hrdata/hready/hresp (out); in the full system they
// connect to an ARM Cortex-M0, which is vendor IP and not part of this RTL.
// ahb_decoder selects a slave from the top address byte:
//   0x0000_0000-0x4FFF_FFFF  4 KB internal memory (ahb_bram)
//   0x5000_0000-0x50FF_FFFF  VGA          (ahb_vga)
//   0x5100_0000-0x51FF_FFFF  UART         (ahb_uart)
//   0x5200_0000-0x52FF_FFFF  timer        (ahb_timer)
//   0x5300_0000-0x53FF_FFFF  GPIO         (ahb_gpio)
//   0x5400_0000-0x54FF_FFFF  7-segment    (ahb_sevenseg)
//   0x5500_0000-0x55FF_FFFF  LED          (ahb_led)
// and ahb_mux returns the data-phase slave's read data and ready/response.
// The multiplexed HREADY goes back to every slave as the bus-wide ready.
// The board pins of the peripherals are the remaining ports. The memory map,
// the set of peripherals and the 32-bit buses are the document's; the
// handling of addresses above the map (OKAY, read data 0) and the 50 MHz
// clock assumed by the baud-rate, display-refresh and VGA timing are this
// design's choices.
module mcu_top
  import ahb_pkg::*;
#(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned BAUD   = 19_200
) (
  input  logic        hclk,
  input  logic        hresetn,
  // AHB-Lite master port (processor side)
  input  logic [31:0] haddr,
  input  logic [1:0]  htrans,
  input  logic        hwrite,
  input  logic [2:0]  hsize,
  input  logic [31:0] hwdata,
  output logic [31:0] hrdata,
  output logic        hready,
  output logic        hresp,
  // board pins
  input  logic [7:0]  gpio_in,
  output logic [7:0]  gpio_out,
  output logic [7:0]  gpio_dir,
  output logic [7:0]  led,
  input  logic        uart_rx,
  output logic        uart_tx,
  output logic [6:0]  seg,
  output logic [3:0]  an,
  output logic        vga_hsync,
  output logic        vga_vsync,
  output logic [7:0]  vga_rgb,
  output logic        timer_irq
);

  ahb_req_t             req;
  logic [NSLV-1:0]      hsel;
  slave_e               slave_id;
  ahb_rsp_t [NSLV-1:0]  rsp;

  assign req.haddr  = haddr;
  assign req.htrans = htrans_e'(htrans);
  assign req.hwrite = hwrite;
  assign req.hsize  = hsize_e'(hsize);
  assign req.hwdata = hwdata;
  assign req.hready = hready;

  ahb_decoder u_dec (.haddr(haddr), .hsel(hsel), .slave_id(slave_id));

  ahb_mux u_mux (
    .hclk(hclk), .hresetn(hresetn), .slave_id(slave_id), .slv_rsp(rsp),
    .hrdata(hrdata), .hready(hready), .hresp(hresp)
  );

  ahb_bram u_bram (
    .hclk(hclk), .hresetn(hresetn), .hsel(hsel[SLV_BRAM]), .req(req), .rsp(rsp[SLV_BRAM])
  );

  ahb_vga u_vga (
    .hclk(hclk), .hresetn(hresetn), .hsel(hsel[SLV_VGA]), .req(req), .rsp(rsp[SLV_VGA]),
    .hsync(vga_hsync), .vsync(vga_vsync), .rgb(vga_rgb)
  );

  ahb_uart #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart (
    .hclk(hclk), .hresetn(hresetn), .hsel(hsel[SLV_UART]), .req(req), .rsp(rsp[SLV_UART]),
    .rx(uart_rx), .tx(uart_tx)
  );

  ahb_timer u_timer (
    .hclk(hclk), .hresetn(hresetn), .hsel(hsel[SLV_TIMER]), .req(req), .rsp(rsp[SLV_TIMER]),
    .timer_irq(timer_irq)
  );

  ahb_gpio #(.NBITS(8)) u_gpio (
    .hclk(hclk), .hresetn(hresetn), .hsel(hsel[SLV_GPIO]), .req(req), .rsp(rsp[SLV_GPIO]),
    .gpio_in(gpio_in), .gpio_out(gpio_out), .gpio_dir(gpio_dir)
  );

  ahb_sevenseg #(.CLK_HZ(CLK_HZ)) u_seg (
    .hclk(hclk), .hresetn(hresetn), .hsel(hsel[SLV_7SEG]), .req(req), .rsp(rsp[SLV_7SEG]),
    .seg(seg), .an(an)
  );

  ahb_led #(.NLED(8)) u_led (
    .hclk(hclk), .hresetn(hresetn), .hsel(hsel[SLV_LED]), .req(req), .rsp(rsp[SLV_LED]),
    .led(led)
  );

  // AHB-Lite rules the master must keep; checked here because the master is
  // outside this RTL.
  property p_hold_addr;
    @(posedge hclk) disable iff (!hresetn)
      (!hready && is_active(req.htrans)) |=> $stable(haddr) && $stable(hwrite);
  endproperty
  a_hold_addr: assert property (p_hold_addr)
    else $error("mcu_top: address changed during a wait state");

endmodule
