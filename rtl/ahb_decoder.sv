// ahb_decoder: AHB-Lite address decoder.
//
// Turns the address-phase HADDR into a one-hot slave select, following the
// system memory map: 0x0000_0000-0x4FFF_FFFF internal memory (BRAM),
// 0x50 VGA, 0x51 UART, 0x52 timer, 0x53 GPIO, 0x54 7-segment, 0x55 LED in
// the top address byte. Only HADDR[31:24] is examined, so each peripheral
// aliases over its 16 MB region, as the map gives them. Addresses above
// 0x55FF_FFFF select no slave: hsel is all zero and slave_id is SLV_NONE;
// the multiplexer answers those transfers itself (this design's choice).
// Purely combinational.
module ahb_decoder
  import ahb_pkg::*;
(
  input  logic [31:0]     haddr,
  output logic [NSLV-1:0] hsel,      // one bit per slave, bit index = slave_e
  output slave_e          slave_id   // encoded form of hsel
);

  always_comb begin
    logic [7:0] top;
    top = haddr[31:24];
    if (top <= BRAM_LAST_BYTE)  slave_id = SLV_BRAM;
    else if (top == VGA_BYTE)   slave_id = SLV_VGA;
    else if (top == UART_BYTE)  slave_id = SLV_UART;
    else if (top == TIMER_BYTE) slave_id = SLV_TIMER;
    else if (top == GPIO_BYTE)  slave_id = SLV_GPIO;
    else if (top == SEG7_BYTE)  slave_id = SLV_7SEG;
    else if (top == LED_BYTE)   slave_id = SLV_LED;
    else                        slave_id = SLV_NONE;
  end

  always_comb begin
    hsel = '0;
    if (slave_id != SLV_NONE) hsel[slave_id] = 1'b1;
  end

endmodule
