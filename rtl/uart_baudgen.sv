// uart_baudgen: fixed baud-rate tick generator for the UART.
//
// Divides the system clock down to OVERSAMPLE ticks per bit period: a
// counter runs from 0 to DIV-1 with DIV = round(CLK_HZ / (BAUD*OVERSAMPLE))
// and pulses `tick` for one clock each time it wraps. At the defaults
// (50 MHz, 19200 bps, 16x) DIV is 163, a bit period of 2608 clocks, 0.15 %
// slower than nominal. The 19200 bps rate is the document's; the clock
// frequency and the 16x oversampling are this design's choices.
module uart_baudgen #(
  parameter int unsigned CLK_HZ     = 50_000_000,
  parameter int unsigned BAUD       = 19_200,
  parameter int unsigned OVERSAMPLE = 16
) (
  input  logic clk,
  input  logic rstn,
  output logic tick
);

  localparam int unsigned DIV = (CLK_HZ + (BAUD * OVERSAMPLE) / 2) / (BAUD * OVERSAMPLE);
  localparam int unsigned CW  = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn)                       cnt <= '0;
    else if (cnt == CW'(DIV - 1))    cnt <= '0;
    else                             cnt <= cnt + 1'b1;
  end

  assign tick = (cnt == CW'(DIV - 1));

endmodule
