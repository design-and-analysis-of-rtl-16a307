// ahb_uart: UART peripheral on AHB-Lite.
//
// Serial frames of one start bit (0), eight data bits sent LSB first and one
// stop bit (1), at the fixed rate made by uart_baudgen (19200 bps by
// default). Bytes written by the bus queue in a transmit FIFO; bytes received
// queue in a receive FIFO until the bus reads them.
//   Transmitter: when idle and the TX FIFO holds a byte, it takes the byte
//   on the next baud tick and shifts out the ten-bit frame, each bit 16
//   baud ticks long (a frame starts on a tick, so all bits are full length).
//   Receiver: rx passes a two-flop synchroniser; a falling edge starts a
//   frame, the start bit is checked again half a bit later, then each data
//   bit and the stop bit are sampled in the middle of their bit periods. A
//   frame whose stop bit is 1 is pushed into the RX FIFO; a frame with a bad
//   stop bit, or arriving with the RX FIFO full, is dropped.
// Registers (address bit 2):
//   0x0 DATA    write: push HWDATA[7:0] into the TX FIFO;
//               read: the oldest received byte, removed by the read
//   0x4 STATUS  read: [0] TX FIFO full, [1] TX FIFO empty, [2] RX FIFO full,
//               [3] RX FIFO empty, [4] transmitter busy
// No wait states, OKAY responses. The frame format, the baud-rate generator
// and the FIFOs are the document's; the register map, the 16-entry FIFO
// depth and the oversampling receiver are this design's choices.
module ahb_uart
  import ahb_pkg::*;
#(
  parameter int unsigned CLK_HZ     = 50_000_000,
  parameter int unsigned BAUD       = 19_200,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic     hclk,
  input  logic     hresetn,
  input  logic     hsel,
  input  ahb_req_t req,
  output ahb_rsp_t rsp,
  input  logic     rx,
  output logic     tx
);

  localparam int unsigned OS = 16;

  typedef enum logic [1:0] { U_IDLE, U_START, U_DATA, U_STOP } ustate_e;

  // ---------------- bus side ----------------
  logic dp_write, dp_read, dp_reg;

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      dp_write <= 1'b0;
      dp_read  <= 1'b0;
      dp_reg   <= 1'b0;
    end else if (req.hready) begin
      dp_write <= hsel && is_active(req.htrans) && req.hwrite;
      dp_read  <= hsel && is_active(req.htrans) && !req.hwrite;
      if (hsel && is_active(req.htrans)) dp_reg <= req.haddr[2];
    end
  end

  logic       tick;
  logic       txf_empty, txf_full, txf_rd;
  logic [7:0] txf_data;
  logic       rxf_empty, rxf_full, rxf_wr, rxf_rd;
  logic [7:0] rxf_data, rx_byte;
  logic       tx_busy;

  uart_baudgen #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .OVERSAMPLE(OS)) u_baud (
    .clk(hclk), .rstn(hresetn), .tick(tick)
  );

  uart_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_txfifo (
    .clk(hclk), .rstn(hresetn),
    .wr(dp_write && !dp_reg), .wdata(req.hwdata[7:0]),
    .rd(txf_rd), .rdata(txf_data),
    .empty(txf_empty), .full(txf_full), .count()
  );

  assign rxf_rd = dp_read && !dp_reg && req.hready;

  uart_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_rxfifo (
    .clk(hclk), .rstn(hresetn),
    .wr(rxf_wr), .wdata(rx_byte),
    .rd(rxf_rd), .rdata(rxf_data),
    .empty(rxf_empty), .full(rxf_full), .count()
  );

  assign rsp.hrdata    = dp_reg ? {27'd0, tx_busy, rxf_empty, rxf_full, txf_empty, txf_full}
                                : {24'd0, rxf_data};
  assign rsp.hreadyout = 1'b1;
  assign rsp.hresp     = 1'b0;

  // ---------------- transmitter ----------------
  ustate_e    tx_state;
  logic [3:0] tx_os;      // baud ticks within the bit
  logic [2:0] tx_bit;
  logic [7:0] tx_shift;

  assign tx_busy = (tx_state != U_IDLE);
  assign txf_rd  = (tx_state == U_IDLE) && !txf_empty && tick;

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      tx_state <= U_IDLE;
      tx_os    <= '0;
      tx_bit   <= '0;
      tx_shift <= '0;
      tx       <= 1'b1;
    end else begin
      unique case (tx_state)
        U_IDLE: begin
          tx <= 1'b1;
          if (!txf_empty && tick) begin
            tx_shift <= txf_data;
            tx_state <= U_START;
            tx_os    <= '0;
            tx       <= 1'b0;
          end
        end
        U_START: if (tick) begin
          if (tx_os == 4'(OS - 1)) begin
            tx_os    <= '0;
            tx_bit   <= '0;
            tx_state <= U_DATA;
            tx       <= tx_shift[0];
          end else tx_os <= tx_os + 1'b1;
        end
        U_DATA: if (tick) begin
          if (tx_os == 4'(OS - 1)) begin
            tx_os <= '0;
            if (tx_bit == 3'd7) begin
              tx_state <= U_STOP;
              tx       <= 1'b1;
            end else begin
              tx_bit   <= tx_bit + 1'b1;
              tx_shift <= tx_shift >> 1;
              tx       <= tx_shift[1];
            end
          end else tx_os <= tx_os + 1'b1;
        end
        U_STOP: if (tick) begin
          if (tx_os == 4'(OS - 1)) begin
            tx_os    <= '0;
            tx_state <= U_IDLE;
          end else tx_os <= tx_os + 1'b1;
        end
      endcase
    end
  end

  // ---------------- receiver ----------------
  ustate_e    rx_state;
  logic       rx_meta, rx_sync;
  logic [3:0] rx_os;
  logic [2:0] rx_bit;

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      rx_meta <= 1'b1;
      rx_sync <= 1'b1;
    end else begin
      rx_meta <= rx;
      rx_sync <= rx_meta;
    end
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      rx_state <= U_IDLE;
      rx_os    <= '0;
      rx_bit   <= '0;
      rx_byte  <= '0;
      rxf_wr   <= 1'b0;
    end else begin
      rxf_wr <= 1'b0;
      unique case (rx_state)
        U_IDLE: begin
          rx_os <= '0;
          if (!rx_sync) rx_state <= U_START;
        end
        U_START: if (tick) begin
          if (rx_os == 4'(OS/2 - 1)) begin
            rx_os    <= '0;
            rx_bit   <= '0;
            rx_state <= rx_sync ? U_IDLE : U_DATA;   // glitch: not a start bit
          end else rx_os <= rx_os + 1'b1;
        end
        U_DATA: if (tick) begin
          if (rx_os == 4'(OS - 1)) begin
            rx_os   <= '0;
            rx_byte <= {rx_sync, rx_byte[7:1]};
            if (rx_bit == 3'd7) rx_state <= U_STOP;
            else                rx_bit   <= rx_bit + 1'b1;
          end else rx_os <= rx_os + 1'b1;
        end
        U_STOP: if (tick) begin
          if (rx_os == 4'(OS - 1)) begin
            rx_os    <= '0;
            rx_state <= U_IDLE;
            rxf_wr   <= rx_sync;   // stop bit must be 1
          end else rx_os <= rx_os + 1'b1;
        end
      endcase
    end
  end

endmodule
