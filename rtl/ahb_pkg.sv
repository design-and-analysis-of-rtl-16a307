// ahb_pkg: types and constants shared by the AHB-Lite microcontroller.
//
// The bus is AMBA AHB-Lite with a single master, a 32-bit address bus and a
// 32-bit data bus. Every slave sees the same request bundle (ahb_req_t) and
// answers with a response bundle (ahb_rsp_t); the slave multiplexer picks one
// response per transfer. The memory map follows the system's published map:
// the top address byte selects the slave, BRAM owns 0x00-0x4F and each
// peripheral owns one 16 MB region from 0x50 to 0x55. Transfer-type and
// response encodings are the AHB-Lite ones.
package ahb_pkg;

  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  typedef enum logic [2:0] {
    HSIZE_BYTE = 3'b000,
    HSIZE_HALF = 3'b001,
    HSIZE_WORD = 3'b010
  } hsize_e;

  // Master-to-slave signals, common to all slaves. hsel is per slave and
  // travels separately.
  typedef struct packed {
    logic [31:0] haddr;
    htrans_e     htrans;
    logic        hwrite;
    hsize_e      hsize;
    logic [31:0] hwdata;
    logic        hready;   // bus-wide HREADY, fed back from the multiplexer
  } ahb_req_t;

  // Slave-to-master signals.
  typedef struct packed {
    logic [31:0] hrdata;
    logic        hreadyout;
    logic        hresp;    // 0 = OKAY, 1 = ERROR
  } ahb_rsp_t;

  // Slaves in memory-map order. NSLV slaves plus a "no slave" code.
  typedef enum logic [2:0] {
    SLV_BRAM  = 3'd0,
    SLV_VGA   = 3'd1,
    SLV_UART  = 3'd2,
    SLV_TIMER = 3'd3,
    SLV_GPIO  = 3'd4,
    SLV_7SEG  = 3'd5,
    SLV_LED   = 3'd6,
    SLV_NONE  = 3'd7
  } slave_e;

  localparam int unsigned NSLV = 7;

  // Top address byte of each region.
  localparam logic [7:0] BRAM_LAST_BYTE = 8'h4F;  // 0x0000_0000 .. 0x4FFF_FFFF
  localparam logic [7:0] VGA_BYTE       = 8'h50;
  localparam logic [7:0] UART_BYTE      = 8'h51;
  localparam logic [7:0] TIMER_BYTE     = 8'h52;
  localparam logic [7:0] GPIO_BYTE      = 8'h53;
  localparam logic [7:0] SEG7_BYTE      = 8'h54;
  localparam logic [7:0] LED_BYTE       = 8'h55;

  // True for the beat types that carry a transfer.
  function automatic logic is_active(htrans_e t);
    return t == HTRANS_NONSEQ || t == HTRANS_SEQ;
  endfunction

  // Byte-lane write mask for a transfer of the given size at the given
  // address (little-endian).
  function automatic logic [3:0] byte_mask(hsize_e size, logic [1:0] addr);
    unique case (size)
      HSIZE_BYTE: return 4'b0001 << addr;
      HSIZE_HALF: return addr[1] ? 4'b1100 : 4'b0011;
      default:    return 4'b1111;
    endcase
  endfunction

endpackage
