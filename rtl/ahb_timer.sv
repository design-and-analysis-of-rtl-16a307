// ahb_timer: 32-bit down-counting timer on AHB-Lite.
//
// A 32-bit counter counts down by one on every prescaled tick while the timer
// runs. A free-running 8-bit prescale counter makes the ticks: clk16 pulses
// once every 16 HCLK cycles and clk256 once every 256, and the control
// register picks HCLK itself, clk16 or clk256. When the counter is at zero
// and a tick comes, the interrupt flag is set and the counter restarts: from
// the load value in periodic mode, from 0xFFFF_FFFF in free-running mode.
// Registers (address bits 3:2):
//   0x0 LOAD     read/write; a write also copies the value into the counter
//   0x4 VALUE    read only, current count
//   0x8 CONTROL  [0] enable, [1] mode (0 free-running, 1 periodic),
//                [3:2] prescale (00 = /1, 01 = /16, 10 and 11 = /256)
//   0xC CLEAR    write: clear the interrupt flag; read: the flag in bit 0
// A two-state machine (current_state/next_state) is IDLE while the enable
// bit is 0 and RUN while it is 1; the counter moves only in RUN.
// The 32-bit counter, the load register, the 1/16/256 prescaler and the two
// modes are the document's; the register layout, the state encoding, the
// reset values (LOAD and VALUE 0x0000_FFFF, the count the document shows
// the timer starting from) and the sticky interrupt flag are this design's.
// No wait states, OKAY responses.
module ahb_timer
  import ahb_pkg::*;
#(
  parameter logic [31:0] RESET_LOAD = 32'h0000_FFFF
) (
  input  logic     hclk,
  input  logic     hresetn,
  input  logic     hsel,
  input  ahb_req_t req,
  output ahb_rsp_t rsp,
  output logic     timer_irq
);

  typedef enum logic { T_IDLE = 1'b0, T_RUN = 1'b1 } tstate_e;
  typedef enum logic [1:0] { PRE_1 = 2'b00, PRE_16 = 2'b01, PRE_256 = 2'b10, PRE_256B = 2'b11 } prescale_e;

  logic        dp_write;
  logic [1:0]  dp_reg;
  logic [31:0] load, value;
  logic        enable, periodic;
  prescale_e   prescale;
  logic [7:0]  pre_cnt;
  logic        clk16, clk256, tick;
  tstate_e     current_state, next_state;

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      dp_write <= 1'b0;
      dp_reg   <= '0;
    end else if (req.hready) begin
      dp_write <= hsel && is_active(req.htrans) && req.hwrite;
      if (hsel && is_active(req.htrans)) dp_reg <= req.haddr[3:2];
    end
  end

  // Prescaler: tick enables, not derived clocks.
  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) pre_cnt <= '0;
    else          pre_cnt <= pre_cnt + 8'd1;
  end
  assign clk16  = &pre_cnt[3:0];
  assign clk256 = &pre_cnt;

  always_comb begin
    unique case (prescale)
      PRE_1:   tick = 1'b1;
      PRE_16:  tick = clk16;
      default: tick = clk256;
    endcase
  end

  always_comb next_state = enable ? T_RUN : T_IDLE;

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) current_state <= T_IDLE;
    else          current_state <= next_state;
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      load      <= RESET_LOAD;
      value     <= RESET_LOAD;
      enable    <= 1'b0;
      periodic  <= 1'b0;
      prescale  <= PRE_1;
      timer_irq <= 1'b0;
    end else begin
      if (current_state == T_RUN && tick) begin
        if (value == '0) begin
          timer_irq <= 1'b1;
          value     <= periodic ? load : 32'hFFFF_FFFF;
        end else begin
          value <= value - 32'd1;
        end
      end
      if (dp_write) begin
        unique case (dp_reg)
          2'd0: begin
            load  <= req.hwdata;
            value <= req.hwdata;
          end
          2'd1: ;  // VALUE is read only
          2'd2: begin
            enable   <= req.hwdata[0];
            periodic <= req.hwdata[1];
            prescale <= prescale_e'(req.hwdata[3:2]);
          end
          default: timer_irq <= 1'b0;
        endcase
      end
    end
  end

  always_comb begin
    unique case (dp_reg)
      2'd0:    rsp.hrdata = load;
      2'd1:    rsp.hrdata = value;
      2'd2:    rsp.hrdata = {28'd0, prescale, periodic, enable};
      default: rsp.hrdata = {31'd0, timer_irq};
    endcase
  end
  assign rsp.hreadyout = 1'b1;
  assign rsp.hresp     = 1'b0;

endmodule
