// ahb_sevenseg: four-digit 7-segment display driver on AHB-Lite.
//
// Four 8-bit digit registers, DIGIT1..DIGIT4 at offsets 0x0, 0x4, 0x8 and
// 0xC, hold the values to show; the low four bits of each are decoded as a
// hexadecimal digit (0-9, A, b, C, d, E, F). DIGIT1 is the rightmost digit.
// The digits are shown one at a time: a refresh counter steps the active
// digit every CLK_HZ/(4*LOOP_HZ) clocks, so the loop over all four digits
// repeats at LOOP_HZ. Outputs are for a common-anode display and so active
// low: an[i] = 0 powers digit i, seg[k] = 0 lights segment k, with
// seg[6:0] = {g,f,e,d,c,b,a}. Reads return the addressed register.
// No wait states, OKAY responses, registers cleared by reset.
// The four registers, the 1 kHz loop and the common-anode polarity are the
// document's; the register offsets, the digit order, the segment order and
// the 50 MHz clock are this design's choices.
module ahb_sevenseg
  import ahb_pkg::*;
#(
  parameter int unsigned CLK_HZ  = 50_000_000,
  parameter int unsigned LOOP_HZ = 1000
) (
  input  logic       hclk,
  input  logic       hresetn,
  input  logic       hsel,
  input  ahb_req_t   req,
  output ahb_rsp_t   rsp,
  output logic [6:0] seg,
  output logic [3:0] an
);

  localparam int unsigned DIGIT_CYCLES = CLK_HZ / (4 * LOOP_HZ);
  localparam int unsigned RW = $clog2(DIGIT_CYCLES + 1);

  logic          dp_write;
  logic [1:0]    dp_reg;
  logic [7:0]    digit [4];
  logic [RW-1:0] refresh;
  logic [1:0]    active;
  logic [6:0]    seg_on;   // active-high segments of the shown digit

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      dp_write <= 1'b0;
      dp_reg   <= '0;
    end else if (req.hready) begin
      dp_write <= hsel && is_active(req.htrans) && req.hwrite;
      if (hsel && is_active(req.htrans)) dp_reg <= req.haddr[3:2];
    end
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      for (int i = 0; i < 4; i++) digit[i] <= '0;
    end else if (dp_write) begin
      digit[dp_reg] <= req.hwdata[7:0];
    end
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      refresh <= '0;
      active  <= '0;
    end else if (refresh == RW'(DIGIT_CYCLES - 1)) begin
      refresh <= '0;
      active  <= active + 2'd1;
    end else begin
      refresh <= refresh + 1'b1;
    end
  end

  always_comb begin
    unique case (digit[active][3:0])
      4'h0: seg_on = 7'h3F;
      4'h1: seg_on = 7'h06;
      4'h2: seg_on = 7'h5B;
      4'h3: seg_on = 7'h4F;
      4'h4: seg_on = 7'h66;
      4'h5: seg_on = 7'h6D;
      4'h6: seg_on = 7'h7D;
      4'h7: seg_on = 7'h07;
      4'h8: seg_on = 7'h7F;
      4'h9: seg_on = 7'h6F;
      4'hA: seg_on = 7'h77;
      4'hB: seg_on = 7'h7C;
      4'hC: seg_on = 7'h39;
      4'hD: seg_on = 7'h5E;
      4'hE: seg_on = 7'h79;
      default: seg_on = 7'h71;
    endcase
  end

  assign seg = ~seg_on;
  assign an  = ~(4'b0001 << active);

  assign rsp.hrdata    = 32'(digit[dp_reg]);
  assign rsp.hreadyout = 1'b1;
  assign rsp.hresp     = 1'b0;

endmodule
