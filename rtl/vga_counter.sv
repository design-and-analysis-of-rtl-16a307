// vga_counter: modulo-N counter used for the VGA pixel and line counts.
//
// Counts 0, 1, ..., N-1, 0, ... advancing by one on each clock with `en`
// high. `last` is high while the count is N-1, so `en && last` marks the
// wrap and can step a second counter. Asynchronous active-low reset to 0.
module vga_counter #(
  parameter int unsigned N = 800
) (
  input  logic                   clk,
  input  logic                   rstn,
  input  logic                   en,
  output logic [$clog2(N)-1:0]   count,
  output logic                   last
);

  assign last = (count == ($clog2(N))'(N - 1));

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn)   count <= '0;
    else if (en) count <= last ? '0 : count + 1'b1;
  end

endmodule
