// tb_uart_baudgen: measures the tick period at the default 50 MHz,
// 19200 bps, 16x oversampling: one tick every round(50e6/307200) = 163
// clocks, each tick one clock wide.
module tb_uart_baudgen;
  logic clk = 0, rstn = 0, tick;
  int checks = 0, failures = 0;
  longint cyc = 0, last = -1;
  int ticks = 0;

  localparam int EXPECT = 163;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  uart_baudgen dut (.clk(clk), .rstn(rstn), .tick(tick));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rstn = 1;
    while (ticks < 40) begin
      @(negedge clk);
      if (tick) begin
        if (last >= 0) begin
          checks++;
          if (cyc - last != EXPECT) begin
            failures++; $display("FAIL tick period %0d expected %0d", cyc - last, EXPECT);
          end
        end
        last = cyc;
        ticks++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
