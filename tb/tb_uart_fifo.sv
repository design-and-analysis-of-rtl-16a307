// tb_uart_fifo: random pushes and pops against a queue model; checks the
// head data, empty, full, the count, and that a push when full and a pop
// when empty are ignored.
module tb_uart_fifo;
  localparam int DEPTH = 16;
  logic clk = 0, rstn = 0, wr = 0, rd = 0;
  logic [7:0] wdata = 0, rdata;
  logic empty, full;
  logic [4:0] count;
  int checks = 0, failures = 0;
  int fulls = 0, empties = 0;
  logic [7:0] model [$];

  always #5 clk = ~clk;

  uart_fifo #(.WIDTH(8), .DEPTH(DEPTH)) dut (
    .clk(clk), .rstn(rstn), .wr(wr), .wdata(wdata), .rd(rd), .rdata(rdata),
    .empty(empty), .full(full), .count(count));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rstn = 1;
    for (int t = 0; t < 3000; t++) begin
      // phases biased towards filling, then draining
      int bias;
      bias = ((t / 200) % 2 == 0) ? 3 : 1;
      wr = ($urandom_range(0, 3) < bias);
      rd = ($urandom_range(0, 3) >= bias);
      wdata = 8'($urandom);
      #1;
      checks++;
      if (empty != (model.size() == 0) || full != (model.size() == DEPTH) ||
          int'(count) != model.size() || (model.size() > 0 && rdata != model[0])) begin
        failures++;
        $display("FAIL t=%0d empty %b full %b count %0d head %h; model size %0d head %h",
                 t, empty, full, count, rdata, model.size(), model.size() ? model[0] : 8'h0);
      end
      if (full) fulls++;
      if (empty) empties++;
      @(posedge clk);
      begin
        bit was_full, was_empty;
        was_full  = (model.size() == DEPTH);
        was_empty = (model.size() == 0);
        if (rd && !was_empty) void'(model.pop_front());
        if (wr && !was_full)  model.push_back(wdata);
      end
      @(negedge clk);
    end
    checks++;
    if (fulls == 0 || empties == 0) begin failures++; $display("FAIL full/empty never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
