// tb_ahb_uart: sends "TEST" through the UART and decodes the serial line
// independently (start bit 0, eight data bits LSB first, stop bit 1, each
// bit 16 baud ticks long), checking every bit's timing; the line is looped
// back to the receiver, whose FIFO is then read over the bus. Also checks
// the status flags, a TX FIFO that fills up, and a frame with a bad stop
// bit being dropped. Runs at CLK_HZ = 16 x 4 x BAUD so a bit is 64 clocks.
module tb_ahb_uart;
  import ahb_pkg::*;

  localparam int BAUD = 19_200, CLK_HZ = BAUD * 64, BIT = 64;

  logic hclk = 0, hresetn = 0;
  ahb_req_t req;
  ahb_rsp_t rsp;
  logic [31:0] haddr, hwdata;
  logic [1:0] htrans;
  logic hwrite;
  logic [2:0] hsize;
  logic tx, rx, loopback = 1, rx_drive = 1;
  int checks = 0, failures = 0;
  logic [7:0] seen [$];

  always #5 hclk = ~hclk;
  assign rx = loopback ? tx : rx_drive;

  ahb_master_bfm bfm (.hclk(hclk), .hready(rsp.hreadyout), .hrdata(rsp.hrdata), .haddr(haddr),
                      .htrans(htrans), .hwrite(hwrite), .hsize(hsize), .hwdata(hwdata));
  assign req = '{haddr: haddr, htrans: htrans_e'(htrans), hwrite: hwrite, hsize: hsize_e'(hsize),
                 hwdata: hwdata, hready: rsp.hreadyout};

  ahb_uart #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .FIFO_DEPTH(16)) dut (
    .hclk(hclk), .hresetn(hresetn), .hsel(1'b1), .req(req), .rsp(rsp), .rx(rx), .tx(tx));

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %h expected %h", what, got, exp); end
  endtask

  // Line decoder: samples the middle of every bit and checks the line is
  // steady for the whole bit period.
  initial begin
    @(posedge hresetn);
    forever begin
      logic [9:0] frame;
      @(negedge tx);
      for (int b = 0; b < 10; b++) begin
        logic v;
        repeat (BIT / 2) @(posedge hclk);
        v = tx;
        frame[b] = v;
        repeat (BIT / 2 - 1) begin
          @(posedge hclk);
          if (tx != v && !(b == 9)) begin
            checks++; failures++; $display("FAIL bit %0d not steady", b);
          end
        end
        if (b < 9) @(posedge hclk);
      end
      chk("start bit", frame[0], 0);
      chk("stop bit", frame[9], 1);
      seen.push_back(frame[8:1]);
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q;
    string msg = "TEST";
    repeat (2) @(negedge hclk);
    hresetn = 1;
    bfm.read(32'h5100_0004, q);
    chk("reset status", q, 32'b01010);      // TX empty, RX empty
    foreach (msg[i]) bfm.write(32'h5100_0000, 32'(msg[i]));
    bfm.read(32'h5100_0004, q);
    chk("busy", q[4], 1);
    wait (seen.size() == 4);
    repeat (3 * BIT) @(posedge hclk);
    foreach (msg[i]) chk("line byte", seen[i], msg[i]);
    foreach (msg[i]) begin
      bfm.read(32'h5100_0000, q);
      chk("received byte", q, 32'(msg[i]));
    end
    bfm.read(32'h5100_0004, q);
    chk("drained status", q, 32'b01010);
    // fill the TX FIFO: the transmitter takes one, 16 more fit
    for (int i = 0; i < 17; i++) bfm.write(32'h5100_0000, 32'h41 + 32'(i));
    bfm.read(32'h5100_0004, q);
    chk("tx full", q[0], 1);
    bfm.write(32'h5100_0000, 32'h7A);      // dropped
    wait (seen.size() == 4 + 17);
    repeat (3 * BIT) @(posedge hclk);
    for (int i = 0; i < 17; i++) chk("burst byte", seen[4 + i], 32'h41 + 32'(i));
    // RX FIFO holds 16 of the 17 looped-back bytes
    bfm.read(32'h5100_0004, q);
    chk("rx full", q[2], 1);
    for (int i = 0; i < 16; i++) begin
      bfm.read(32'h5100_0000, q);
      chk("rx burst byte", q, 32'h41 + 32'(i));
    end
    // a frame with a bad stop bit is dropped
    loopback = 0;
    rx_drive = 0;
    repeat (10 * BIT) @(posedge hclk);
    rx_drive = 1;
    repeat (4 * BIT) @(posedge hclk);
    bfm.read(32'h5100_0004, q);
    chk("bad frame dropped", q[3], 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
