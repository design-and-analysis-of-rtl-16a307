// tb_ahb_timer: checks the timer's reset values, the load register, the
// interrupt period in periodic mode for each prescale setting
// ((LOAD+1) x 1, 16 or 256 clocks between interrupts), the clear register,
// and the wrap to 0xFFFF_FFFF in free-running mode.
module tb_ahb_timer;
  import ahb_pkg::*;

  logic hclk = 0, hresetn = 0;
  ahb_req_t req;
  ahb_rsp_t rsp;
  logic [31:0] haddr, hwdata;
  logic [1:0] htrans;
  logic hwrite;
  logic [2:0] hsize;
  logic timer_irq;
  int checks = 0, failures = 0;
  longint cyc = 0;
  longint rises [$];

  always #5 hclk = ~hclk;
  always @(posedge hclk) cyc <= cyc + 1;

  ahb_master_bfm bfm (.hclk(hclk), .hready(rsp.hreadyout), .hrdata(rsp.hrdata), .haddr(haddr),
                      .htrans(htrans), .hwrite(hwrite), .hsize(hsize), .hwdata(hwdata));
  assign req = '{haddr: haddr, htrans: htrans_e'(htrans), hwrite: hwrite, hsize: hsize_e'(hsize),
                 hwdata: hwdata, hready: rsp.hreadyout};

  ahb_timer dut (.hclk(hclk), .hresetn(hresetn), .hsel(1'b1), .req(req), .rsp(rsp),
                 .timer_irq(timer_irq));

  logic irq_q = 0;
  always @(posedge hclk) begin
    irq_q <= timer_irq;
    if (timer_irq && !irq_q) rises.push_back(cyc);
  end

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %h expected %h", what, got, exp); end
  endtask

  // Periodic mode: measure three interrupt periods.
  task automatic period_test(int load, logic [1:0] pre, int factor);
    logic [31:0] q;
    bfm.write(32'h5200_0008, 0);               // stop
    bfm.write(32'h5200_000C, 0);               // clear
    bfm.write(32'h5200_0000, 32'(load));
    bfm.read(32'h5200_0004, q);
    chk("value after load", q, 32'(load));
    rises.delete();
    bfm.write(32'h5200_0008, {28'd0, pre, 1'b1, 1'b1});
    while (rises.size() < 4) begin
      @(negedge hclk);
      if (timer_irq) bfm.write(32'h5200_000C, 0);
    end
    for (int i = 1; i < 4; i++)
      chk($sformatf("period (load %0d, x%0d)", load, factor),
          32'(rises[i] - rises[i-1]), 32'((load + 1) * factor));
    bfm.read(32'h5200_0008, q);
    chk("control read", q, {28'd0, pre, 1'b1, 1'b1});
  endtask

  initial begin
    #40000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q;
    repeat (2) @(negedge hclk);
    hresetn = 1;
    bfm.read(32'h5200_0000, q);
    chk("reset load", q, 32'h0000_FFFF);
    bfm.read(32'h5200_0004, q);
    chk("reset value", q, 32'h0000_FFFF);
    bfm.read(32'h5200_000C, q);
    chk("reset irq", q, 0);
    // disabled: the count stays put
    bfm.idle(50);
    bfm.read(32'h5200_0004, q);
    chk("idle value", q, 32'h0000_FFFF);

    period_test(20, 2'b00, 1);
    period_test(5, 2'b01, 16);
    period_test(2, 2'b10, 256);

    bfm.write(32'h5200_000C, 0);
    bfm.read(32'h5200_000C, q);
    chk("irq cleared", q, 0);

    // free-running: from zero the count wraps to the top of the 32-bit range
    bfm.write(32'h5200_0008, 0);
    bfm.write(32'h5200_0000, 3);
    bfm.write(32'h5200_0008, 32'b0001);
    bfm.idle(20);
    bfm.read(32'h5200_0004, q);
    checks++;
    if (q < 32'hFFFF_FF00) begin failures++; $display("FAIL free-running wrap: %h", q); end
    bfm.read(32'h5200_000C, q);
    chk("free-running irq", q, 1);
    bfm.read(32'h5200_0000, q);
    chk("load kept", q, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
