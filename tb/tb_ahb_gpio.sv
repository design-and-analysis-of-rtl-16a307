// tb_ahb_gpio: checks the data direction register: output pins follow the
// output register, input pins are read back through the synchroniser (two
// clocks late), and a mixed direction returns a mix of both.
module tb_ahb_gpio;
  import ahb_pkg::*;

  logic hclk = 0, hresetn = 0;
  ahb_req_t req;
  ahb_rsp_t rsp;
  logic [31:0] haddr, hwdata;
  logic [1:0] htrans;
  logic hwrite;
  logic [2:0] hsize;
  logic [7:0] gpio_in, gpio_out, gpio_dir;
  int checks = 0, failures = 0;

  always #5 hclk = ~hclk;

  ahb_master_bfm bfm (.hclk(hclk), .hready(rsp.hreadyout), .hrdata(rsp.hrdata), .haddr(haddr),
                      .htrans(htrans), .hwrite(hwrite), .hsize(hsize), .hwdata(hwdata));
  assign req = '{haddr: haddr, htrans: htrans_e'(htrans), hwrite: hwrite, hsize: hsize_e'(hsize),
                 hwdata: hwdata, hready: rsp.hreadyout};

  ahb_gpio dut (.hclk(hclk), .hresetn(hresetn), .hsel(1'b1), .req(req), .rsp(rsp),
                .gpio_in(gpio_in), .gpio_out(gpio_out), .gpio_dir(gpio_dir));

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %h expected %h", what, got, exp); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q;
    logic [7:0] dir, outv, inv;
    gpio_in = 8'h00;
    repeat (2) @(negedge hclk);
    hresetn = 1;
    bfm.read(32'h5300_0004, q);
    chk("reset dir", q, 0);
    for (int t = 0; t < 40; t++) begin
      dir  = (t < 10) ? 8'h00 : (t < 20) ? 8'hFF : 8'($urandom);
      outv = 8'($urandom);
      inv  = 8'($urandom);
      gpio_in = inv;
      bfm.write(32'h5300_0004, 32'(dir));
      bfm.write(32'h5300_0000, 32'(outv));
      @(negedge hclk);
      chk("gpio_dir", 32'(gpio_dir), 32'(dir));
      chk("gpio_out", 32'(gpio_out), 32'(outv));
      bfm.read(32'h5300_0000, q);
      chk("data read", q, 32'((dir & outv) | (~dir & inv)));
      bfm.read(32'h5300_0004, q);
      chk("dir read", q, 32'(dir));
    end
    // synchroniser latency: a change is not visible after one clock
    bfm.write(32'h5300_0004, 0);
    gpio_in = 8'h5A;
    repeat (4) @(negedge hclk);
    bfm.read(32'h5300_0000, q);
    chk("settled", q, 32'h5A);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
