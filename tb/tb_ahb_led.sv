// tb_ahb_led: writes random patterns to the LED register and checks the LED
// pins, the read-back value and that an unselected write is ignored.
module tb_ahb_led;
  import ahb_pkg::*;

  logic hclk = 0, hresetn = 0, hsel = 1;
  ahb_req_t req;
  ahb_rsp_t rsp;
  logic [31:0] haddr, hwdata;
  logic [1:0] htrans;
  logic hwrite;
  logic [2:0] hsize;
  logic [7:0] led;
  int checks = 0, failures = 0;

  always #5 hclk = ~hclk;

  ahb_master_bfm bfm (.hclk(hclk), .hready(rsp.hreadyout), .hrdata(rsp.hrdata), .haddr(haddr),
                      .htrans(htrans), .hwrite(hwrite), .hsize(hsize), .hwdata(hwdata));
  assign req = '{haddr: haddr, htrans: htrans_e'(htrans), hwrite: hwrite, hsize: hsize_e'(hsize),
                 hwdata: hwdata, hready: rsp.hreadyout};

  ahb_led dut (.hclk(hclk), .hresetn(hresetn), .hsel(hsel), .req(req), .rsp(rsp), .led(led));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q;
    logic [7:0] cur;
    repeat (2) @(negedge hclk);
    hresetn = 1;
    @(negedge hclk);
    checks++;
    if (led !== 8'h00) begin failures++; $display("FAIL reset led %h", led); end
    for (int t = 0; t < 50; t++) begin
      cur = 8'($urandom);
      bfm.write(32'h5500_0000, {24'hABCDEF, cur});
      @(negedge hclk);
      checks++;
      if (led != cur) begin failures++; $display("FAIL led %h expected %h", led, cur); end
      bfm.read(32'h5500_0000, q);
      checks++;
      if (q != {24'd0, cur}) begin failures++; $display("FAIL read %h", q); end
    end
    hsel = 0;
    bfm.write(32'h5500_0000, ~{24'd0, cur});
    @(negedge hclk);
    checks++;
    if (led != cur) begin failures++; $display("FAIL unselected write took effect"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
