// tb_ahb_mux: checks that the response of the slave chosen in an address
// phase is returned in the following data phase, that a slave's low
// HREADYOUT stretches the data phase (the select is held), and that an
// unmapped data phase gives OKAY with zero data.
module tb_ahb_mux;
  import ahb_pkg::*;

  logic hclk = 0, hresetn = 0;
  slave_e slave_id;
  ahb_rsp_t [NSLV-1:0] slv_rsp;
  logic [31:0] hrdata;
  logic hready, hresp;
  int checks = 0, failures = 0;
  int stalls = 0;

  always #5 hclk = ~hclk;

  ahb_mux dut (.hclk(hclk), .hresetn(hresetn), .slave_id(slave_id), .slv_rsp(slv_rsp),
               .hrdata(hrdata), .hready(hready), .hresp(hresp));

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  slave_e expect_id;

  initial begin
    slave_id = SLV_NONE;
    for (int i = 0; i < NSLV; i++) slv_rsp[i] = '{hrdata: 32'h0, hreadyout: 1'b1, hresp: 1'b0};
    repeat (2) @(negedge hclk);
    hresetn = 1;
    expect_id = SLV_NONE;
    for (int t = 0; t < 400; t++) begin
      // drive a new address-phase select and fresh responses
      slave_id = slave_e'($urandom_range(0, 7));
      for (int i = 0; i < NSLV; i++)
        slv_rsp[i] = '{hrdata: $urandom, hreadyout: ($urandom_range(0, 3) != 0), hresp: 1'($urandom)};
      #1;
      checks++;
      if (expect_id == SLV_NONE) begin
        if (hrdata != 0 || hready != 1'b1 || hresp != 1'b0) begin
          failures++; $display("FAIL none: %h %b %b", hrdata, hready, hresp);
        end
      end else if (hrdata != slv_rsp[expect_id].hrdata || hready != slv_rsp[expect_id].hreadyout
                   || hresp != slv_rsp[expect_id].hresp) begin
        failures++; $display("FAIL slave %0d routed wrongly", expect_id);
      end
      if (!hready) stalls++;
      // the data phase moves on only if the bus was ready
      if (hready) expect_id = slave_id;
      @(negedge hclk);
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no stall exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
