// tb_ahb_sevenseg: writes the four digit registers and watches the
// multiplexed outputs: each digit is lit, alone, for CLK_HZ/(4*LOOP_HZ)
// clocks with the right active-low segments, and the whole loop repeats at
// LOOP_HZ. Uses a low CLK_HZ so a loop is 40 clocks.
module tb_ahb_sevenseg;
  import ahb_pkg::*;

  localparam int CLK_HZ = 40_000, LOOP_HZ = 1000, PER_DIGIT = CLK_HZ / (4 * LOOP_HZ);

  logic hclk = 0, hresetn = 0;
  ahb_req_t req;
  ahb_rsp_t rsp;
  logic [31:0] haddr, hwdata;
  logic [1:0] htrans;
  logic hwrite;
  logic [2:0] hsize;
  logic [6:0] seg;
  logic [3:0] an;
  int checks = 0, failures = 0;

  always #5 hclk = ~hclk;

  ahb_master_bfm bfm (.hclk(hclk), .hready(rsp.hreadyout), .hrdata(rsp.hrdata), .haddr(haddr),
                      .htrans(htrans), .hwrite(hwrite), .hsize(hsize), .hwdata(hwdata));
  assign req = '{haddr: haddr, htrans: htrans_e'(htrans), hwrite: hwrite, hsize: hsize_e'(hsize),
                 hwdata: hwdata, hready: rsp.hreadyout};

  ahb_sevenseg #(.CLK_HZ(CLK_HZ), .LOOP_HZ(LOOP_HZ)) dut (
    .hclk(hclk), .hresetn(hresetn), .hsel(1'b1), .req(req), .rsp(rsp), .seg(seg), .an(an));

  // Lit segments per hex digit, as strings over "abcdefg".
  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                      "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  function automatic logic [6:0] seg_for(int v);
    logic [6:0] s = 7'h7F;            // all off (active low)
    foreach (lit[v][i]) s[lit[v][i] - "a"] = 1'b0;
    return s;
  endfunction

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %h expected %h", what, got, exp); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q;
    logic [7:0] d [4];
    int run, idx, prev;
    repeat (2) @(negedge hclk);
    hresetn = 1;
    for (int round = 0; round < 5; round++) begin
      for (int i = 0; i < 4; i++) begin
        d[i] = (round == 0) ? 8'(4'hC - i) : 8'($urandom);
        bfm.write(32'h5400_0000 + 32'(4 * i), 32'(d[i]));
      end
      for (int i = 0; i < 4; i++) begin
        bfm.read(32'h5400_0000 + 32'(4 * i), q);
        chk("digit read", q, 32'(d[i]));
      end
      // wait for a digit change, then check several full loops
      prev = -1;
      run = 0;
      for (int c = 0; c < 6 * 4 * PER_DIGIT; c++) begin
        @(negedge hclk);
        idx = -1;
        for (int k = 0; k < 4; k++) if (an == ~(4'b1 << k)) idx = k;
        checks++;
        if (idx < 0) begin failures++; $display("FAIL an %b not one-hot low", an); continue; end
        chk("segments", 32'(seg), 32'(seg_for(int'(d[idx][3:0]))));
        if (idx == prev) run++;
        else begin
          if (run > 0) begin
            chk("digit time", run, PER_DIGIT);
            chk("digit order", idx, (prev + 1) % 4);
          end
          run = (prev >= 0) ? 1 : -1000000;
          prev = idx;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
