// tb_ahb_bram: word, halfword and byte writes to the 4 KB memory, checked by
// reading back against a reference array; also checks that addresses alias
// every 4 KB, that a read right after a write returns the new data, and
// that pipelined 16-beat bursts write and read back correctly.
module tb_ahb_bram;
  import ahb_pkg::*;

  logic hclk = 0, hresetn = 0;
  ahb_req_t req;
  ahb_rsp_t rsp;
  logic [31:0] haddr, hwdata;
  logic [1:0] htrans;
  logic hwrite;
  logic [2:0] hsize;
  int checks = 0, failures = 0;

  always #5 hclk = ~hclk;

  ahb_master_bfm bfm (.hclk(hclk), .hready(rsp.hreadyout), .hrdata(rsp.hrdata), .haddr(haddr),
                      .htrans(htrans), .hwrite(hwrite), .hsize(hsize), .hwdata(hwdata));

  assign req = '{haddr: haddr, htrans: htrans_e'(htrans), hwrite: hwrite, hsize: hsize_e'(hsize),
                 hwdata: hwdata, hready: rsp.hreadyout};

  ahb_bram dut (.hclk(hclk), .hresetn(hresetn), .hsel(1'b1), .req(req), .rsp(rsp));

  logic [31:0] model [1024];

  task automatic expect_word(int w, logic [31:0] aliasbase = 0);
    logic [31:0] q;
    bfm.read(aliasbase + 32'(w * 4), q);
    checks++;
    if (q != model[w]) begin
      failures++; $display("FAIL word %0d: %h expected %h", w, q, model[w]);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge hclk);
    hresetn = 1;
    // fill every word
    for (int w = 0; w < 1024; w++) begin
      model[w] = $urandom;
      bfm.write(32'(w * 4), model[w]);
    end
    for (int w = 0; w < 1024; w += 7) expect_word(w);
    // byte and halfword writes
    for (int t = 0; t < 200; t++) begin
      int w, b;
      logic [31:0] d;
      w = $urandom_range(0, 1023);
      b = $urandom_range(0, 3);
      d = $urandom;
      if (t % 2 == 0) begin
        bfm.write(32'(w * 4 + b), d, 3'b000);
        model[w][8*b +: 8] = d[8*b +: 8];
      end else begin
        b = b & 2;
        bfm.write(32'(w * 4 + b), d, 3'b001);
        model[w][8*b +: 16] = d[8*b +: 16];
      end
      expect_word(w);                      // read straight after the write
    end
    // pipelined bursts: 16-beat write, then 16-beat read of the same words
    for (int i = 0; i < 16; i++) begin
      bfm.seq_data[i] = $urandom;
      model[200 + i] = bfm.seq_data[i];
    end
    bfm.burst(32'(200 * 4), 1'b1, 16);
    for (int i = 0; i < 16; i++) bfm.seq_data[i] = '0;
    bfm.burst(32'(200 * 4), 1'b0, 16);
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (bfm.seq_data[i] != model[200 + i]) begin
        failures++; $display("FAIL burst beat %0d: %h expected %h", i, bfm.seq_data[i], model[200 + i]);
      end
    end
    // write immediately followed by a read of the same word, pipelined
    bfm.seq_addr[0] = 32'h40; bfm.seq_write[0] = 1; bfm.seq_data[0] = 32'hCAFE_F00D;
    bfm.seq_addr[1] = 32'h40; bfm.seq_write[1] = 0;
    bfm.run_seq(2);
    model[16] = 32'hCAFE_F00D;
    checks++;
    if (bfm.seq_data[1] != 32'hCAFE_F00D) begin failures++; $display("FAIL pipelined read-after-write %h", bfm.seq_data[1]); end
    // aliasing: 0x1000 and 0x4000_0000 map onto the same 4 KB
    expect_word(5, 32'h0000_1000);
    expect_word(100, 32'h4000_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
