// tb_ahb_decoder: checks the memory-map decode for region boundaries and
// random addresses against a reference written from the map table.
module tb_ahb_decoder;
  import ahb_pkg::*;

  logic [31:0]     haddr;
  logic [NSLV-1:0] hsel;
  slave_e          slave_id;
  int checks = 0, failures = 0;

  ahb_decoder dut (.haddr(haddr), .hsel(hsel), .slave_id(slave_id));

  function automatic int ref_slave(logic [31:0] a);
    if (a <= 32'h4FFF_FFFF) return 0;
    if (a <= 32'h50FF_FFFF) return 1;
    if (a <= 32'h51FF_FFFF) return 2;
    if (a <= 32'h52FF_FFFF) return 3;
    if (a <= 32'h53FF_FFFF) return 4;
    if (a <= 32'h54FF_FFFF) return 5;
    if (a <= 32'h55FF_FFFF) return 6;
    return 7;
  endfunction

  task automatic check(logic [31:0] a);
    int e;
    logic [NSLV-1:0] eh;
    haddr = a;
    #1;
    e  = ref_slave(a);
    eh = (e == 7) ? '0 : (NSLV'(1) << e);
    checks++;
    if (int'(slave_id) != e || hsel != eh) begin
      failures++;
      $display("FAIL addr %h: id %0d hsel %b, expected %0d %b", a, slave_id, hsel, e, eh);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] edges [] = '{32'h0, 32'h0000_0FFC, 32'h4FFF_FFFF, 32'h5000_0000, 32'h50FF_FFFF,
                              32'h5100_0000, 32'h51FF_FFFC, 32'h5200_0000, 32'h5300_0004,
                              32'h5400_0008, 32'h5500_0000, 32'h55FF_FFFF, 32'h5600_0000,
                              32'hFFFF_FFFF};
    foreach (edges[i]) check(edges[i]);
    repeat (500) check($urandom);
    repeat (500) check({8'h50 + 8'($urandom_range(0, 6)), 24'($urandom)});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
