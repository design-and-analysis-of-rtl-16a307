// tb_dual_port_ram_sync: writes random data through port A while reading
// through port B, checking the one-clock read latency and read-old-data on
// a collision, against a reference array.
module tb_dual_port_ram_sync;
  localparam int AW = 6;
  logic clk = 0, we_a = 0;
  logic [AW-1:0] addr_a = 0, addr_b = 0;
  logic [7:0] din_a = 0, dout_b;
  logic [7:0] model [1 << AW];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dual_port_ram_sync #(.ADDR_W(AW), .DATA_W(8)) dut (
    .clk(clk), .we_a(we_a), .addr_a(addr_a), .din_a(din_a), .addr_b(addr_b), .dout_b(dout_b));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp;
    // fill
    for (int i = 0; i < (1 << AW); i++) begin
      @(negedge clk);
      we_a = 1; addr_a = AW'(i); din_a = 8'($urandom); model[i] = din_a;
    end
    @(negedge clk);
    we_a = 0;
    for (int t = 0; t < 2000; t++) begin
      we_a   = 1'($urandom);
      addr_a = AW'($urandom);
      din_a  = 8'($urandom);
      addr_b = (t % 5 == 0) ? addr_a : AW'($urandom);
      exp    = model[addr_b];             // old data on a collision
      @(posedge clk);
      if (we_a) model[addr_a] = din_a;
      @(negedge clk);
      checks++;
      if (dout_b != exp) begin
        failures++; $display("FAIL read %0d: %h expected %h", addr_b, dout_b, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
