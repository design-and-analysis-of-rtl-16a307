// ahb_master_bfm: behavioural AHB-Lite master for the testbenches.
//
// Stands in for the processor. Offers blocking tasks write() and read() that
// perform one single transfer each (NONSEQ address phase, then the data
// phase), honouring HREADY wait states, plus idle(n). run_seq(n) performs a
// pipelined sequence of n transfers described in seq_addr/seq_write/seq_data
// (read data comes back in seq_data): the address phase of each transfer
// overlaps the data phase of the one before, as in a burst. burst() fills in
// an incrementing-address sequence (NONSEQ then SEQ beats). Signals are driven and
// HREADY/HRDATA are sampled at the falling clock edge, so nothing races the
// rising edge the design works on. `waits` counts the data-phase cycles in
// which HREADY was low.
module ahb_master_bfm (
  input  logic        hclk,
  input  logic        hready,
  input  logic [31:0] hrdata,
  output logic [31:0] haddr,
  output logic [1:0]  htrans,
  output logic        hwrite,
  output logic [2:0]  hsize,
  output logic [31:0] hwdata
);

  int unsigned waits = 0;

  localparam int SEQ_MAX = 64;
  logic [31:0] seq_addr  [SEQ_MAX];
  logic        seq_write [SEQ_MAX];
  logic [31:0] seq_data  [SEQ_MAX];
  logic        seq_incr = 1'b0;     // later beats are SEQ (burst) rather than NONSEQ

  initial begin
    haddr  = '0;
    htrans = 2'b00;
    hwrite = 1'b0;
    hsize  = 3'b010;
    hwdata = '0;
  end

  task automatic idle(input int n);
    repeat (n) @(negedge hclk);
  endtask

  task automatic xfer(input logic [31:0] a, input logic wr, input logic [31:0] d,
                      input logic [2:0] sz, output logic [31:0] q);
    @(negedge hclk);
    while (!hready) @(negedge hclk);
    haddr  = a;
    htrans = 2'b10;
    hwrite = wr;
    hsize  = sz;
    @(negedge hclk);                  // address phase taken at the rising edge
    htrans = 2'b00;
    hwrite = 1'b0;
    hwdata = d;
    while (!hready) begin
      waits++;
      @(negedge hclk);
    end
    q = hrdata;                       // data phase ends at the next rising edge
  endtask

  task automatic write(input logic [31:0] a, input logic [31:0] d,
                       input logic [2:0] sz = 3'b010);
    logic [31:0] q;
    xfer(a, 1'b1, d, sz, q);
  endtask

  // Pipelined transfers. a = beat in its address phase (n: none),
  // d = beat in its data phase (-1: none). HREADY is sampled just after the
  // falling edge, once the newly driven signals have settled.
  task automatic run_seq(input int n);
    int a, d;
    @(negedge hclk);
    while (!hready) @(negedge hclk);
    a = 0;
    d = -1;
    haddr  = seq_addr[0];
    htrans = 2'b10;
    hwrite = seq_write[0];
    hsize  = 3'b010;
    forever begin
      #1;
      if (hready) begin
        if (d >= 0 && !seq_write[d]) seq_data[d] = hrdata;
        if (d == n - 1) break;
        d = (a < n) ? a : -1;
        if (a < n) a++;
      end else if (d >= 0) begin
        waits++;
      end
      @(negedge hclk);
      if (d >= 0 && seq_write[d]) hwdata = seq_data[d];
      if (a < n) begin
        haddr  = seq_addr[a];
        htrans = seq_incr ? 2'b11 : 2'b10;
        hwrite = seq_write[a];
      end else begin
        htrans = 2'b00;
        hwrite = 1'b0;
      end
    end
    seq_incr = 1'b0;
  endtask

  task automatic burst(input logic [31:0] a, input logic wr, input int n);
    for (int i = 0; i < n; i++) begin
      seq_addr[i]  = a + 32'(4 * i);
      seq_write[i] = wr;
    end
    seq_incr = 1'b1;
    run_seq(n);
  endtask

  task automatic read(input logic [31:0] a, output logic [31:0] q);
    xfer(a, 1'b0, '0, 3'b010, q);
  endtask

endmodule
