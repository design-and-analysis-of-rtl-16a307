// ahb_mux: AHB-Lite slave-to-master multiplexer.
//
// The decoder picks a slave in the address phase; the response belongs to the
// data phase one HREADY later. The multiplexer therefore registers the slave
// id whenever HREADY is high and uses the registered id to route that slave's
// HRDATA, HREADYOUT and HRESP back to the master. The routed HREADYOUT is
// also the bus-wide HREADY that every slave watches, so any slave can stretch
// its data phase by holding HREADYOUT low.
// A data phase with no slave (address above the map) is answered here with
// OKAY, zero read data and no wait state: the document does not describe a
// default slave, so this is this design's choice.
// Timing: one register (the data-phase slave id), reset to SLV_NONE.
module ahb_mux
  import ahb_pkg::*;
(
  input  logic               hclk,
  input  logic               hresetn,
  input  slave_e             slave_id,        // address-phase slave from the decoder
  input  ahb_rsp_t [NSLV-1:0] slv_rsp,        // one response per slave
  output logic [31:0]        hrdata,
  output logic               hready,
  output logic               hresp
);

  slave_e data_id;

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn)    data_id <= SLV_NONE;
    else if (hready) data_id <= slave_id;
  end

  always_comb begin
    if (data_id == SLV_NONE) begin
      hrdata = '0;
      hready = 1'b1;
      hresp  = 1'b0;
    end else begin
      hrdata = slv_rsp[data_id].hrdata;
      hready = slv_rsp[data_id].hreadyout;
      hresp  = slv_rsp[data_id].hresp;
    end
  end

endmodule
