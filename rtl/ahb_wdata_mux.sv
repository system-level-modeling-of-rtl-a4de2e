// ahb_wdata_mux -- write data multiplexer of the AHB interconnect.
//
// The write data of a transfer is driven one cycle after its address, so the
// write data bus is switched by a separate select, HDATA_SEL from the arbiter,
// which names the master owning the data phase (HMASTER delayed by one
// completed transfer). Combinational; an out-of-range select gives zero.
// The separate address and data multiplexers follow the interconnect figure;
// the zero default is this design's choice.
module ahb_wdata_mux
  import ahb_pkg::*;
#(
  parameter int unsigned NUM_MASTERS = 4
) (
  input  logic [DATA_W-1:0] m_hwdata [NUM_MASTERS],  // per-master write data
  input  logic [MID_W-1:0]  hdata_sel,               // data-phase owner
  output logic [DATA_W-1:0] hwdata                   // to all slaves
);
  always_comb begin
    hwdata = '0;
    for (int unsigned i = 0; i < NUM_MASTERS; i++)
      if (hdata_sel == MID_W'(i)) hwdata = m_hwdata[i];
  end
endmodule
