// ahb_decoder -- address decoder of the AHB interconnect.
//
// The address space is cut into NUM_SLAVES equal regions by the top address
// bits: slave i is selected (HSELx[i]) when HADDR[31 -: log2(NUM_SLAVES)] == i.
// With the default four slaves, slave 0 answers 0x0000_0000-0x3FFF_FFFF,
// slave 1 0x4000_0000-0x7FFF_FFFF, and so on. HSELx is combinational from the
// address bus. HRDATA_SEL, which steers the read data / response multiplexer,
// is the slave selected by the last address phase that completed: it is
// registered on each rising HCLK edge on which HREADY is high, so it names the
// slave that owns the data phase. The decoder's ports (HADDR/HCNTL, HREADY,
// HCLK in; HSELx, HRDATA_SEL out) follow the bus figure; the region map is
// this design's choice. NUM_SLAVES must be a power of two.
module ahb_decoder
  import ahb_pkg::*;
#(
  parameter int unsigned NUM_SLAVES = 4,
  localparam int unsigned SEL_W = (NUM_SLAVES > 1) ? $clog2(NUM_SLAVES) : 1
) (
  input  logic              hclk,
  input  logic              hresetn,
  input  logic [ADDR_W-1:0] haddr,
  input  logic              hready,
  output logic [NUM_SLAVES-1:0] hsel,
  output logic [SEL_W-1:0]  hrdata_sel
);
  logic [SEL_W-1:0] idx;

  always_comb begin
    idx  = (NUM_SLAVES > 1) ? SEL_W'(haddr >> (ADDR_W - SEL_W)) : '0;
    hsel = '0;
    hsel[idx] = 1'b1;
  end

  always_ff @(posedge hclk or negedge hresetn)
    if (!hresetn)    hrdata_sel <= '0;
    else if (hready) hrdata_sel <= idx;

  initial assert ((NUM_SLAVES & (NUM_SLAVES - 1)) == 0)
    else $error("ahb_decoder: NUM_SLAVES must be a power of two");
endmodule
