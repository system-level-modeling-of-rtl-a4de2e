// ahb_resp_mux -- read data and response multiplexer of the AHB interconnect.
//
// Each slave drives its own HRDATA, HREADY and HRESP. Only the slave in the
// data phase may answer, so the decoder's registered HRDATA_SEL picks that
// slave's bundle and this combinational multiplexer distributes it to all
// masters, to the arbiter and (as the global HREADY) back to all slaves. With
// an out-of-range select it answers "ready, OKAY" so the bus never hangs.
// The multiplexer follows the bus figure (HRESP/HREADY MUX plus the read data
// multiplexer of the interconnect); the default answer is this design's choice.
module ahb_resp_mux
  import ahb_pkg::*;
#(
  parameter int unsigned NUM_SLAVES = 4,
  localparam int unsigned SEL_W = (NUM_SLAVES > 1) ? $clog2(NUM_SLAVES) : 1
) (
  input  ahb_sresp_t        s_resp [NUM_SLAVES],  // per-slave response
  input  logic [SEL_W-1:0]  hrdata_sel,           // data-phase slave
  output logic [DATA_W-1:0] hrdata,
  output logic              hready,
  output hresp_e            hresp
);
  always_comb begin
    hrdata = '0;
    hready = 1'b1;
    hresp  = HRESP_OKAY;
    for (int unsigned i = 0; i < NUM_SLAVES; i++)
      if (hrdata_sel == SEL_W'(i)) begin
        hrdata = s_resp[i].hrdata;
        hready = s_resp[i].hready;
        hresp  = s_resp[i].hresp;
      end
  end
endmodule
