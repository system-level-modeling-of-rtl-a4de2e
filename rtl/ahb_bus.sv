// ahb_bus -- the AMBA AHB bus: arbiter, address decoder and multiplexers.
//
// This is the wire-level "bus channel" of the bus-functional model: the part
// between the masters' and the slaves' bus interfaces. AHB has no tri-state
// lines, so every master and every slave drives its own outputs and three
// multiplexers build the shared buses:
//   * the address/control multiplexer, steered by HMASTER (address phase);
//   * the write data multiplexer, steered by HDATA_SEL (data phase);
//   * the read data / HREADY / HRESP multiplexer, steered by the decoder's
//     HRDATA_SEL (data phase).
// The arbiter grants one master at a time (master 0 has top priority); the
// decoder selects a slave from the top address bits. The selected HREADY
// goes back to all slaves and masters as the global HREADY. Everything is
// clocked by the rising edge of HCLK; the clock itself comes from outside.
// The set of elements and their connection follow the bus figures; the
// widths and the address map are this design's choices.
module ahb_bus
  import ahb_pkg::*;
#(
  parameter int unsigned NUM_MASTERS = 4,
  parameter int unsigned NUM_SLAVES  = 4,
  localparam int unsigned SEL_W = (NUM_SLAVES > 1) ? $clog2(NUM_SLAVES) : 1
) (
  input  logic                   hclk,
  input  logic                   hresetn,
  // master side
  input  logic [NUM_MASTERS-1:0] m_hbusreq,
  input  logic [NUM_MASTERS-1:0] m_hlock,
  output logic [NUM_MASTERS-1:0] m_hgrant,
  input  ahb_ctrl_t              m_ctrl   [NUM_MASTERS],
  input  logic [DATA_W-1:0]      m_hwdata [NUM_MASTERS],
  // shared buses
  output ahb_ctrl_t              ctrl,       // HADDR/HCTL to slaves
  output logic [DATA_W-1:0]      hwdata,     // to slaves
  output logic [DATA_W-1:0]      hrdata,     // to masters
  output logic                   hready,     // global HREADY
  output hresp_e                 hresp,
  output logic [MID_W-1:0]       hmaster,
  output logic                   hmastlock,
  // slave side
  output logic [NUM_SLAVES-1:0]  s_hsel,
  input  ahb_sresp_t             s_resp [NUM_SLAVES]
);
  logic [MID_W-1:0] hdata_sel;
  logic [SEL_W-1:0] hrdata_sel;

  ahb_arbiter #(.NUM_MASTERS(NUM_MASTERS)) u_arbiter (
    .hclk, .hresetn, .hbusreq(m_hbusreq), .hlock(m_hlock),
    .htrans(ctrl.htrans), .hburst(ctrl.hburst), .hready, .hresp,
    .hgrant(m_hgrant), .hmaster, .hmastlock, .hdata_sel
  );

  ahb_addr_mux #(.NUM_MASTERS(NUM_MASTERS)) u_addr_mux (
    .m_ctrl, .hmaster, .ctrl
  );

  ahb_wdata_mux #(.NUM_MASTERS(NUM_MASTERS)) u_wdata_mux (
    .m_hwdata, .hdata_sel, .hwdata
  );

  ahb_decoder #(.NUM_SLAVES(NUM_SLAVES)) u_decoder (
    .hclk, .hresetn, .haddr(ctrl.haddr), .hready, .hsel(s_hsel), .hrdata_sel
  );

  ahb_resp_mux #(.NUM_SLAVES(NUM_SLAVES)) u_resp_mux (
    .s_resp, .hrdata_sel, .hrdata, .hready, .hresp
  );
endmodule
