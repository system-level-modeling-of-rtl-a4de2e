// ahb_addr_mux -- address and control multiplexer of the AHB interconnect.
//
// Every master drives its own address/control bundle (HADDR, HTRANS, HWRITE,
// HSIZE, HBURST, HPROT). The arbiter's HMASTER names the master that owns the
// address phase; this purely combinational multiplexer forwards that
// master's bundle to all slaves and to the decoder. While no master owns the
// bus (HMASTER = 4'hF, or any code outside 0..NUM_MASTERS-1) it drives an
// IDLE transfer, so slaves see no activity. The multiplexer itself follows
// the bus figure; the IDLE default for "no master" is this design's choice.
module ahb_addr_mux
  import ahb_pkg::*;
#(
  parameter int unsigned NUM_MASTERS = 4
) (
  input  ahb_ctrl_t          m_ctrl [NUM_MASTERS],  // per-master address/control
  input  logic [MID_W-1:0]   hmaster,               // address-phase owner
  output ahb_ctrl_t          ctrl                   // selected bundle
);
  always_comb begin
    ctrl = CTRL_IDLE;
    for (int unsigned i = 0; i < NUM_MASTERS; i++)
      if (hmaster == MID_W'(i)) ctrl = m_ctrl[i];
  end
endmodule
