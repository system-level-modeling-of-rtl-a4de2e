// ahb_system -- a complete AHB bus system: masters, bus and slaves.
//
// NUM_MASTERS bus-functional masters (ahb_master) and NUM_SLAVES slaves are
// joined by ahb_bus. Master 0 has the highest priority. Slave i owns the
// address region selected by the top log2(NUM_SLAVES) address bits (for four
// slaves: slave 0 at 0x0000_0000, slave 1 at 0x4000_0000, slave 2 at
// 0x8000_0000, slave 3 at 0xC000_0000). The first NUM_MEM_SLAVES slaves are
// memory-style slaves (ahb_slave_mem, MEM_BYTES each); the others are
// rendezvous-style mailbox slaves (ahb_slave_link), whose mailbox is at the
// first address of their region.
// Each master's application port (user transaction start/length/address,
// local buffer access, done/error) and each slave's application port
// (memory timing controls, mailbox FIFOs) are brought out as arrays, as are
// the bus signals an observer needs (HMASTER, grants, address/control,
// HREADY, HRESP). HCLK and HRESETn come from outside.
// The 4-master, 4-slave configuration matches the bus figure; the split of
// slave kinds, the memory size and the address map are this design's
// choices.
module ahb_system
  import ahb_pkg::*;
#(
  parameter int unsigned NUM_MASTERS    = 4,
  parameter int unsigned NUM_SLAVES     = 4,
  parameter int unsigned NUM_MEM_SLAVES = 2,
  parameter int unsigned MEM_BYTES      = 131072,
  parameter int unsigned BUF_BYTES      = 1024,
  parameter int unsigned FIFO_DEPTH     = 8,
  localparam int unsigned LEN_W = $clog2(BUF_BYTES + 1),
  localparam int unsigned OFF_W = (BUF_BYTES > 1) ? $clog2(BUF_BYTES) : 1
) (
  input  logic                   hclk,
  input  logic                   hresetn,
  // master application ports
  input  logic [NUM_MASTERS-1:0] usr_start,
  input  logic [ADDR_W-1:0]      usr_addr  [NUM_MASTERS],
  input  logic [LEN_W-1:0]       usr_len   [NUM_MASTERS],
  input  logic [NUM_MASTERS-1:0] usr_write,
  input  logic [NUM_MASTERS-1:0] usr_lock,
  input  logic [NUM_MASTERS-1:0] usr_link,
  input  logic [NUM_MASTERS-1:0] usr_busy,
  output logic [NUM_MASTERS-1:0] usr_idle,
  output logic [NUM_MASTERS-1:0] usr_done,
  output logic [NUM_MASTERS-1:0] usr_err,
  input  logic [NUM_MASTERS-1:0] buf_we,
  input  logic [OFF_W-1:0]       buf_addr  [NUM_MASTERS],
  input  logic [7:0]             buf_wdata [NUM_MASTERS],
  output logic [7:0]             buf_rdata [NUM_MASTERS],
  // memory slave controls
  input  logic [3:0]             mem_wait_states [NUM_SLAVES],
  input  logic [NUM_SLAVES-1:0]  mem_retry_req,
  // mailbox slave application ports (index = slave number)
  output logic [NUM_SLAVES-1:0]  rx_valid,
  output logic [DATA_W-1:0]      rx_data [NUM_SLAVES],
  output hsize_e                 rx_size [NUM_SLAVES],
  input  logic [NUM_SLAVES-1:0]  rx_ready,
  input  logic [NUM_SLAVES-1:0]  tx_valid,
  input  logic [DATA_W-1:0]      tx_data [NUM_SLAVES],
  output logic [NUM_SLAVES-1:0]  tx_ready,
  // bus observation
  output logic [NUM_MASTERS-1:0] mon_hbusreq,
  output logic [NUM_MASTERS-1:0] mon_hgrant,
  output logic [MID_W-1:0]       mon_hmaster,
  output logic                   mon_hmastlock,
  output ahb_ctrl_t              mon_ctrl,
  output logic [DATA_W-1:0]      mon_hwdata,
  output logic [DATA_W-1:0]      mon_hrdata,
  output logic                   mon_hready,
  output hresp_e                 mon_hresp
);
  logic [NUM_MASTERS-1:0] m_hbusreq, m_hlock, m_hgrant;
  ahb_ctrl_t              m_ctrl   [NUM_MASTERS];
  logic [DATA_W-1:0]      m_hwdata [NUM_MASTERS];
  ahb_ctrl_t              ctrl;
  logic [DATA_W-1:0]      hwdata, hrdata;
  logic                   hready;
  hresp_e                 hresp;
  logic [NUM_SLAVES-1:0]  s_hsel;
  ahb_sresp_t             s_resp [NUM_SLAVES];

  for (genvar m = 0; m < NUM_MASTERS; m++) begin : g_master
    ahb_master #(.BUF_BYTES(BUF_BYTES)) u_master (
      .hclk, .hresetn,
      .usr_start(usr_start[m]), .usr_addr(usr_addr[m]), .usr_len(usr_len[m]),
      .usr_write(usr_write[m]), .usr_lock(usr_lock[m]), .usr_link(usr_link[m]),
      .usr_busy(usr_busy[m]), .usr_idle(usr_idle[m]), .usr_done(usr_done[m]),
      .usr_err(usr_err[m]),
      .buf_we(buf_we[m]), .buf_addr(buf_addr[m]), .buf_wdata(buf_wdata[m]),
      .buf_rdata(buf_rdata[m]),
      .hbusreq(m_hbusreq[m]), .hlock(m_hlock[m]), .hgrant(m_hgrant[m]),
      .ctrl(m_ctrl[m]), .hwdata(m_hwdata[m]),
      .hrdata, .hready, .hresp
    );
  end

  ahb_bus #(.NUM_MASTERS(NUM_MASTERS), .NUM_SLAVES(NUM_SLAVES)) u_bus (
    .hclk, .hresetn,
    .m_hbusreq, .m_hlock, .m_hgrant, .m_ctrl, .m_hwdata,
    .ctrl, .hwdata, .hrdata, .hready, .hresp,
    .hmaster(mon_hmaster), .hmastlock(mon_hmastlock),
    .s_hsel, .s_resp
  );

  for (genvar s = 0; s < NUM_SLAVES; s++) begin : g_slave
    if (s < NUM_MEM_SLAVES) begin : g_mem
      ahb_slave_mem #(.MEM_BYTES(MEM_BYTES)) u_mem (
        .hclk, .hresetn, .hsel(s_hsel[s]), .ctrl, .hwdata, .hready,
        .sresp(s_resp[s]),
        .wait_states(mem_wait_states[s]), .retry_req(mem_retry_req[s])
      );
      assign rx_valid[s] = 1'b0;
      assign rx_data[s]  = '0;
      assign rx_size[s]  = HSIZE_BYTE;
      assign tx_ready[s] = 1'b0;
    end else begin : g_link
      ahb_slave_link #(.FIFO_DEPTH(FIFO_DEPTH)) u_link (
        .hclk, .hresetn, .hsel(s_hsel[s]), .ctrl, .hwdata, .hready,
        .sresp(s_resp[s]),
        .rx_valid(rx_valid[s]), .rx_data(rx_data[s]), .rx_size(rx_size[s]),
        .rx_ready(rx_ready[s]),
        .tx_valid(tx_valid[s]), .tx_data(tx_data[s]), .tx_ready(tx_ready[s])
      );
    end
  end

  assign mon_hbusreq = m_hbusreq;
  assign mon_hgrant  = m_hgrant;
  assign mon_ctrl    = ctrl;
  assign mon_hwdata  = hwdata;
  assign mon_hrdata  = hrdata;
  assign mon_hready  = hready;
  assign mon_hresp   = hresp;
endmodule
