// ahb_slave_link -- rendezvous-style (message passing) AHB slave.
//
// The slave exposes a single bus address, the mailbox at offset 0 of its
// decoder region. A master sends a message by writing its words one after
// the other to that address, and receives one by reading it repeatedly;
// bursts are not used because the address does not advance. Written words
// go into a receive FIFO that the slave's own logic drains (rx_*); words the
// slave's logic pushes into a transmit FIFO (tx_*) are returned by reads.
// Each FIFO entry keeps the data word and the transfer size, so a trailing
// byte or halfword of a message is told apart from a full word.
// When a write finds the receive FIFO full, or a read finds the transmit
// FIFO empty, the slave answers RETRY: the master gives up the bus and tries
// again later. An access to any other offset is answered with ERROR.
// No wait states are inserted. The single-address mailbox follows the
// described rendezvous access; the FIFOs, RETRY for flow control and the
// ERROR rule are this design's choices.
module ahb_slave_link
  import ahb_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic              hclk,
  input  logic              hresetn,
  input  logic              hsel,
  input  ahb_ctrl_t         ctrl,
  input  logic [DATA_W-1:0] hwdata,
  input  logic              hready,
  output ahb_sresp_t        sresp,
  // messages received from the bus
  output logic              rx_valid,
  output logic [DATA_W-1:0] rx_data,
  output hsize_e            rx_size,
  input  logic              rx_ready,
  // messages to be read by the bus
  input  logic              tx_valid,
  input  logic [DATA_W-1:0] tx_data,
  output logic              tx_ready
);
  localparam int unsigned W = DATA_W + 3;

  logic              ap_valid, ap_write, dp_commit, dp_write;
  logic [ADDR_W-1:0] ap_addr, dp_addr;
  hsize_e            ap_size, dp_size;
  hresp_e            ap_resp;
  logic [W-1:0]      rx_head, tx_head;
  logic              rx_full, rx_empty, tx_full, tx_empty;
  logic [$clog2(FIFO_DEPTH):0] rx_cnt, tx_cnt;

  ahb_slave_if u_if (
    .hclk, .hresetn, .hsel, .ctrl, .hready, .sresp,
    .ap_valid, .ap_addr, .ap_write, .ap_size, .ap_waits(4'd0), .ap_resp,
    .dp_commit, .dp_addr, .dp_write, .dp_size, .dp_rdata(tx_head[DATA_W-1:0])
  );

  // A transfer accepted now must also count the one whose data phase ends
  // at the same edge (back-to-back accesses of two masters).
  logic rx_no_room, tx_no_data;
  always_comb begin
    rx_no_room = rx_full ||
                 (dp_commit && dp_write && rx_cnt == ($clog2(FIFO_DEPTH)+1)'(FIFO_DEPTH - 1));
    tx_no_data = tx_empty || (dp_commit && !dp_write && tx_cnt == 1);
    if ((ap_addr & 32'h3FFF_FFFC) != '0)          ap_resp = HRESP_ERROR;
    else if (ap_write ? rx_no_room : tx_no_data)  ap_resp = HRESP_RETRY;
    else                                           ap_resp = HRESP_OKAY;
  end

  ahb_fifo #(.WIDTH(W), .DEPTH(FIFO_DEPTH)) u_rx (
    .clk(hclk), .rst_n(hresetn),
    .push(dp_commit && dp_write), .wdata({dp_size, hwdata}),
    .pop(rx_ready && !rx_empty), .rdata(rx_head),
    .full(rx_full), .empty(rx_empty), .count(rx_cnt)
  );

  ahb_fifo #(.WIDTH(W), .DEPTH(FIFO_DEPTH)) u_tx (
    .clk(hclk), .rst_n(hresetn),
    .push(tx_valid), .wdata({HSIZE_WORD, tx_data}),
    .pop(dp_commit && !dp_write), .rdata(tx_head),
    .full(tx_full), .empty(tx_empty), .count(tx_cnt)
  );

  assign rx_valid = !rx_empty;
  assign rx_data  = rx_head[DATA_W-1:0];
  assign rx_size  = hsize_e'(rx_head[W-1 -: 3]);
  assign tx_ready = !tx_full;
endmodule
