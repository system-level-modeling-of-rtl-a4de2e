// ahb_slave_if -- physical and protocol layer of an AHB slave.
//
// Accepts an address phase when HSELx, the global HREADY and an active
// transfer type (NONSEQ or SEQ) coincide at a rising HCLK edge. IDLE and BUSY
// transfers are answered with a zero-wait OKAY and otherwise ignored.
// For an accepted transfer the back end states, in the same cycle, how many
// wait states it needs (ap_waits) and which response it gives (ap_resp). The
// data phase then runs as:
//   * ap_waits cycles with HREADYOUT low and OKAY (wait states);
//   * OKAY: one cycle with HREADYOUT high; dp_commit is high in this cycle,
//     the back end must present read data on dp_rdata, and a write takes
//     HWDATA at the rising edge that ends the cycle;
//   * ERROR/RETRY/SPLIT: the two-cycle response, first HREADYOUT low with the
//     response code, then HREADYOUT high with the same code. No data moves.
// While no data phase is active the interface answers HREADYOUT high, OKAY.
//
// The split into a physical and a protocol layer for the slave, wait states
// through HREADY and the two-cycle error/retry response follow the described
// model; the back-end handshake (ap_*/dp_*) is this design's choice.
//
// Lint note: hresetn is both the asynchronous reset of the registers and the
// `disable iff` condition of the protocol assertion below, which lint reports
// as a signal used synchronously and asynchronously. The registers use it
// only as an asynchronous reset.
module ahb_slave_if
  import ahb_pkg::*;
(
  input  logic              hclk,
  input  logic              hresetn,
  input  logic              hsel,
  input  ahb_ctrl_t         ctrl,       // address/control bus
  input  logic              hready,     // global HREADY
  output ahb_sresp_t        sresp,      // HRDATA/HREADYOUT/HRESP of this slave
  // address phase towards the back end
  output logic              ap_valid,   // a transfer is accepted at this edge
  output logic [ADDR_W-1:0] ap_addr,
  output logic              ap_write,
  output hsize_e            ap_size,
  input  logic [3:0]        ap_waits,
  input  hresp_e            ap_resp,
  // data phase towards the back end
  output logic              dp_commit,  // last, OKAY cycle of a data phase
  output logic [ADDR_W-1:0] dp_addr,
  output logic              dp_write,
  output hsize_e            dp_size,
  input  logic [DATA_W-1:0] dp_rdata
);
  logic       active_q;
  logic [3:0] waits_q;
  hresp_e     resp_q;
  logic       second_q;    // second cycle of a two-cycle response
  logic       last_cycle;  // data phase ends at the coming edge

  assign ap_valid = hsel && hready &&
                    (ctrl.htrans == HTRANS_NONSEQ || ctrl.htrans == HTRANS_SEQ);
  assign ap_addr  = ctrl.haddr;
  assign ap_write = ctrl.hwrite;
  assign ap_size  = ctrl.hsize;

  always_comb begin
    sresp.hrdata = '0;
    sresp.hready = 1'b1;
    sresp.hresp  = HRESP_OKAY;
    dp_commit    = 1'b0;
    last_cycle   = 1'b1;
    if (active_q) begin
      if (waits_q != 0) begin
        sresp.hready = 1'b0;
        last_cycle   = 1'b0;
      end else if (resp_q == HRESP_OKAY) begin
        dp_commit    = 1'b1;
        sresp.hrdata = dp_write ? '0 : dp_rdata;
      end else begin
        sresp.hresp  = resp_q;
        sresp.hready = second_q;
        last_cycle   = second_q;
      end
    end
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      active_q <= 1'b0;
      waits_q  <= '0;
      resp_q   <= HRESP_OKAY;
      second_q <= 1'b0;
      dp_addr  <= '0;
      dp_write <= 1'b0;
      dp_size  <= HSIZE_BYTE;
    end else if (active_q && !last_cycle) begin
      if (waits_q != 0) waits_q <= waits_q - 4'd1;
      else              second_q <= 1'b1;
    end else begin
      active_q <= ap_valid;
      second_q <= 1'b0;
      if (ap_valid) begin
        waits_q  <= ap_waits;
        resp_q   <= ap_resp;
        dp_addr  <= ap_addr;
        dp_write <= ap_write;
        dp_size  <= ap_size;
      end
    end
  end

  // A two-cycle response always starts with HREADYOUT low.
  assert property (@(posedge hclk) disable iff (!hresetn)
                   (sresp.hresp != HRESP_OKAY && !$past(sresp.hresp != HRESP_OKAY))
                   |-> !sresp.hready);
endmodule
