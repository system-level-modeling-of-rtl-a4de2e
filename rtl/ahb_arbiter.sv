// ahb_arbiter -- fixed-priority arbiter of the AHB bus-functional model.
//
// Master 0 has the highest priority, master NUM_MASTERS-1 the lowest. All
// inputs (HBUSREQx, HLOCKx, the selected HTRANS/HBURST, HREADY, HRESP) are
// sampled on the rising edge of HCLK and every output is a register: there is
// no combinational path from a request to a grant, so a request made in cycle
// n is granted at the earliest in cycle n+1.
//
// Grant rules, checked on every rising edge:
//  * Locked transfer: while the granted master holds HLOCKx, its grant is
//    kept, even against higher-priority requests and through RETRY/ERROR.
//  * Unlocked fixed-length burst: the arbiter follows the owner's
//    NONSEQ/SEQ beats and so knows how many address beats are still to come.
//    It keeps the grant until the last address beat is about to be driven,
//    then re-arbitrates, so the next master takes over without an idle cycle.
//    A higher-priority request preempts such a burst at any beat.
//  * A RETRY, SPLIT or ERROR response ends the burst hold.
//  * Otherwise the highest-priority requesting master is granted; with no
//    request no master is granted and HMASTER reads NO_MASTER (4'hF).
// HMASTER (address-phase owner) and HMASTLOCK follow the grant on each edge
// with HREADY high; HDATA_SEL (data-phase owner) follows HMASTER likewise.
//
// The priority scheme, the per-edge sampling, the burst-length tracking for
// unlocked handover, the lock rule and the reaction to RETRY follow the
// described model and its waveforms; the NO_MASTER code for an idle bus is
// read from those waveforms. SPLIT masking (HSPLITx) is not part of the
// model.
//
// Lint note: hresetn is both the asynchronous reset of the registers and the
// `disable iff` condition of the protocol assertion below, which lint reports
// as a signal used synchronously and asynchronously. The registers use it
// only as an asynchronous reset.
module ahb_arbiter
  import ahb_pkg::*;
#(
  parameter int unsigned NUM_MASTERS = 4
) (
  input  logic                   hclk,
  input  logic                   hresetn,
  input  logic [NUM_MASTERS-1:0] hbusreq,    // HBUSREQx
  input  logic [NUM_MASTERS-1:0] hlock,      // HLOCKx
  input  htrans_e                htrans,     // selected address phase
  input  hburst_e                hburst,
  input  logic                   hready,
  input  hresp_e                 hresp,
  output logic [NUM_MASTERS-1:0] hgrant,     // HGRANTx
  output logic [MID_W-1:0]       hmaster,    // address-phase owner
  output logic                   hmastlock,
  output logic [MID_W-1:0]       hdata_sel   // data-phase owner
);
  logic [MID_W-1:0] grant_q;     // granted master or NO_MASTER
  logic [4:0]       beats_q;     // address beats still to come in owner's burst
  logic [4:0]       beats_d;
  logic [MID_W-1:0] winner;
  logic             higher_req;
  logic             abort;
  logic             hold_lock, hold_burst;

  // Highest-priority request, and whether one above the current owner exists.
  always_comb begin
    winner     = NO_MASTER;
    higher_req = 1'b0;
    for (int i = NUM_MASTERS - 1; i >= 0; i--)
      if (hbusreq[i]) begin
        winner = MID_W'(i);
        if (grant_q != NO_MASTER && MID_W'(i) < grant_q) higher_req = 1'b1;
      end
  end

  // Beat bookkeeping for the address-phase owner.
  always_comb begin
    abort   = (hresp != HRESP_OKAY);
    beats_d = beats_q;
    if (abort)
      beats_d = '0;
    else if (hready) begin
      unique case (htrans)
        HTRANS_NONSEQ: beats_d = 5'(burst_beats(hburst) - 1);
        HTRANS_SEQ:    beats_d = (beats_q != 0) ? beats_q - 5'd1 : 5'd0;
        HTRANS_IDLE:   beats_d = '0;
        HTRANS_BUSY:   beats_d = beats_q;
      endcase
    end
  end

  always_comb begin
    hold_lock  = |(hlock & hgrant);
    hold_burst = !abort && (grant_q != NO_MASTER) && (grant_q == hmaster) &&
                 (beats_d >= 5'd2) && !higher_req;
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      grant_q   <= NO_MASTER;
      beats_q   <= '0;
      hmaster   <= NO_MASTER;
      hmastlock <= 1'b0;
      hdata_sel <= NO_MASTER;
    end else begin
      beats_q <= beats_d;
      if (!(hold_lock || hold_burst)) grant_q <= winner;
      if (hready) begin
        hmaster   <= grant_q;
        hmastlock <= hold_lock;
        hdata_sel <= hmaster;
      end
    end
  end

  always_comb
    for (int i = 0; i < NUM_MASTERS; i++) hgrant[i] = (grant_q == MID_W'(i));

  initial assert (NUM_MASTERS >= 1 && NUM_MASTERS < 16)
    else $error("ahb_arbiter: NUM_MASTERS must be 1..15");

  // At most one master is granted at any time.
  assert property (@(posedge hclk) disable iff (!hresetn) $onehot0(hgrant));
endmodule
