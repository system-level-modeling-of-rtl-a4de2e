// tb_ahb_arbiter -- directed cycle-by-cycle test of the arbiter.
//
// The testbench plays the masters' request/lock lines and the selected
// address phase, and checks after each rising edge: grant one cycle after a
// request; HMASTER one edge after the grant (only with HREADY high) and
// HDATA_SEL one edge after HMASTER; fixed priority for simultaneous
// requests; an unlocked INCR4 burst keeps its grant until its last address
// beat is due and then hands over; a higher-priority request preempts an
// unlocked burst at once; a locked master is never preempted and releases
// the bus one edge after dropping HLOCK; a RETRY ends the burst hold; no
// request leaves the bus with no master (code 4'hF).
// A second, random phase drives random requests, locks, transfer types,
// burst types, HREADY and responses for RANDOM_CYCLES cycles and compares
// all outputs each cycle with a reference model of the same rules, written
// here in plain procedural form.
`timescale 1ns/1ps
module tb_ahb_arbiter;
  import ahb_pkg::*;
  localparam int NM = 4;
  logic hclk = 0, hresetn = 0;
  logic [NM-1:0] hbusreq = '0, hlock = '0;
  htrans_e htrans = HTRANS_IDLE;
  hburst_e hburst = HBURST_SINGLE;
  logic hready = 1'b1;
  hresp_e hresp = HRESP_OKAY;
  logic [NM-1:0] hgrant;
  logic [MID_W-1:0] hmaster, hdata_sel;
  logic hmastlock;
  int checks = 0, failures = 0;
  always #5 hclk = ~hclk;

  ahb_arbiter #(.NUM_MASTERS(NM)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s (grant=%b hmaster=%h)", $time, what, hgrant, hmaster); end
  endtask

  // Set the inputs for the coming cycle, let one edge pass.
  task automatic step(logic [NM-1:0] req, logic [NM-1:0] lk, htrans_e t, hburst_e b,
                      logic rdy = 1'b1, hresp_e r = HRESP_OKAY);
    @(negedge hclk);
    hbusreq = req; hlock = lk; htrans = t; hburst = b; hready = rdy; hresp = r;
    @(posedge hclk); #1;
  endtask

  // Reference model state
  int r_grant = NO_MASTER, r_master = NO_MASTER, r_dsel = NO_MASTER, r_beats = 0;
  bit r_mlock = 0;
  localparam int RANDOM_CYCLES = 20000;

  task automatic random_phase();
    // start the model from the current DUT state (bus idle, no beats)
    r_grant = NO_MASTER; r_master = hmaster; r_dsel = hdata_sel; r_beats = 0; r_mlock = hmastlock;
    for (int t = 0; t < RANDOM_CYCLES; t++) begin
      int nb, lowest;
      bit lock_hold, burst_hold, abort, higher;
      @(negedge hclk);
      hbusreq = ($urandom_range(0, 2) == 0) ? '0 : NM'($urandom);
      hlock   = ($urandom_range(0, 3) == 0) ? NM'($urandom) : '0;
      htrans  = htrans_e'($urandom_range(0, 3));
      hburst  = hburst_e'($urandom_range(0, 7));
      hready  = ($urandom_range(0, 4) != 0);
      hresp   = ($urandom_range(0, 9) == 0) ? hresp_e'($urandom_range(1, 3)) : HRESP_OKAY;
      // model: what the coming edge does
      abort = (hresp != HRESP_OKAY);
      nb = r_beats;
      if (abort) nb = 0;
      else if (hready)
        case (htrans)
          HTRANS_NONSEQ: nb = (hburst == HBURST_INCR4 || hburst == HBURST_WRAP4) ? 3 :
                              (hburst == HBURST_INCR8 || hburst == HBURST_WRAP8) ? 7 :
                              (hburst == HBURST_INCR16 || hburst == HBURST_WRAP16) ? 15 : 0;
          HTRANS_SEQ:    nb = (r_beats > 0) ? r_beats - 1 : 0;
          HTRANS_IDLE:   nb = 0;
          default:       nb = r_beats;
        endcase
      lowest = NO_MASTER;
      for (int i = NM - 1; i >= 0; i--) if (hbusreq[i]) lowest = i;
      higher = (r_grant != NO_MASTER) && (lowest < r_grant);
      lock_hold  = (r_grant != NO_MASTER) && hlock[r_grant];
      burst_hold = !abort && r_grant != NO_MASTER && r_grant == r_master && nb >= 2 && !higher;
      if (hready) begin
        r_dsel   = r_master;
        r_master = r_grant;
        r_mlock  = lock_hold;
      end
      if (!(lock_hold || burst_hold)) r_grant = lowest;
      r_beats = nb;
      @(posedge hclk); #1;
      check(hgrant == ((r_grant == NO_MASTER) ? '0 : NM'(1) << r_grant) &&
            hmaster == MID_W'(r_master) && hdata_sel == MID_W'(r_dsel) && hmastlock == r_mlock,
            $sformatf("random cycle %0d: grant %b/%0d master %0d/%0d dsel %0d/%0d lock %b/%b",
                      t, hgrant, r_grant, hmaster, r_master, hdata_sel, r_dsel, hmastlock, r_mlock));
    end
  endtask

  initial begin
    repeat (1000 + RANDOM_CYCLES) @(posedge hclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge hclk);
    check(hgrant == 0 && hmaster == NO_MASTER, "reset state");
    #1 hresetn = 1;
    // B: single request, grant and ownership timing
    step(4'b0010, 0, HTRANS_IDLE, HBURST_SINGLE);
    check(hgrant == 4'b0010 && hmaster == NO_MASTER, "grant one edge after request");
    step(4'b0010, 0, HTRANS_IDLE, HBURST_SINGLE);
    check(hmaster == 1 && hdata_sel == NO_MASTER, "HMASTER one edge after grant");
    step(4'b0000, 0, HTRANS_NONSEQ, HBURST_SINGLE);
    check(hdata_sel == 1, "HDATA_SEL follows HMASTER");
    check(hgrant == 0, "single transfer without request releases the bus");
    step(4'b0000, 0, HTRANS_IDLE, HBURST_SINGLE);
    check(hmaster == NO_MASTER, "no request: no master");
    // C: simultaneous requests, priority
    step(4'b1001, 0, HTRANS_IDLE, HBURST_SINGLE);
    check(hgrant == 4'b0001, "master 0 wins over master 3");
    step(4'b1100, 0, HTRANS_IDLE, HBURST_SINGLE);
    check(hgrant == 4'b0100, "master 2 wins over master 3");
    // D: unlocked INCR4 burst of master 2, master 3 waiting
    step(4'b1100, 0, HTRANS_IDLE, HBURST_SINGLE);         // HMASTER becomes 2
    check(hmaster == 2 && hgrant == 4'b0100, "master 2 owns the bus");
    step(4'b1000, 0, HTRANS_NONSEQ, HBURST_INCR4);        // beat 1, req dropped
    check(hgrant == 4'b0100, "burst hold after NONSEQ");
    step(4'b1000, 0, HTRANS_SEQ, HBURST_INCR4);           // beat 2
    check(hgrant == 4'b0100, "burst hold after beat 2");
    step(4'b1000, 0, HTRANS_SEQ, HBURST_INCR4);           // beat 3
    check(hgrant == 4'b1000 && hmaster == 2, "handover in last address cycle");
    step(4'b1000, 0, HTRANS_SEQ, HBURST_INCR4);           // beat 4
    check(hmaster == 3, "new master owns the bus right after the last beat");
    // E: preemption of master 3's unlocked INCR8 by master 1
    step(4'b0000, 0, HTRANS_NONSEQ, HBURST_INCR8);
    check(hgrant == 4'b1000, "burst hold for INCR8");
    step(4'b0010, 0, HTRANS_SEQ, HBURST_INCR8);
    check(hgrant == 4'b0010, "higher-priority request preempts unlocked burst");
    step(4'b0010, 0, HTRANS_SEQ, HBURST_INCR8);
    check(hmaster == 1, "preempting master owns the bus");
    // F: locked burst of master 1 against master 0
    step(4'b0011, 4'b0010, HTRANS_NONSEQ, HBURST_INCR4);
    check(hgrant == 4'b0010, "locked: no preemption (1)");
    check(hmastlock == 1'b1, "HMASTLOCK for the locked master");
    step(4'b0011, 4'b0010, HTRANS_SEQ, HBURST_INCR4);
    step(4'b0011, 4'b0010, HTRANS_SEQ, HBURST_INCR4);
    check(hgrant == 4'b0010, "locked: no preemption (2)");
    step(4'b0001, 4'b0000, HTRANS_SEQ, HBURST_INCR4);     // last beat, lock dropped
    check(hgrant == 4'b0001, "grant moves one edge after HLOCK drops");
    check(hmaster == 1, "old master still owns the address bus (idle cycle)");
    // H: wait state delays the ownership change
    step(4'b0001, 0, HTRANS_IDLE, HBURST_SINGLE, 1'b0);
    check(hmaster == 1, "HMASTER holds while HREADY is low");
    step(4'b0001, 0, HTRANS_IDLE, HBURST_SINGLE, 1'b1);
    check(hmaster == 0, "HMASTER changes with HREADY high");
    // G: RETRY ends the hold of master 0's unlocked burst
    step(4'b0100, 0, HTRANS_NONSEQ, HBURST_INCR8);
    check(hgrant == 4'b0001, "burst hold before retry");
    step(4'b0100, 0, HTRANS_SEQ, HBURST_INCR8, 1'b0, HRESP_RETRY);
    check(hgrant == 4'b0100, "RETRY releases the burst hold");
    // I: idle
    step(4'b0000, 0, HTRANS_IDLE, HBURST_SINGLE, 1'b1, HRESP_RETRY);
    step(4'b0000, 0, HTRANS_IDLE, HBURST_SINGLE);
    step(4'b0000, 0, HTRANS_IDLE, HBURST_SINGLE);
    check(hgrant == 0 && hmaster == NO_MASTER, "bus returns to no master");
    random_phase();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
