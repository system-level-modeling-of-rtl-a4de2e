// tb_ahb_system -- end-to-end test of the complete AHB bus system at its
// default size (4 masters, 2 memory slaves of 128 KiB, 2 mailbox slaves,
// 1 KiB master buffers).
//
// Part 1 measures the length of single-master locked user transactions of
// 4, 16, 17, 50 and 107 bytes at word offsets 0, 0, 3, 0 and 2 (write and
// read), and compares them with the expected 4, 7, 11, 22 and 46 bus cycles
// (request, grant, pipelined address/data phases, one arbitration per bus
// transaction). The data read back is compared with the data written.
// Part 2 runs all four masters at once: masters 0 and 1 write random blocks
// (1..100 bytes, random offset, locked or not) into private windows of both
// memory slaves and read them back; master 2 sends messages to mailbox
// slave 2 and master 3 receives messages from mailbox slave 3, while the
// testbench drains and fills the mailboxes at random and makes the memory
// slaves insert random wait states and RETRY answers. Masters 0 and 1 also
// insert BUSY cycles at random, and a few accesses beyond the end of a
// memory must end in ERROR.
// A bus monitor counts each mechanism (wait state, ERROR, RETRY, BUSY,
// INCR4/8/16 bursts, handover without idle cycle, locked handover,
// preemption of an unlocked burst, a locked burst given up with BUSY in its
// last address cycle, simultaneous requests, mailbox traffic);
// one that never happened counts as a failure.
`timescale 1ns/1ps
module tb_ahb_system;
  import ahb_pkg::*;

  localparam int NM = 4, NS = 4;
  localparam int BUF_BYTES = 1024;
  localparam int LEN_W = $clog2(BUF_BYTES + 1);
  localparam int OFF_W = $clog2(BUF_BYTES);

  logic hclk = 0, hresetn = 0;
  always #10 hclk = ~hclk;            // 50 MHz bus clock

  logic [NM-1:0] usr_start = '0, usr_write = '0, usr_lock = '0, usr_link = '0, usr_busy = '0;
  logic [ADDR_W-1:0] usr_addr [NM];
  logic [LEN_W-1:0]  usr_len  [NM];
  logic [NM-1:0] usr_idle, usr_done, usr_err;
  logic [NM-1:0] buf_we = '0;
  logic [OFF_W-1:0] buf_addr [NM];
  logic [7:0] buf_wdata [NM], buf_rdata [NM];
  logic [3:0] mem_wait_states [NS];
  logic [NS-1:0] mem_retry_req = '0;
  logic [NS-1:0] rx_valid, rx_ready = '0, tx_valid = '0, tx_ready;
  logic [DATA_W-1:0] rx_data [NS], tx_data [NS];
  hsize_e rx_size [NS];
  logic [NM-1:0] mon_hbusreq, mon_hgrant;
  logic [MID_W-1:0] mon_hmaster;
  logic mon_hmastlock, mon_hready;
  ahb_ctrl_t mon_ctrl;
  logic [DATA_W-1:0] mon_hwdata, mon_hrdata;
  hresp_e mon_hresp;

  ahb_system dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int i = 0; i < NM; i++) begin
      usr_addr[i] = '0; usr_len[i] = '0; buf_addr[i] = '0; buf_wdata[i] = '0;
    end
    for (int i = 0; i < NS; i++) begin
      mem_wait_states[i] = '0; tx_data[i] = '0;
    end
  end

  // ---------------------------------------------------------------- watchdog
  int unsigned cycle = 0;
  always @(posedge hclk) begin
    cycle <= cycle + 1;
    if (cycle > 3_000_000) begin
      failures++;
      $display("FAIL: watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // ------------------------------------------------------------- bus monitor
  int n_wait, n_error, n_retry, n_busy, n_b4, n_b8, n_b16, n_hand0, n_lockhand,
      n_preempt, n_both_req, n_link_rx, n_link_tx, n_nonseq, n_yield, n_yield_idle;
  logic [MID_W-1:0] prev_master = NO_MASTER;
  htrans_e prev_trans = HTRANS_IDLE;
  logic prev_lock = 1'b0;
  logic prev_yield = 1'b0, stalled = 1'b0;
  int burst_left = 0;
  always @(posedge hclk) if (hresetn) begin
    if (!mon_hready && mon_hresp == HRESP_OKAY) n_wait++;
    if (!mon_hready && mon_hresp == HRESP_ERROR) n_error++;
    if (!mon_hready && mon_hresp == HRESP_RETRY) begin
      n_retry++;
      burst_left = 0;
    end
    if ($countones(mon_hbusreq) >= 2) n_both_req++;
    if (mon_hready) begin
      if (mon_ctrl.htrans == HTRANS_BUSY) n_busy++;
      // BUSY in place of the last beat of a locked burst gives the bus up;
      // without wait states in that cycle the same master then drives IDLE
      // for one cycle (with wait states the grant has already moved on)
      if (prev_yield)
        check(mon_ctrl.htrans == HTRANS_IDLE && mon_hmaster == prev_master,
              $sformatf("IDLE after a locked burst was given up (%0d %0d %s)", mon_hmaster, prev_master, mon_ctrl.htrans.name()));
      if (mon_ctrl.htrans == HTRANS_BUSY && mon_hmastlock && burst_left == 1) n_yield++;
      prev_yield = mon_ctrl.htrans == HTRANS_BUSY && mon_hmastlock && burst_left == 1 &&
                   !stalled;
      if (prev_yield) n_yield_idle++;
      if (mon_ctrl.htrans == HTRANS_NONSEQ) begin
        n_nonseq++;
        case (mon_ctrl.hburst)
          HBURST_INCR4:  n_b4++;
          HBURST_INCR8:  n_b8++;
          HBURST_INCR16: n_b16++;
          default: ;
        endcase
        if (prev_master != mon_hmaster && prev_master != NO_MASTER &&
            (prev_trans == HTRANS_SEQ || prev_trans == HTRANS_NONSEQ)) n_hand0++;
      end
      if (prev_master != mon_hmaster && prev_lock && prev_master != NO_MASTER) n_lockhand++;
      if (prev_master != mon_hmaster && burst_left > 0) n_preempt++;
      if (prev_master != mon_hmaster) burst_left = 0;
      if (mon_ctrl.htrans == HTRANS_NONSEQ) burst_left = burst_beats(mon_ctrl.hburst) - 1;
      else if (mon_ctrl.htrans == HTRANS_SEQ && burst_left > 0) burst_left--;
      prev_master = mon_hmaster;
      prev_trans  = mon_ctrl.htrans;
      prev_lock   = mon_hmastlock;
      stalled     = 1'b0;
    end else
      stalled = 1'b1;
  end

  // ------------------------------------------------------------ master tasks
  task automatic load_buf(int m, byte unsigned data[$]);
    foreach (data[i]) begin
      @(negedge hclk);
      buf_we[m] = 1'b1; buf_addr[m] = OFF_W'(i); buf_wdata[m] = data[i];
    end
    @(negedge hclk);
    buf_we[m] = 1'b0;
  endtask

  task automatic read_buf(int m, int len, output byte unsigned data[$]);
    data = {};
    for (int i = 0; i < len; i++) begin
      buf_addr[m] = OFF_W'(i);
      #1 data.push_back(buf_rdata[m]);
    end
  endtask

  // Run one user transaction, return its length in bus cycles.
  task automatic run_ut(int m, logic [31:0] addr, int len, bit wr, bit lock,
                        bit link, output int cycles, output bit err);
    @(negedge hclk);
    while (!usr_idle[m]) @(negedge hclk);
    usr_addr[m] = addr; usr_len[m] = LEN_W'(len);
    usr_write[m] = wr; usr_lock[m] = lock; usr_link[m] = link;
    usr_start[m] = 1'b1;
    @(posedge hclk);
    #1 usr_start[m] = 1'b0;
    cycles = 0;
    do begin
      @(posedge hclk);
      cycles++;
      #1;
    end while (!usr_done[m]);
    err = usr_err[m];
  endtask

  function automatic byte unsigned rnd_byte();
    return byte'($urandom_range(0, 255));
  endfunction

  // ------------------------------------------------------- Part 1: timing
  task automatic timing_case(int size, int offset, int expect_cycles);
    byte unsigned wdata[$], rdata[$];
    int cyc;
    bit err;
    logic [31:0] a = 32'h4000_0100 + 32'(offset);
    for (int i = 0; i < size; i++) wdata.push_back(rnd_byte());
    load_buf(1, wdata);
    run_ut(1, a, size, 1'b1, 1'b1, 1'b0, cyc, err);
    check(!err && cyc == expect_cycles,
          $sformatf("write %0d bytes offset %0d: %0d cycles, expected %0d", size, offset, cyc, expect_cycles));
    for (int i = 0; i < size; i++) begin
      @(negedge hclk); buf_we[1] = 1; buf_addr[1] = OFF_W'(i); buf_wdata[1] = 8'h00;
    end
    @(negedge hclk); buf_we[1] = 0;
    run_ut(1, a, size, 1'b0, 1'b1, 1'b0, cyc, err);
    check(!err && cyc == expect_cycles,
          $sformatf("read %0d bytes offset %0d: %0d cycles, expected %0d", size, offset, cyc, expect_cycles));
    read_buf(1, size, rdata);
    check(rdata == wdata, $sformatf("read-back data of %0d-byte transaction", size));
  endtask

  // ---------------------------------------------- Part 2: memory traffic
  int n_ut_mem = 0;
  task automatic mem_traffic(int m, int count);
    byte unsigned wdata[$], rdata[$];
    int cyc, len, off;
    bit err, lock;
    logic [31:0] base;
    for (int k = 0; k < count; k++) begin
      len  = $urandom_range(1, 100);
      off  = $urandom_range(0, 4095 - len);
      base = ((k + m) % 2 == 0 ? 32'h0000_0000 : 32'h4000_0000) + 32'(m) * 32'h4000;
      lock = $urandom_range(0, 1);
      wdata = {};
      for (int i = 0; i < len; i++) wdata.push_back(rnd_byte());
      load_buf(m, wdata);
      repeat ($urandom_range(0, 6)) @(negedge hclk);
      run_ut(m, base + 32'(off), len, 1'b1, lock, 1'b0, cyc, err);
      check(!err, $sformatf("master %0d write error", m));
      for (int i = 0; i < len; i++) begin
        @(negedge hclk); buf_we[m] = 1; buf_addr[m] = OFF_W'(i); buf_wdata[m] = ~wdata[i];
      end
      @(negedge hclk); buf_we[m] = 0;
      repeat ($urandom_range(0, 6)) @(negedge hclk);
      run_ut(m, base + 32'(off), len, 1'b0, !lock, 1'b0, cyc, err);
      check(!err, $sformatf("master %0d read error", m));
      read_buf(m, len, rdata);
      check(rdata == wdata, $sformatf("master %0d data mismatch, %0d bytes at %h", m, len, base + 32'(off)));
      n_ut_mem++;
    end
  endtask

  // Accesses past the end of a memory must fail with ERROR.
  task automatic error_case(int m);
    int cyc;
    bit err;
    run_ut(m, 32'h0CAF_FEE0, 4, 1'b1, 1'b0, 1'b0, cyc, err);
    check(err, "access beyond the memory ends in ERROR");
  endtask

  // ---------------------------------------------- Part 2: mailbox traffic
  logic [31:0] rx_expect[$];
  int rx_got = 0;
  bit mail_on = 0;
  always @(negedge hclk) if (mail_on) rx_ready[2] = ($urandom_range(0, 3) == 0);
  always @(posedge hclk) if (rx_valid[2] && rx_ready[2]) begin
    logic [31:0] e;
    e = rx_expect.pop_front();
    check(rx_data[2] == e, $sformatf("mailbox word %h, expected %h", rx_data[2], e));
    rx_got++;
    n_link_rx++;
  end

  task automatic link_send(int count);
    byte unsigned wdata[$];
    int cyc, len;
    bit err;
    for (int k = 0; k < count; k++) begin
      len = $urandom_range(1, 40);
      wdata = {};
      for (int i = 0; i < len; i++) wdata.push_back(rnd_byte());
      for (int i = 0; i < len; i += 4) begin
        logic [31:0] w = '0;
        for (int b = 0; b < 4 && i + b < len; b++) w[8*b +: 8] = wdata[i+b];
        // a 3-byte tail goes as a halfword then a byte, each its own entry
        if (len - i == 3) begin
          rx_expect.push_back({16'h0, wdata[i+1], wdata[i]});
          rx_expect.push_back({24'h0, wdata[i+2]});
        end else begin
          rx_expect.push_back(w);
        end
      end
      load_buf(2, wdata);
      run_ut(2, 32'h8000_0000, len, 1'b1, 1'b0, 1'b1, cyc, err);
      check(!err, "mailbox send error");
    end
  endtask

  task automatic link_recv(int count);
    byte unsigned rdata[$], expect_b[$];
    int cyc, len, words;
    bit err;
    for (int k = 0; k < count; k++) begin
      len = $urandom_range(1, 40);
      words = (len + 3) / 4;
      if (len % 4 == 3) words++;
      expect_b = {};
      fork
        begin
          for (int w = 0; w < words; w++) begin
            logic [31:0] d;
            d = $urandom;
            repeat ($urandom_range(0, 12)) @(negedge hclk);
            @(negedge hclk);
            while (!tx_ready[3]) @(negedge hclk);
            tx_valid[3] = 1; tx_data[3] = d;
            if (len % 4 == 3 && w == words - 2) begin
              expect_b.push_back(d[7:0]); expect_b.push_back(d[15:8]);
            end else if (len % 4 == 3 && w == words - 1) begin
              expect_b.push_back(d[7:0]);
            end else begin
              for (int b = 0; b < 4 && expect_b.size() < len; b++) expect_b.push_back(d[8*b +: 8]);
            end
            @(negedge hclk); tx_valid[3] = 0;
          end
        end
        run_ut(3, 32'hC000_0000, len, 1'b0, 1'b0, 1'b1, cyc, err);
      join
      check(!err, "mailbox receive error");
      read_buf(3, len, rdata);
      check(rdata == expect_b, $sformatf("mailbox message of %0d bytes", len));
      n_link_tx += words;
    end
  endtask

  // Random slave timing for part 2.
  bit noise_on = 0;
  always @(negedge hclk) if (noise_on) begin
    for (int s = 0; s < 2; s++) begin
      mem_wait_states[s] = ($urandom_range(0, 4) == 0) ? 4'($urandom_range(1, 2)) : 4'd0;
      mem_retry_req[s]   = ($urandom_range(0, 60) == 0);
    end
    usr_busy[0] = ($urandom_range(0, 9) == 0);
    usr_busy[1] = ($urandom_range(0, 9) == 0);
  end

  initial begin
    repeat (3) @(posedge hclk);
    #1 hresetn = 1;
    repeat (2) @(posedge hclk);

    // Part 1
    timing_case(4,   0, 4);
    timing_case(16,  0, 7);
    timing_case(17,  3, 11);
    timing_case(50,  0, 22);
    timing_case(107, 2, 46);

    // Part 2
    noise_on = 1;
    mail_on  = 1;
    fork
      mem_traffic(0, 150);
      mem_traffic(1, 150);
      link_send(60);
      link_recv(60);
    join
    error_case(0);
    error_case(1);
    noise_on = 0;
    repeat (100) @(negedge hclk);
    check(rx_expect.size() == 0, "all mailbox words delivered");

    $display("mechanisms: wait=%0d error=%0d retry=%0d busy=%0d incr4=%0d incr8=%0d incr16=%0d",
             n_wait, n_error, n_retry, n_busy, n_b4, n_b8, n_b16);
    $display("            handover_no_idle=%0d locked_handover=%0d preempt=%0d simultaneous_req=%0d mail_rx=%0d mail_tx=%0d busy_giveup=%0d (no wait: %0d)",
             n_hand0, n_lockhand, n_preempt, n_both_req, n_link_rx, n_link_tx, n_yield, n_yield_idle);
    check(n_wait > 0,     "wait states happened");
    check(n_error > 0,    "ERROR response happened");
    check(n_retry > 0,    "RETRY response happened");
    check(n_busy > 0,     "BUSY cycle happened");
    check(n_b4 > 0 && n_b8 > 0 && n_b16 > 0, "INCR4, INCR8 and INCR16 bursts happened");
    check(n_hand0 > 0,    "handover without idle cycle happened");
    check(n_lockhand > 0, "locked handover happened");
    check(n_preempt > 0,  "preemption of an unlocked burst happened");
    check(n_yield_idle > 0, "locked burst given up with BUSY happened");
    check(n_both_req > 0, "simultaneous requests happened");
    check(n_link_rx > 0 && n_link_tx > 0, "mailbox traffic happened");
    check(n_ut_mem == 300, "all memory user transactions ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
