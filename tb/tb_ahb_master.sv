// tb_ahb_master -- self-checking test of the bus master.
//
// Test bench: the master under test is bus master 1 of a real ahb_arbiter;
// master 0 is a test-bench requester that asks for the bus at random and,
// when it owns it, drives IDLE. Its requests preempt the master's unlocked
// bursts. A behavioural slave answers every transfer: byte memory (64 KB,
// addresses folded), optional random wait states and random RETRY, and
// ERROR for any address with bit 31 set.
// Checked:
//   * the cycle counts of the reference transactions without wait states or
//     competition: 4, 16, 17, 50 and 107 bytes at offsets 0, 0, 3, 0, 2 take
//     4, 7, 11, 22 and 46 cycles, for writes and reads, locked and unlocked;
//   * data of random memory-style writes (slave memory) and reads (master
//     buffer) with wait states, RETRY, preemption and BUSY insertion;
//   * a rendezvous-style transaction only uses single transfers to one address;
//   * ERROR ends the transaction with usr_err;
//   * the locked-burst handover with a busy master: BUSY in the second and
//     in the last address cycle of a locked INCR4 write; the second BUSY
//     drops HBUSREQ and HLOCK, the grant moves to master 0 in the next
//     cycle, the master drives IDLE in that cycle, master 0 owns the address
//     bus one cycle later, and the missing beat follows as a single transfer;
//   * each of retry, preemption, BUSY and wait states actually occurred.
`timescale 1ns/1ps
module tb_ahb_master;
  import ahb_pkg::*;
  localparam int unsigned BUF_BYTES = 1024;
  localparam int unsigned LEN_W = $clog2(BUF_BYTES + 1);
  localparam int unsigned OFF_W = $clog2(BUF_BYTES);

  logic hclk = 0, hresetn = 0;
  logic usr_start = 0, usr_write = 0, usr_lock = 0, usr_link = 0, usr_busy = 0;
  logic [31:0] usr_addr = '0;
  logic [LEN_W-1:0] usr_len = '0;
  logic usr_idle, usr_done, usr_err;
  logic buf_we = 0;
  logic [OFF_W-1:0] buf_addr = '0;
  logic [7:0] buf_wdata = '0, buf_rdata;
  logic hbusreq, hlock;
  ahb_ctrl_t m_ctrl, ctrl;
  logic [31:0] hwdata, hrdata;
  logic hready;
  hresp_e hresp;
  logic noise_req = 0;
  logic [1:0] hgrant;
  logic [MID_W-1:0] hmaster, hdata_sel;
  logic hmastlock;
  int checks = 0, failures = 0;
  bit waits_on = 0, retry_on = 0, noise_on = 0, busy_on = 0;
  int n_retry = 0, n_preempt = 0, n_busy = 0, n_wait = 0;

  always #10 hclk = ~hclk;

  ahb_master #(.BUF_BYTES(BUF_BYTES)) dut (
    .hclk, .hresetn, .usr_start, .usr_addr, .usr_len, .usr_write, .usr_lock,
    .usr_link, .usr_busy, .usr_idle, .usr_done, .usr_err,
    .buf_we, .buf_addr, .buf_wdata, .buf_rdata,
    .hbusreq, .hlock, .hgrant(hgrant[1]), .ctrl(m_ctrl), .hwdata, .hrdata, .hready, .hresp
  );

  ahb_arbiter #(.NUM_MASTERS(2)) u_arb (
    .hclk, .hresetn, .hbusreq({hbusreq, noise_req}), .hlock({hlock, 1'b0}),
    .htrans(ctrl.htrans), .hburst(ctrl.hburst), .hready, .hresp,
    .hgrant, .hmaster, .hmastlock, .hdata_sel
  );
  assign ctrl = (hmaster == 1) ? m_ctrl : CTRL_IDLE;

  // ---------------------------------------------------------- slave model
  logic [7:0] smem [65536];
  logic       s_act = 0, s_wr = 0, s_second = 0;
  logic [31:0] s_addr = '0;
  hsize_e     s_size = HSIZE_BYTE;
  int         s_waits = 0;
  hresp_e     s_resp = HRESP_OKAY;
  logic       s_last;
  always_comb begin
    hready = 1'b1; hresp = HRESP_OKAY; hrdata = '0; s_last = 1'b1;
    if (s_act) begin
      if (s_waits > 0) begin hready = 1'b0; s_last = 1'b0; end
      else if (s_resp != HRESP_OKAY) begin
        hresp = s_resp; hready = s_second; s_last = s_second;
      end else if (!s_wr)
        for (int b = 0; b < 4; b++) hrdata[8*b +: 8] = smem[{s_addr[15:2], 2'(b)}];
    end
  end
  always @(posedge hclk) if (hresetn) begin
    if (s_act && !s_last) begin
      if (s_waits > 0) begin s_waits <= s_waits - 1; n_wait++; end
      else s_second <= 1'b1;
    end else begin
      if (s_act && s_resp == HRESP_OKAY && s_wr)
        for (int b = 0; b < (1 << s_size); b++)
          smem[s_addr[15:0] + 16'(b)] <= hwdata[8*(s_addr[1:0] + b) +: 8];
      s_second <= 1'b0;
      s_act    <= hready && (ctrl.htrans == HTRANS_NONSEQ || ctrl.htrans == HTRANS_SEQ);
      s_addr   <= ctrl.haddr;
      s_wr     <= ctrl.hwrite;
      s_size   <= ctrl.hsize;
      s_waits  <= waits_on ? $urandom_range(0, 2) : 0;
      if (ctrl.haddr[31]) s_resp <= HRESP_ERROR;
      else if (retry_on && $urandom_range(0, 9) == 0) s_resp <= HRESP_RETRY;
      else s_resp <= HRESP_OKAY;
    end
  end

  // ----------------------------------------------- noise and observation
  always @(negedge hclk) begin
    noise_req = noise_on && ($urandom_range(0, 15) == 0);
    usr_busy  = busy_on && ($urandom_range(0, 3) == 0);
  end
  logic [MID_W-1:0] prev_master = NO_MASTER;
  always @(posedge hclk) if (hresetn) begin
    if (hready && hresp == HRESP_RETRY) n_retry++;
    if (hready && ctrl.htrans == HTRANS_BUSY) n_busy++;
    if (hready && hmaster == 1 && m_ctrl.htrans == HTRANS_SEQ && hgrant == 2'b01 && !hmastlock)
      n_preempt++;
    if (hmaster == 1 && hready && m_ctrl.htrans == HTRANS_SEQ)
      check(m_ctrl.hburst != HBURST_SINGLE, "SEQ only inside a burst");
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic run_ut(logic [31:0] addr, int len, bit wr, bit lock, bit link,
                        output int cycles, output bit err);
    @(negedge hclk);
    while (!usr_idle) @(negedge hclk);
    usr_addr = addr; usr_len = LEN_W'(len); usr_write = wr; usr_lock = lock;
    usr_link = link; usr_start = 1'b1;
    @(posedge hclk);
    #1 usr_start = 1'b0;
    cycles = 0;
    do begin
      @(posedge hclk); cycles++; #1;
      if (cycles > 20000) begin check(0, "user transaction hangs"); break; end
    end while (!usr_done);
    err = usr_err;
  endtask

  task automatic load_buf(byte unsigned data[$]);
    foreach (data[i]) begin
      @(negedge hclk); buf_we = 1; buf_addr = OFF_W'(i); buf_wdata = data[i];
    end
    @(negedge hclk); buf_we = 0;
  endtask

  task automatic mem_case(logic [31:0] addr, int len, bit lock, int expect_cycles);
    byte unsigned w[$];
    int cyc;
    bit err;
    for (int i = 0; i < len; i++) w.push_back(byte'($urandom));
    load_buf(w);
    run_ut(addr, len, 1, lock, 0, cyc, err);
    check(!err, "write without error");
    if (expect_cycles > 0)
      check(cyc == expect_cycles, $sformatf("write %0d@%0d: %0d cycles, expected %0d",
                                            len, addr[1:0], cyc, expect_cycles));
    for (int i = 0; i < len; i++)
      check(smem[16'(addr + i)] == w[i], $sformatf("slave byte %0d of %0d", i, len));
    // clear the buffer, read back
    for (int i = 0; i < len; i++) begin
      @(negedge hclk); buf_we = 1; buf_addr = OFF_W'(i); buf_wdata = ~w[i];
    end
    @(negedge hclk); buf_we = 0;
    run_ut(addr, len, 0, lock, 0, cyc, err);
    check(!err, "read without error");
    if (expect_cycles > 0)
      check(cyc == expect_cycles, $sformatf("read %0d@%0d: %0d cycles, expected %0d",
                                            len, addr[1:0], cyc, expect_cycles));
    for (int i = 0; i < len; i++) begin
      @(negedge hclk); buf_addr = OFF_W'(i);
      #1 check(buf_rdata == w[i], $sformatf("buffer byte %0d of %0d", i, len));
    end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    bit err;
    int sizes[5]   = '{4, 16, 17, 50, 107};
    int offs[5]    = '{0, 0, 3, 0, 2};
    int cycles[5]  = '{4, 7, 11, 22, 46};
    repeat (3) @(posedge hclk);
    hresetn = 1;
    for (int lk = 0; lk < 2; lk++)
      for (int i = 0; i < 5; i++) mem_case(32'h100 + offs[i], sizes[i], lk[0], cycles[i]);
    // ERROR
    run_ut(32'h8000_0040, 40, 1, 0, 0, cyc, err);
    check(err, "ERROR reported to the user");
    check(cyc < 12, "ERROR ends the transaction early");
    run_ut(32'h0000_0040, 4, 1, 0, 0, cyc, err);
    check(!err && cyc == 4, "next transaction after ERROR is clean");
    // rendezvous style: 7 bytes at one address, singles only
    begin
      int nseq = 0;
      fork
        run_ut(32'h0000_2000, 7, 1, 0, 1, cyc, err);
        forever @(posedge hclk) if (hready && hmaster == 1 && m_ctrl.htrans inside {HTRANS_NONSEQ, HTRANS_SEQ}) begin
          nseq++;
          check(m_ctrl.haddr == 32'h2000 && m_ctrl.hburst == HBURST_SINGLE &&
                m_ctrl.htrans == HTRANS_NONSEQ, "rendezvous: single transfer to one address");
        end
      join_any
      disable fork;
      check(nseq == 3 && cyc == 12, $sformatf("rendezvous 7 bytes: %0d transfers, %0d cycles", nseq, cyc));
    end
    // locked burst given up with BUSY in its last address cycle
    begin
      byte unsigned w[$];
      htrans_e tr[16];
      logic [MID_W-1:0] own[16];
      logic rq[16], lk[16];
      logic [1:0] gr[16];
      for (int i = 0; i < 16; i++) w.push_back(byte'($urandom));
      load_buf(w);
      for (int i = 0; i < 16; i++) smem[16'h0300 + 16'(i)] = 8'h00;
      fork
        run_ut(32'h0000_0300, 16, 1, 1, 0, cyc, err);
        begin : rec
          // record 16 cycles from the first address cycle (NONSEQ)
          do @(posedge hclk); while (!(hmaster == 1 && ctrl.htrans == HTRANS_NONSEQ));
          for (int k = 0; k < 16; k++) begin
            tr[k] = ctrl.htrans; own[k] = hmaster; rq[k] = hbusreq; lk[k] = hlock;
            gr[k] = hgrant;
            @(posedge hclk);
          end
        end
        begin : drv
          do @(negedge hclk); while (!(hmaster == 1 && ctrl.htrans == HTRANS_NONSEQ));
          #1 usr_busy = 1; noise_req = 1;             // BUSY in address cycle 2
          @(negedge hclk); #1 usr_busy = 0; noise_req = 1;
          @(negedge hclk); #1 usr_busy = 0; noise_req = 1;
          @(negedge hclk); #1 usr_busy = 1; noise_req = 1;  // BUSY instead of beat 4
          do begin @(negedge hclk); #1 usr_busy = 0; noise_req = 1; end
          while (hmaster != 0);
        end
      join
      check(!err, "busy handover: no error");
      check(tr[0] == HTRANS_NONSEQ && tr[1] == HTRANS_BUSY && tr[2] == HTRANS_SEQ &&
            tr[3] == HTRANS_SEQ && tr[4] == HTRANS_BUSY && tr[5] == HTRANS_IDLE,
            "busy handover: NONSEQ BUSY SEQ SEQ BUSY IDLE");
      for (int k = 0; k <= 5; k++) check(own[k] == 1, "busy handover: master 1 owns cycles 3..8");
      check(own[6] == 0, "busy handover: master 0 owns the address bus in cycle 9");
      check(rq[3] && lk[3] && !rq[4] && !lk[4], "busy handover: HBUSREQ/HLOCK drop with the last BUSY");
      check(gr[4] == 2'b10 && gr[5] == 2'b01, "busy handover: grant moves in cycle 8");
      for (int i = 0; i < 16; i++)
        check(smem[16'h0300 + 16'(i)] == w[i], "busy handover: all 16 bytes written");
    end
    // random traffic with all disturbances
    waits_on = 1; retry_on = 1; noise_on = 1; busy_on = 1;
    for (int t = 0; t < 150; t++)
      mem_case($urandom_range(0, 60000), $urandom_range(1, 300), $urandom_range(0, 1), 0);
    waits_on = 0; retry_on = 0; noise_on = 0; busy_on = 0;
    check(n_retry > 0,   "RETRY occurred");
    check(n_preempt > 0, "preemption occurred");
    check(n_busy > 0,    "BUSY occurred");
    check(n_wait > 0,    "wait states occurred");
    $display("retry=%0d preempt=%0d busy=%0d wait=%0d", n_retry, n_preempt, n_busy, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
