// tb_ahb_validation -- the two long validation workloads, run on the complete
// system at its default size.
//
// Part 1, timing equivalence: a single master (master 1) alone on the bus,
// with a single slave (memory slave 1) that has no wait states. It runs
// NUM_TIMING random user transactions of 1..100 bytes at random base
// addresses of its first 64 KB (the region part 2 rewrites). Each is randomly
// a read or a write, and locked or unlocked. The
// measured length of each transaction must equal the length computed
// independently: the testbench slices the transaction itself (alignment
// transfer, INCR16/8/4 bursts, then word/halfword/byte singles) and adds
// beats + 3 cycles per bus transaction (request, grant, address phases,
// last data phase).
//
// Part 2, random functional validation: two masters each move 128 KB, all
// at the same time, in random user transactions of up to 100 bytes.
//   * Master m writes a 64 KB write region in memory slave m (offsets 0..64K-1).
//   * It also reads a 64 KB read region in the other memory slave (offsets
//     64K..128K-1), preloaded with a known pattern.
//   * Each region is cut into random pieces of 1..100 bytes, so every byte is
//     accessed exactly once. The pieces run in random order, with a random
//     delay, a random direction order and random locking.
//   * Read data is compared with the pattern as each transaction ends.
//   * The write regions are compared with the written data at the end.
// Competition between the two masters makes handovers, preemptions and
// arbitration waits happen; they are counted and must occur.
//
// Part 3, accuracy setup: two masters, each with a slave of its own (master
// 0 to memory slave 0, master 1 to memory slave 1), run random user
// transactions (1..100 bytes) with a random delay between them, first all
// locked, then all unlocked. The mean delay is stepped down from 400 to 0
// cycles. For each step the overlap is measured as 100 * (cycles with both
// masters inside a user transaction) / (cycles with at least one). Checked:
// a transaction during which the other master never was inside one takes
// exactly its computed length, an overlapped one never less; the overlap at
// the shortest delay is above that at the longest.
`timescale 1ns/1ps
module tb_ahb_validation;
  import ahb_pkg::*;

  localparam int NM = 4, NS = 4;
  localparam int BUF_BYTES = 1024;
  localparam int LEN_W = $clog2(BUF_BYTES + 1);
  localparam int OFF_W = $clog2(BUF_BYTES);
  localparam int NUM_TIMING = 100000;
  localparam int REGION = 65536;
  localparam int MEM_BYTES = 131072;

  logic hclk = 0, hresetn = 0;
  always #10 hclk = ~hclk;

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
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // pattern of the preloaded read regions
  function automatic logic [7:0] pattern(int s, int off);
    logic [31:0] h = (32'(s) * 32'h0101_0000 + 32'(off)) * 32'h9E37_79B1;
    return h[23:16];
  endfunction

  // ------------------------------------------------------------- monitor
  int n_handover = 0, n_preempt = 0, n_wait_grant = 0;
  logic [MID_W-1:0] prev_master = NO_MASTER;
  always @(posedge hclk) if (hresetn && mon_hready) begin
    if (prev_master != NO_MASTER && mon_hmaster != NO_MASTER && mon_hmaster != prev_master) begin
      n_handover++;
      if (mon_ctrl.htrans == HTRANS_NONSEQ && !mon_hmastlock && mon_hmaster < prev_master) n_preempt++;
    end
    prev_master <= mon_hmaster;
  end
  always @(posedge hclk) if (hresetn && (mon_hbusreq & ~mon_hgrant) != 0 && mon_hgrant != 0) n_wait_grant++;

  // ---------------------------------------------------------- user side
  task automatic run_ut(int m, logic [31:0] addr, int len, bit wr, bit lock,
                        output int cycles, output bit err);
    @(negedge hclk);
    while (!usr_idle[m]) @(negedge hclk);
    usr_addr[m] = addr; usr_len[m] = LEN_W'(len);
    usr_write[m] = wr; usr_lock[m] = lock; usr_link[m] = 1'b0;
    usr_start[m] = 1'b1;
    @(posedge hclk);
    #1 usr_start[m] = 1'b0;
    cycles = 0;
    do begin
      @(posedge hclk);
      cycles++;
      #1;
    end while (!usr_done[m] && cycles < 100000);
    err = usr_err[m];
  endtask

  // Expected length of an uncontended user transaction without wait states.
  function automatic int expect_cycles(logic [31:0] a, int len);
    int cyc = 0;
    while (len > 0) begin
      int n, beats;
      int to1k = 1024 - int'(a[9:0]);
      if (a[0])                         begin n = 1; beats = 1; end
      else if (a[1])                    begin n = (len >= 2) ? 2 : 1; beats = 1; end
      else if (len >= 64 && to1k >= 64) begin n = 64; beats = 16; end
      else if (len >= 32 && to1k >= 32) begin n = 32; beats = 8; end
      else if (len >= 16 && to1k >= 16) begin n = 16; beats = 4; end
      else if (len >= 4)                begin n = 4; beats = 1; end
      else if (len >= 2)                begin n = 2; beats = 1; end
      else                              begin n = 1; beats = 1; end
      cyc += beats + 3;
      len -= n; a += 32'(n);
    end
    return cyc;
  endfunction

  // ------------------------------------------------- part 2: one master
  byte unsigned wexp [2][REGION];
  task automatic validate(int m);
    int offs [$], lens [$], dirs [$];
    int o, cyc;
    bit err;
    // cut both regions into pieces, then shuffle the list
    for (int dir = 0; dir < 2; dir++) begin
      o = 0;
      while (o < REGION) begin
        automatic int l = $urandom_range(1, 100);
        if (o + l > REGION) l = REGION - o;
        offs.push_back(o); lens.push_back(l); dirs.push_back(dir);
        o += l;
      end
    end
    for (int i = offs.size() - 1; i > 0; i--) begin
      automatic int j = $urandom_range(0, i);
      automatic int t;
      t = offs[i]; offs[i] = offs[j]; offs[j] = t;
      t = lens[i]; lens[i] = lens[j]; lens[j] = t;
      t = dirs[i]; dirs[i] = dirs[j]; dirs[j] = t;
    end
    foreach (offs[k]) begin
      automatic int len = lens[k];
      automatic bit wr = (dirs[k] == 0);
      automatic int s = wr ? m : 1 - m;
      automatic int off = wr ? offs[k] : REGION + offs[k];
      automatic logic [31:0] a = {2'(s), 30'(off)};
      repeat ($urandom_range(0, 30)) @(negedge hclk);
      if (wr) begin
        for (int i = 0; i < len; i++) begin
          automatic byte unsigned b = byte'($urandom);
          @(negedge hclk);
          buf_we[m] = 1'b1; buf_addr[m] = OFF_W'(i); buf_wdata[m] = b;
          wexp[m][off + i] = b;
        end
        @(negedge hclk) buf_we[m] = 1'b0;
      end
      run_ut(m, a, len, wr, 1'($urandom), cyc, err);
      check(!err && usr_done[m], $sformatf("master %0d transaction at %h ends without error", m, a));
      if (!wr)
        for (int i = 0; i < len; i++) begin
          buf_addr[m] = OFF_W'(i);
          #1 check(buf_rdata[m] == pattern(s, off + i),
                   $sformatf("master %0d read byte %h", m, a + i));
        end
    end
  endtask

  // ------------------------------------------------ part 3: overlap
  bit [1:0] active = '0;
  bit [1:0] touched = '0;       // the other master was active meanwhile
  longint both_cyc = 0, any_cyc = 0;
  always @(posedge hclk) begin
    if (active == 2'b11) both_cyc++;
    if (active != 2'b00) any_cyc++;
    for (int m = 0; m < 2; m++) if (active[m] && active[1-m]) touched[m] = 1'b1;
  end

  task automatic accuracy(int m, int count, int mean_delay, bit lock);
    int cyc;
    bit err;
    for (int k = 0; k < count; k++) begin
      automatic int len = $urandom_range(1, 100);
      automatic logic [31:0] a = {2'(m), 30'($urandom_range(0, REGION - 101))};
      repeat ($urandom_range(0, 2 * mean_delay)) @(negedge hclk);
      @(negedge hclk);
      active[m] = 1'b1;
      touched[m] = active[1-m];
      run_ut(m, a, len, 1'($urandom), lock, cyc, err);
      active[m] = 1'b0;
      check(!err, "accuracy run without error");
      if (!touched[m]) begin
        check(cyc == expect_cycles(a, len),
              $sformatf("no overlap: %0d bytes took %0d cycles, expected %0d", len, cyc, expect_cycles(a, len)));
        n_alone++;
      end else begin
        check(cyc >= expect_cycles(a, len), "overlapped transaction not shorter than alone");
        n_shared++;
      end
    end
  endtask
  int n_alone = 0, n_shared = 0;

  initial begin
    #(20ns * 64'd20_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < NM; m++) begin
      usr_addr[m] = '0; usr_len[m] = '0; buf_addr[m] = '0; buf_wdata[m] = '0;
    end
    for (int s = 0; s < NS; s++) begin
      mem_wait_states[s] = '0; tx_data[s] = '0;
    end
    // preload the read regions of both memory slaves
    for (int w = REGION / 4; w < MEM_BYTES / 4; w++) begin
      dut.g_slave[0].g_mem.u_mem.mem[w] = {pattern(0, 4*w+3), pattern(0, 4*w+2), pattern(0, 4*w+1), pattern(0, 4*w)};
      dut.g_slave[1].g_mem.u_mem.mem[w] = {pattern(1, 4*w+3), pattern(1, 4*w+2), pattern(1, 4*w+1), pattern(1, 4*w)};
    end
    repeat (3) @(posedge hclk);
    hresetn = 1'b1;

    // part 1
    begin
      int cyc, mism = 0;
      bit err;
      for (int t = 0; t < NUM_TIMING; t++) begin
        automatic int len = $urandom_range(1, 100);
        automatic logic [31:0] a = 32'h4000_0000 | 32'($urandom_range(0, REGION - 101));
        run_ut(1, a, len, 1'($urandom), 1'($urandom), cyc, err);
        check(!err && cyc == expect_cycles(a, len),
              $sformatf("timing: %0d bytes at %h took %0d cycles, expected %0d",
                        len, a, cyc, expect_cycles(a, len)));
      end
    end

    // part 2
    fork
      validate(0);
      validate(1);
    join
    for (int m = 0; m < 2; m++)
      for (int i = 0; i < REGION; i++)
        check((m == 0 ? dut.g_slave[0].g_mem.u_mem.mem[i / 4][8*(i%4) +: 8]
                      : dut.g_slave[1].g_mem.u_mem.mem[i / 4][8*(i%4) +: 8]) == wexp[m][i],
              $sformatf("slave %0d byte %0d after the run", m, i));
    // part 3
    for (int lock = 1; lock >= 0; lock--) begin
      real ov_first, ov;
      int delays[5] = '{400, 100, 30, 10, 0};
      foreach (delays[d]) begin
        both_cyc = 0; any_cyc = 0;
        fork
          accuracy(0, 200, delays[d], lock[0]);
          accuracy(1, 200, delays[d], lock[0]);
        join
        ov = 100.0 * real'(both_cyc) / real'(any_cyc);
        if (d == 0) ov_first = ov;
        $display("accuracy setup, %s, mean delay %0d cycles: overlap %0.1f %%",
                 lock ? "locked" : "unlocked", delays[d], ov);
      end
      check(ov > ov_first, "overlap grows as the delay shrinks");
    end
    check(n_alone > 0 && n_shared > 0, "transactions with and without overlap");

    check(n_handover > 0, "master handovers happened");
    check(n_preempt > 0, "preemptions happened");
    check(n_wait_grant > 0, "a master waited for the bus");
    $display("handovers=%0d preemptions=%0d waited=%0d", n_handover, n_preempt, n_wait_grant);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
