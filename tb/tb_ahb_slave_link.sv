// tb_ahb_slave_link -- self-checking test of the rendezvous (mailbox) slave.
//
// The testbench is the only master (HSELx high, HREADY from the slave) and
// also plays the slave's local logic on the rx_*/tx_* ports. It checks:
//   * a word, halfword or byte written to the mailbox appears in order on
//     rx_data/rx_size; a write takes 2 cycles (no wait states);
//   * words pushed on tx_* come back, in order, from mailbox reads;
//   * a write to a full receive FIFO and a read from an empty transmit FIFO
//     are answered with the two-cycle RETRY and change nothing;
//   * any other offset gives the two-cycle ERROR;
//   * a random stream with the local side draining and filling at random.
`timescale 1ns/1ps
module tb_ahb_slave_link;
  import ahb_pkg::*;
  localparam int unsigned DEPTH = 8;
  localparam logic [31:0] MBOX = 32'h8000_0000;
  logic hclk = 0, hresetn = 0;
  ahb_ctrl_t ctrl = CTRL_IDLE;
  logic [DATA_W-1:0] hwdata = '0;
  ahb_sresp_t sresp;
  logic rx_valid, rx_ready = 0, tx_valid = 0, tx_ready;
  logic [DATA_W-1:0] rx_data, tx_data = '0;
  hsize_e rx_size;
  int checks = 0, failures = 0;
  logic [34:0] rxq [$];   // expected {size, data}
  logic [31:0] txq [$];
  int retries = 0;
  bit rand_local = 0;

  always #5 hclk = ~hclk;

  ahb_slave_link #(.FIFO_DEPTH(DEPTH)) dut (
    .hclk, .hresetn, .hsel(1'b1), .ctrl, .hwdata, .hready(sresp.hready), .sresp,
    .rx_valid, .rx_data, .rx_size, .rx_ready, .tx_valid, .tx_data, .tx_ready
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // Local side: drain rx and fill tx, checking rx against the expectation.
  always @(posedge hclk) if (hresetn) begin
    if (rx_valid && rx_ready) begin
      logic [34:0] e;
      check(rxq.size() > 0, "rx word expected");
      if (rxq.size() > 0) begin
        e = rxq.pop_front();
        check({rx_size, rx_data} == e, $sformatf("rx %h/%0d, expected %h", rx_data, rx_size, e));
      end
    end
    if (tx_valid && tx_ready) txq.push_back(tx_data);
  end
  always @(negedge hclk) if (rand_local) begin
    rx_ready = ($urandom_range(0, 3) == 0);
    tx_valid = ($urandom_range(0, 3) == 0);
    tx_data  = $urandom;
  end

  // One transfer; returns response and cycle count.
  task automatic xfer(input logic [31:0] addr, input bit wr, input hsize_e sz,
                      input logic [31:0] wd, output hresp_e r, output logic [31:0] rd,
                      output int cycles);
    @(negedge hclk);
    ctrl = '{haddr: addr, htrans: HTRANS_NONSEQ, hwrite: wr, hsize: sz,
             hburst: HBURST_SINGLE, hprot: HPROT_DEFAULT};
    cycles = 1;
    @(negedge hclk);
    ctrl = CTRL_IDLE; hwdata = wd;
    forever begin
      #1 cycles++;
      if (sresp.hresp != HRESP_OKAY) begin
        check(!sresp.hready, "two-cycle response starts with HREADY low");
        r = sresp.hresp;
        @(negedge hclk) #1 cycles++;
        check(sresp.hready && sresp.hresp == r, "second response cycle");
        break;
      end
      if (sresp.hready) begin r = HRESP_OKAY; rd = sresp.hrdata; break; end
      @(negedge hclk);
      if (cycles > 50) begin check(0, "transfer hangs"); break; end
    end
  endtask

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hresp_e r;
    logic [31:0] rd, w;
    int cyc;
    repeat (3) @(posedge hclk);
    hresetn = 1;
    // fill the receive FIFO with the local side stalled
    for (int k = 0; k < DEPTH; k++) begin
      automatic hsize_e sz = hsize_e'(k % 3);
      w = $urandom;
      xfer(MBOX, 1, sz, w, r, rd, cyc);
      check(r == HRESP_OKAY && cyc == 2, $sformatf("mailbox write %0d: %s in %0d cycles", k, r.name(), cyc));
      rxq.push_back({sz, w});
    end
    check(rx_valid, "rx_valid with data");
    xfer(MBOX, 1, HSIZE_WORD, 32'h1234_5678, r, rd, cyc);
    check(r == HRESP_RETRY && cyc == 3, "write to full FIFO: RETRY");
    // drain
    @(negedge hclk) rx_ready = 1;
    repeat (DEPTH + 2) @(posedge hclk);
    check(rxq.size() == 0 && !rx_valid, "all words received, nothing extra");
    @(negedge hclk) rx_ready = 0;
    // read from empty
    xfer(MBOX, 0, HSIZE_WORD, 0, r, rd, cyc);
    check(r == HRESP_RETRY, "read from empty FIFO: RETRY");
    // transmit path
    for (int k = 0; k < 3; k++) begin
      @(negedge hclk) tx_valid = 1; tx_data = 32'hA000_0000 + k;
    end
    @(negedge hclk) tx_valid = 0;
    for (int k = 0; k < 3; k++) begin
      xfer(MBOX, 0, HSIZE_WORD, 0, r, rd, cyc);
      check(r == HRESP_OKAY && rd == 32'hA000_0000 + k && cyc == 2,
            $sformatf("mailbox read %0d: %s %h", k, r.name(), rd));
      void'(txq.pop_front());
    end
    // bad offsets
    xfer(MBOX + 4, 1, HSIZE_WORD, 0, r, rd, cyc);
    check(r == HRESP_ERROR && cyc == 3, "write to offset 4: ERROR");
    xfer(MBOX + 32'h100, 0, HSIZE_WORD, 0, r, rd, cyc);
    check(r == HRESP_ERROR, "read from offset 0x100: ERROR");
    // random traffic
    rand_local = 1;
    for (int t = 0; t < 2000; t++) begin
      if ($urandom_range(0, 1)) begin
        automatic hsize_e sz = hsize_e'($urandom_range(0, 2));
        w = $urandom;
        xfer(MBOX, 1, sz, w, r, rd, cyc);
        if (r == HRESP_OKAY) rxq.push_back({sz, w});
        else begin retries++; check(r == HRESP_RETRY, "write: OKAY or RETRY"); end
      end else begin
        xfer(MBOX, 0, HSIZE_WORD, 0, r, rd, cyc);
        if (r == HRESP_OKAY) begin
          check(txq.size() > 0, "read data expected");
          if (txq.size() > 0) check(rd == txq.pop_front(), "read data in order");
        end else begin retries++; check(r == HRESP_RETRY, "read: OKAY or RETRY"); end
      end
    end
    check(retries > 0, "random traffic produced retries");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
