// tb_ahb_slave_mem -- self-checking test of the memory slave (and with it the
// slave interface ahb_slave_if).
//
// The testbench acts as the only master, with HSELx tied high and the global
// HREADY taken from the slave's own HREADYOUT. A pipelined driver sends
// bursts of byte, halfword or word beats (address of beat k+1 during the data
// phase of beat k) and compares every read beat with a byte-level reference
// model. Checked:
//   * data for all sizes and byte lanes, reads right after writes;
//   * cycle count of an n-beat burst with w wait states per beat:
//     n*(w+1) + 1 cycles (single transfer without wait states: 2 cycles);
//   * ERROR beyond MEM_BYTES and RETRY on retry_req: HREADY low with the
//     response in the first cycle, high in the second, and no data written;
//   * a random mix with random wait states.
`timescale 1ns/1ps
module tb_ahb_slave_mem;
  import ahb_pkg::*;
  localparam int unsigned MEM_BYTES = 131072;
  logic hclk = 0, hresetn = 0;
  ahb_ctrl_t ctrl = CTRL_IDLE;
  logic [DATA_W-1:0] hwdata = '0;
  ahb_sresp_t sresp;
  logic [3:0] wait_states = '0;
  logic retry_req = 1'b0;
  int checks = 0, failures = 0;
  byte unsigned model [int unsigned];

  always #5 hclk = ~hclk;

  ahb_slave_mem #(.MEM_BYTES(MEM_BYTES)) dut (
    .hclk, .hresetn, .hsel(1'b1), .ctrl, .hwdata, .hready(sresp.hready), .sresp,
    .wait_states, .retry_req
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // Runs one burst of n beats; returns the number of clock cycles used.
  task automatic burst(input logic [31:0] addr, input int n, input hsize_e sz,
                       input bit wr, input bit rand_waits, output int cycles);
    int a = 0, d = -1;
    logic [31:0] ad [16];
    logic [31:0] wd [16];
    int bytes = 1 << sz;
    for (int k = 0; k < n; k++) begin
      ad[k] = addr + k * bytes;
      wd[k] = $urandom;
    end
    cycles = 0;
    forever begin
      @(negedge hclk);
      if (rand_waits) wait_states = 4'($urandom_range(0, 3));
      if (a < n) begin
        ctrl.haddr  = ad[a];
        ctrl.htrans = (a == 0) ? HTRANS_NONSEQ : HTRANS_SEQ;
        ctrl.hwrite = wr;
        ctrl.hsize  = sz;
        ctrl.hburst = (n == 1) ? HBURST_SINGLE : (n == 4) ? HBURST_INCR4 :
                      (n == 8) ? HBURST_INCR8 : HBURST_INCR16;
        ctrl.hprot  = HPROT_DEFAULT;
      end else ctrl = CTRL_IDLE;
      hwdata = (d >= 0 && wr) ? wd[d] : '0;
      #1;
      cycles++;
      if (sresp.hready) begin
        if (d >= 0) begin
          check(sresp.hresp == HRESP_OKAY, "OKAY response");
          for (int b = 0; b < bytes; b++) begin
            int unsigned ba = ad[d] + b;
            int lane = (ad[d][1:0] + b);
            if (wr) model[ba] = wd[d][8*lane +: 8];
            else begin
              byte unsigned exp = model.exists(ba) ? model[ba] : 8'h00;
              if (model.exists(ba))
                check(sresp.hrdata[8*lane +: 8] == exp,
                      $sformatf("read data at %h: %h, expected %h", ba, sresp.hrdata[8*lane +: 8], exp));
            end
          end
        end
        d = (a < n) ? a : -1;
        if (a < n) a++;
        if (d < 0) break;
      end
      if (cycles > 400) begin check(0, "burst hangs"); break; end
    end
    @(negedge hclk); ctrl = CTRL_IDLE; hwdata = '0;
  endtask

  // One transfer expected to get a two-cycle non-OKAY response.
  task automatic bad_access(input logic [31:0] addr, input bit wr, input hresp_e exp);
    @(negedge hclk);
    ctrl = '{haddr: addr, htrans: HTRANS_NONSEQ, hwrite: wr, hsize: HSIZE_WORD,
             hburst: HBURST_SINGLE, hprot: HPROT_DEFAULT};
    #1 check(sresp.hready, "slave ready for the address phase");
    @(negedge hclk); ctrl = CTRL_IDLE; hwdata = 32'hDEAD_BEEF; retry_req = 1'b0;
    #1 check(!sresp.hready && sresp.hresp == exp, $sformatf("first response cycle %s", exp.name()));
    @(negedge hclk);
    #1 check(sresp.hready && sresp.hresp == exp, $sformatf("second response cycle %s", exp.name()));
    @(negedge hclk);
    #1 check(sresp.hready && sresp.hresp == HRESP_OKAY, "back to OKAY");
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    logic [31:0] a;
    repeat (3) @(posedge hclk);
    hresetn = 1;
    // timing of single transfers and bursts
    for (int w = 0; w < 4; w++) begin
      wait_states = 4'(w);
      burst(32'h100, 1, HSIZE_WORD, 1, 0, cyc);
      check(cyc == 2 + w, $sformatf("single write, %0d waits: %0d cycles", w, cyc));
      burst(32'h100, 1, HSIZE_WORD, 0, 0, cyc);
      check(cyc == 2 + w, $sformatf("single read, %0d waits: %0d cycles", w, cyc));
      for (int n = 4; n <= 16; n *= 2) begin
        burst(32'h1000 + 64 * n, n, HSIZE_WORD, 1, 0, cyc);
        check(cyc == n * (w + 1) + 1, $sformatf("INCR%0d write, %0d waits: %0d cycles", n, w, cyc));
        burst(32'h1000 + 64 * n, n, HSIZE_WORD, 0, 0, cyc);
        check(cyc == n * (w + 1) + 1, $sformatf("INCR%0d read, %0d waits: %0d cycles", n, w, cyc));
      end
    end
    wait_states = 0;
    // byte and halfword lanes
    for (int k = 0; k < 8; k++) burst(32'h200 + k, 1, HSIZE_BYTE, 1, 0, cyc);
    for (int k = 0; k < 4; k++) burst(32'h300 + 2 * k, 1, HSIZE_HALF, 1, 0, cyc);
    burst(32'h200, 2, HSIZE_WORD, 0, 0, cyc);
    burst(32'h300, 2, HSIZE_WORD, 0, 0, cyc);
    for (int k = 0; k < 8; k++) burst(32'h200 + k, 1, HSIZE_BYTE, 0, 0, cyc);
    // error and retry
    bad_access(32'h4000_0000 | MEM_BYTES, 1, HRESP_ERROR);
    bad_access(32'h0CAF_FEE0, 0, HRESP_ERROR);
    burst(32'h500, 1, HSIZE_WORD, 1, 0, cyc);
    @(negedge hclk) retry_req = 1'b1;
    bad_access(32'h500, 1, HRESP_RETRY);
    burst(32'h500, 1, HSIZE_WORD, 0, 0, cyc);   // still the old value
    @(negedge hclk) retry_req = 1'b1;
    bad_access(32'h500, 0, HRESP_RETRY);
    // random mix
    for (int t = 0; t < 400; t++) begin
      automatic int sel = $urandom_range(0, 5);
      a = $urandom_range(0, MEM_BYTES / 4 - 1) * 4;
      case (sel)
        0: burst(a + $urandom_range(0, 3), 1, HSIZE_BYTE, $urandom_range(0, 1), 1, cyc);
        1: burst(a + 2 * $urandom_range(0, 1), 1, HSIZE_HALF, $urandom_range(0, 1), 1, cyc);
        2: burst(a, 1, HSIZE_WORD, $urandom_range(0, 1), 1, cyc);
        default: begin
          automatic int n = 4 << $urandom_range(0, 2);
          a = a % (MEM_BYTES - 64);
          burst(a, n, HSIZE_WORD, 1, 1, cyc);
          burst(a, n, HSIZE_WORD, 0, 1, cyc);
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
