// tb_ahb_slave_if -- self-checking test of the slave protocol interface.
//
// The testbench is the master (HREADY taken from the interface) and the back
// end. For random transfers it chooses the wait count and response the back
// end returns, and checks: ap_valid only for NONSEQ/SEQ with HSEL and HREADY;
// the data phase lasts waits+1 cycles for OKAY, with dp_commit and the
// registered address/direction/size only in its last cycle, and read data
// passed to HRDATA there; a non-OKAY response takes waits + 2 cycles, HREADY
// low then high, with no dp_commit; IDLE and BUSY get a zero-wait OKAY.
`timescale 1ns/1ps
module tb_ahb_slave_if;
  import ahb_pkg::*;
  logic hclk = 0, hresetn = 0;
  logic hsel = 1'b1;
  ahb_ctrl_t ctrl = CTRL_IDLE;
  ahb_sresp_t sresp;
  logic ap_valid, ap_write, dp_commit, dp_write;
  logic [ADDR_W-1:0] ap_addr, dp_addr;
  hsize_e ap_size, dp_size;
  logic [3:0] ap_waits = '0;
  hresp_e ap_resp = HRESP_OKAY;
  logic [DATA_W-1:0] dp_rdata = '0;
  int checks = 0, failures = 0;

  always #5 hclk = ~hclk;

  ahb_slave_if dut (.hclk, .hresetn, .hsel, .ctrl, .hready(sresp.hready), .sresp,
                    .ap_valid, .ap_addr, .ap_write, .ap_size, .ap_waits, .ap_resp,
                    .dp_commit, .dp_addr, .dp_write, .dp_size, .dp_rdata);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge hclk);
    hresetn = 1;
    for (int t = 0; t < 600; t++) begin
      automatic int w = $urandom_range(0, 4);
      automatic hresp_e r = ($urandom_range(0, 3) == 0) ? hresp_e'($urandom_range(1, 3)) : HRESP_OKAY;
      automatic htrans_e tr = htrans_e'($urandom_range(0, 3));
      automatic logic [31:0] a = $urandom, rd = $urandom;
      automatic bit wr = $urandom_range(0, 1);
      automatic bit sel = ($urandom_range(0, 7) != 0);
      automatic bit active = sel && (tr == HTRANS_NONSEQ || tr == HTRANS_SEQ);
      automatic int cyc = 0;
      @(negedge hclk);
      hsel = sel;
      ctrl = '{haddr: a, htrans: tr, hwrite: wr, hsize: HSIZE_WORD,
               hburst: HBURST_SINGLE, hprot: HPROT_DEFAULT};
      ap_waits = 4'(w); ap_resp = r;
      #1 check(ap_valid == active, "ap_valid decode");
      check(sresp.hready && sresp.hresp == HRESP_OKAY, "ready before the data phase");
      if (active) check(ap_addr == a && ap_write == wr, "address phase fields");
      @(negedge hclk);
      ctrl = CTRL_IDLE; hsel = 0;
      ap_waits = 4'($urandom); ap_resp = hresp_e'($urandom_range(0, 3));
      dp_rdata = rd;
      forever begin
        #1 cyc++;
        if (!active) begin
          check(sresp.hready && sresp.hresp == HRESP_OKAY && !dp_commit, "no data phase");
          break;
        end
        if (cyc <= w) check(!sresp.hready && sresp.hresp == HRESP_OKAY && !dp_commit,
                            $sformatf("wait state %0d of %0d", cyc, w));
        else if (r == HRESP_OKAY) begin
          check(sresp.hready && dp_commit && dp_addr == a && dp_write == wr,
                "OKAY data cycle with commit");
          check(sresp.hrdata == (wr ? 32'h0 : rd), "read data on HRDATA");
          break;
        end else if (cyc == w + 1) begin
          check(!sresp.hready && sresp.hresp == r && !dp_commit, "first response cycle");
        end else begin
          check(sresp.hready && sresp.hresp == r && !dp_commit, "second response cycle");
          break;
        end
        @(negedge hclk);
      end
      check(!active || cyc == w + 1 + (r != HRESP_OKAY), $sformatf("data phase cycles %0d", cyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
