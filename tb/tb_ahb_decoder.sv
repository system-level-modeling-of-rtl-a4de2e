// tb_ahb_decoder -- checks the address decoder: HSELx is one-hot and names
// the region of the top two address bits (four slaves), and HRDATA_SEL
// takes the selected slave only at rising edges with HREADY high.
`timescale 1ns/1ps
module tb_ahb_decoder;
  import ahb_pkg::*;
  localparam int NS = 4;
  logic hclk = 0, hresetn = 0;
  logic [ADDR_W-1:0] haddr = '0;
  logic hready = 1'b1;
  logic [NS-1:0] hsel;
  logic [1:0] hrdata_sel;
  int checks = 0, failures = 0;
  always #5 hclk = ~hclk;

  ahb_decoder #(.NUM_SLAVES(NS)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge hclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] expect_sel;
    repeat (2) @(posedge hclk);
    #1 hresetn = 1;
    expect_sel = '0;
    for (int r = 0; r < 500; r++) begin
      @(negedge hclk);
      haddr  = $urandom;
      hready = ($urandom_range(0, 3) != 0);
      #1;
      check(hsel == (4'b0001 << haddr[31:30]), $sformatf("hsel for %h", haddr));
      if (hready) expect_sel = haddr[31:30];
      @(posedge hclk); #1;
      check(hrdata_sel == expect_sel, "hrdata_sel follows the completed address phase");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
