// tb_ahb_wdata_mux -- checks that the write data multiplexer forwards the
// write data of the master named by HDATA_SEL, and zero for codes outside
// 0..NUM_MASTERS-1. Random data, exhaustive selects.
`timescale 1ns/1ps
module tb_ahb_wdata_mux;
  import ahb_pkg::*;
  localparam int NM = 4;
  logic [DATA_W-1:0] m_hwdata [NM];
  logic [MID_W-1:0] hdata_sel;
  logic [DATA_W-1:0] hwdata;
  int checks = 0, failures = 0;

  ahb_wdata_mux #(.NUM_MASTERS(NM)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 200; r++) begin
      for (int i = 0; i < NM; i++) m_hwdata[i] = $urandom | 32'h1;
      for (int s = 0; s < 16; s++) begin
        hdata_sel = MID_W'(s);
        #1;
        checks++;
        if (hwdata != (s < NM ? m_hwdata[s] : 32'h0)) begin
          failures++;
          $display("FAIL: select %0d gives %h", s, hwdata);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
