// tb_ahb_addr_mux -- checks that the address/control multiplexer forwards
// the bundle of the master named by HMASTER and an IDLE transfer for the
// "no master" code and any other out-of-range code. Random bundles,
// exhaustive selects.
`timescale 1ns/1ps
module tb_ahb_addr_mux;
  import ahb_pkg::*;
  localparam int NM = 4;
  ahb_ctrl_t m_ctrl [NM];
  logic [MID_W-1:0] hmaster;
  ahb_ctrl_t ctrl;
  int checks = 0, failures = 0;

  ahb_addr_mux #(.NUM_MASTERS(NM)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 200; r++) begin
      for (int i = 0; i < NM; i++) begin
        m_ctrl[i].haddr  = $urandom;
        m_ctrl[i].htrans = htrans_e'($urandom_range(0, 3));
        m_ctrl[i].hwrite = 1'($urandom);
        m_ctrl[i].hsize  = hsize_e'($urandom_range(0, 2));
        m_ctrl[i].hburst = hburst_e'($urandom_range(0, 7));
        m_ctrl[i].hprot  = 4'($urandom);
      end
      for (int s = 0; s < 16; s++) begin
        hmaster = MID_W'(s);
        #1;
        checks++;
        if (s < NM ? (ctrl != m_ctrl[s]) : (ctrl.htrans != HTRANS_IDLE)) begin
          failures++;
          $display("FAIL: select %0d", s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
