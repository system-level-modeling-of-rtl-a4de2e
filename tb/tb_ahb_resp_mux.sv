// tb_ahb_resp_mux -- checks that the read data / HREADY / HRESP multiplexer
// forwards the whole response bundle of the slave named by HRDATA_SEL.
// Random bundles, every select value.
`timescale 1ns/1ps
module tb_ahb_resp_mux;
  import ahb_pkg::*;
  localparam int NS = 4;
  ahb_sresp_t s_resp [NS];
  logic [1:0] hrdata_sel;
  logic [DATA_W-1:0] hrdata;
  logic hready;
  hresp_e hresp;
  int checks = 0, failures = 0;

  ahb_resp_mux #(.NUM_SLAVES(NS)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 200; r++) begin
      for (int i = 0; i < NS; i++) begin
        s_resp[i].hrdata = $urandom;
        s_resp[i].hready = 1'($urandom);
        s_resp[i].hresp  = hresp_e'($urandom_range(0, 3));
      end
      for (int s = 0; s < NS; s++) begin
        hrdata_sel = 2'(s);
        #1;
        checks++;
        if (hrdata != s_resp[s].hrdata || hready != s_resp[s].hready || hresp != s_resp[s].hresp) begin
          failures++;
          $display("FAIL: select %0d", s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
