// tb_ahb_bus -- self-checking test of the bus interconnect (arbiter,
// multiplexers and decoder together).
//
// Each cycle the testbench drives random requests, locks, address/control
// and write data for the four masters and random HRDATA/HREADYOUT/HRESP for
// the four slaves, and keeps its own record of the ownership pipeline:
// HMASTER takes the granted master, and the data-phase selects take
// HMASTER and the address's slave number, on every edge with HREADY high.
// Checked every cycle: the shared address/control bus is the HMASTER
// master's (IDLE for no master), HWDATA is the data-phase master's, HSELx is
// one-hot from HADDR[31:30], HRDATA/HREADY/HRESP come from the data-phase
// slave, at most one grant, HMASTER takes the granted master at each edge
// with HREADY high. In a first phase (no locks, IDLE transfers only,
// so no burst hold) the grant must also go, one edge after the requests, to
// the lowest-numbered requesting master.
`timescale 1ns/1ps
module tb_ahb_bus;
  import ahb_pkg::*;
  localparam int NM = 4, NS = 4;
  logic hclk = 0, hresetn = 0;
  logic [NM-1:0] m_hbusreq = '0, m_hlock = '0, m_hgrant;
  ahb_ctrl_t m_ctrl [NM];
  logic [DATA_W-1:0] m_hwdata [NM];
  ahb_ctrl_t ctrl;
  logic [DATA_W-1:0] hwdata, hrdata;
  logic hready, hmastlock;
  hresp_e hresp;
  logic [MID_W-1:0] hmaster;
  logic [NS-1:0] s_hsel;
  ahb_sresp_t s_resp [NS];
  int checks = 0, failures = 0;
  int exp_dsel = NO_MASTER, exp_rsel = 0;
  bit phase_a = 1;

  always #5 hclk = ~hclk;

  ahb_bus #(.NUM_MASTERS(NM), .NUM_SLAVES(NS)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic ahb_ctrl_t rnd_ctrl();
    ahb_ctrl_t c;
    c.haddr  = $urandom;
    c.htrans = phase_a ? HTRANS_IDLE : htrans_e'($urandom_range(0, 3));
    c.hwrite = 1'($urandom);
    c.hsize  = hsize_e'($urandom_range(0, 2));
    c.hburst = hburst_e'($urandom_range(0, 7));
    c.hprot  = 4'($urandom);
    return c;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NM-1:0] req_before, grant_before;
    for (int i = 0; i < NM; i++) begin m_ctrl[i] = CTRL_IDLE; m_hwdata[i] = '0; end
    for (int i = 0; i < NS; i++) s_resp[i] = '{hrdata: '0, hready: 1'b1, hresp: HRESP_OKAY};
    repeat (3) @(posedge hclk);
    hresetn = 1;
    for (int t = 0; t < 4000; t++) begin
      if (t == 1500) phase_a = 0;
      @(negedge hclk);
      m_hbusreq = ($urandom_range(0, 3) == 0) ? '0 : NM'($urandom);
      m_hlock   = phase_a ? '0 : NM'($urandom) & NM'($urandom);
      for (int i = 0; i < NM; i++) begin m_ctrl[i] = rnd_ctrl(); m_hwdata[i] = $urandom; end
      for (int i = 0; i < NS; i++)
        s_resp[i] = '{hrdata: $urandom, hready: ($urandom_range(0, 3) != 0),
                      hresp: hresp_e'($urandom_range(0, 3))};
      #1;
      check(ctrl == ((hmaster < NM) ? m_ctrl[hmaster] : CTRL_IDLE), "address/control bus");
      check(hwdata == ((exp_dsel < NM) ? m_hwdata[exp_dsel] : '0), "write data bus");
      check(s_hsel == (NS'(1) << ctrl.haddr[31:30]), "slave select decode");
      check(hrdata == s_resp[exp_rsel].hrdata && hready == s_resp[exp_rsel].hready &&
            hresp == s_resp[exp_rsel].hresp, "response bus");
      check($onehot0(m_hgrant), "one grant at most");
      req_before   = m_hbusreq;
      grant_before = m_hgrant;
      begin
        automatic logic was_ready = hready;
        automatic logic [MID_W-1:0] was_master = hmaster;
        automatic logic [MID_W-1:0] owner = NO_MASTER;
        automatic logic [1:0] was_slave = ctrl.haddr[31:30];
        for (int i = NM - 1; i >= 0; i--) if (grant_before[i]) owner = MID_W'(i);
        @(posedge hclk);
        if (was_ready) begin
          exp_dsel = was_master;
          exp_rsel = was_slave;
        end
        #1;
        check(hmaster == (was_ready ? owner : was_master), "HMASTER follows the grant");
      end
      if (phase_a)
        check(m_hgrant == (req_before & -req_before), $sformatf(
              "priority grant: req %b grant %b", req_before, m_hgrant));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
