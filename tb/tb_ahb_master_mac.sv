// tb_ahb_master_mac -- checks the slicing of user transactions into bus
// transactions. Directed: the five example transactions (4 bytes at offset
// 0; 16 at 0; 17 at 3; 50 at 0; 107 at 2) must give long; INCR4; byte +
// INCR4; INCR8 + INCR4 + halfword; halfword + INCR16 + INCR8 + word + word +
// byte. Rendezvous style must give single words, then a halfword/byte tail,
// at an unchanging address. Random: for many addresses and lengths every
// choice is checked against the slicing rules (alignment first, the largest
// burst that fits and stays inside a 1 KB block, then word/halfword/byte),
// and the slices must add up to the whole transaction.
`timescale 1ns/1ps
module tb_ahb_master_mac;
  import ahb_pkg::*;
  localparam int LEN_W = 11;
  logic [ADDR_W-1:0] addr;
  logic [LEN_W-1:0] rem;
  logic link;
  hsize_e size;
  hburst_e burst;
  logic [4:0] beats;
  logic [6:0] nbytes;
  int checks = 0, failures = 0;

  ahb_master_mac #(.LEN_W(LEN_W)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Slice a whole transaction; return the sequence as "code" strings.
  task automatic slice(logic [31:0] a, int len, bit lk, output string seq);
    seq = "";
    while (len > 0) begin
      addr = a; rem = LEN_W'(len); link = lk;
      #1;
      case (burst)
        HBURST_INCR16: seq = {seq, "B16 "};
        HBURST_INCR8:  seq = {seq, "B8 "};
        HBURST_INCR4:  seq = {seq, "B4 "};
        default: seq = {seq, size == HSIZE_WORD ? "W " : size == HSIZE_HALF ? "H " : "b "};
      endcase
      check(int'(nbytes) == int'(beats) * (1 << size), "nbytes = beats * size");
      len -= int'(nbytes);
      if (!lk) a += 32'(nbytes);
    end
    check(len == 0, "slices add up");
  endtask

  function automatic string expect_slice(logic [31:0] a, int len);
    string s = "";
    while (len > 0) begin
      int n;
      int to1k = 1024 - int'(a[9:0]);
      if (a[0])                                  begin s = {s, "b "}; n = 1; end
      else if (a[1])                             begin if (len >= 2) begin s = {s, "H "}; n = 2; end else begin s = {s, "b "}; n = 1; end end
      else if (len >= 64 && to1k >= 64)          begin s = {s, "B16 "}; n = 64; end
      else if (len >= 32 && to1k >= 32)          begin s = {s, "B8 "};  n = 32; end
      else if (len >= 16 && to1k >= 16)          begin s = {s, "B4 "};  n = 16; end
      else if (len >= 4)                         begin s = {s, "W "};   n = 4; end
      else if (len >= 2)                         begin s = {s, "H "};   n = 2; end
      else                                       begin s = {s, "b "};   n = 1; end
      len -= n; a += 32'(n);
    end
    return s;
  endfunction

  initial begin
    string got;
    slice(32'h4000_0100, 4, 0, got);   check(got == "W ", {"case 1: ", got});
    slice(32'h4000_0100, 16, 0, got);  check(got == "B4 ", {"case 2: ", got});
    slice(32'h4000_0103, 17, 0, got);  check(got == "b B4 ", {"case 3: ", got});
    slice(32'h4000_0100, 50, 0, got);  check(got == "B8 B4 H ", {"case 4: ", got});
    slice(32'h4000_0102, 107, 0, got); check(got == "H B16 B8 W W b ", {"case 5: ", got});
    slice(32'h8000_0000, 11, 1, got);  check(got == "W W H b ", {"link 11: ", got});
    slice(32'h8000_0000, 64, 1, got);  check(got == "W W W W W W W W W W W W W W W W ", {"link 64: ", got});
    slice(32'h0000_03F0, 64, 0, got);  check(got == "B4 B8 B4 ", {"1 KB boundary: ", got});
    for (int r = 0; r < 2000; r++) begin
      automatic logic [31:0] a = $urandom;
      automatic int len = $urandom_range(1, 1024);
      slice(a, len, 0, got);
      check(got == expect_slice(a, len), $sformatf("random %h len %0d: %s", a, len, got));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
