// tb_ahb_fifo -- self-checking test of the synchronous FIFO.
//
// Fills the FIFO to capacity (full must rise exactly at DEPTH entries and a
// further push must be ignored), drains it (order, empty at zero, pop on
// empty ignored), then runs random push/pop traffic against a queue model,
// checking rdata (first-word fall-through), count, full and empty each cycle.
`timescale 1ns/1ps
module tb_ahb_fifo;
  localparam int unsigned WIDTH = 32, DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic full, empty;
  logic [$clog2(DEPTH):0] count;
  logic [WIDTH-1:0] q [$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ahb_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      automatic bit ps = (t < 12) ? 1 : (t < 24) ? 0 : $urandom_range(0, 1);
      automatic bit pp = (t < 12) ? 0 : (t < 24) ? 1 : $urandom_range(0, 1);
      automatic int n_old = q.size();
      automatic logic [WIDTH-1:0] wd = $urandom;
      @(negedge clk);
      push = ps; pop = pp; wdata = wd;
      #1;
      check(count == n_old, $sformatf("count %0d, expected %0d", count, n_old));
      check(full == (n_old == DEPTH), "full flag");
      check(empty == (n_old == 0), "empty flag");
      if (n_old > 0) check(rdata == q[0], "head of FIFO on rdata");
      @(posedge clk);
      // model: pop takes the head if not empty, push is accepted if not full
      if (pp && n_old > 0) void'(q.pop_front());
      if (ps && n_old < DEPTH) q.push_back(wd);
    end
    @(negedge clk) push = 0; pop = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
