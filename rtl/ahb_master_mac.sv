// ahb_master_mac -- media access layer slicing of a user transaction.
//
// A user transaction is a block of `rem` bytes at byte address `addr`. This
// combinational block chooses the next bus transaction to send for it; the
// master calls it again with the advanced address and remaining length
// after each bus transaction. Memory style (link = 0):
//   1. alignment first: an odd address sends one byte; an address at offset 2
//      sends a halfword (or a byte if only one is left);
//   2. on a word boundary the largest fitting incrementing word burst,
//      INCR16 (64 bytes), INCR8 (32) or INCR4 (16), is sent;
//   3. what is left after the bursts goes as single words, then a halfword,
//      then a byte.
// A burst is only chosen if it stays inside one 1 KB address block, as AHB
// requires; otherwise a shorter burst or a single word is used.
// Rendezvous style (link = 1): the address never advances and bursts are not
// allowed, so every bus transaction is one single transfer: a word while four
// or more bytes remain, then a halfword, then a byte.
// Example (memory style): 107 bytes from offset 2 become halfword, INCR16,
// INCR8, word, word, byte.
// The slicing order (alignment transfer, fixed 16/8/4-beat bursts, singles)
// and the rendezvous rules follow the described media access layer; the 1 KB
// rule and the order of the trailing singles are this design's reading.
module ahb_master_mac
  import ahb_pkg::*;
#(
  parameter int unsigned LEN_W = 11
) (
  input  logic [ADDR_W-1:0] addr,    // current byte address
  input  logic [LEN_W-1:0]  rem,     // bytes still to send (> 0)
  input  logic              link,    // 1: rendezvous style
  output hsize_e            size,    // HSIZE of every beat
  output hburst_e           burst,   // HBURST of the bus transaction
  output logic [4:0]        beats,   // 1, 4, 8 or 16
  output logic [6:0]        nbytes   // bytes moved by the bus transaction
);
  // Bytes left in the current 1 KB block, from a word-aligned address.
  logic [10:0] to_1k;
  assign to_1k = 11'd1024 - {1'b0, addr[9:0]};

  always_comb begin
    size  = HSIZE_BYTE;
    burst = HBURST_SINGLE;
    beats = 5'd1;
    if (link) begin
      if (rem >= LEN_W'(4))      size = HSIZE_WORD;
      else if (rem >= LEN_W'(2)) size = HSIZE_HALF;
    end else if (addr[0]) begin
      size = HSIZE_BYTE;
    end else if (addr[1]) begin
      size = (rem >= LEN_W'(2)) ? HSIZE_HALF : HSIZE_BYTE;
    end else if (rem >= LEN_W'(64) && to_1k >= 11'd64) begin
      size = HSIZE_WORD; burst = HBURST_INCR16; beats = 5'd16;
    end else if (rem >= LEN_W'(32) && to_1k >= 11'd32) begin
      size = HSIZE_WORD; burst = HBURST_INCR8;  beats = 5'd8;
    end else if (rem >= LEN_W'(16) && to_1k >= 11'd16) begin
      size = HSIZE_WORD; burst = HBURST_INCR4;  beats = 5'd4;
    end else if (rem >= LEN_W'(4)) begin
      size = HSIZE_WORD;
    end else if (rem >= LEN_W'(2)) begin
      size = HSIZE_HALF;
    end
    nbytes = 7'(beats) << size;
  end
endmodule
