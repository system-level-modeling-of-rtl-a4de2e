// ahb_slave_mem -- memory-style AHB slave.
//
// Exposes MEM_BYTES of storage over an address range: a master may read or
// write any byte, halfword or word of it at any time, and may use bursts.
// The slave uses the low address bits inside its decoder region; an access
// at an offset of MEM_BYTES or beyond is answered with the two-cycle ERROR
// response. Two control inputs make the slave's timing adjustable, as the
// test slaves of the described model do: wait_states gives the number of
// wait states inserted into each accepted transfer (sampled in its address
// phase), and retry_req, when high in an address phase, makes the slave
// answer that transfer with RETRY (a memory that is momentarily busy).
//
// Storage is a word array with byte lanes (little endian: the byte at
// address A sits on HWDATA/HRDATA[8*A[1:0] +: 8]). The read is synchronous:
// the word is fetched at the edge that accepts the address, and a write
// committed at the same edge to the same word is forwarded. Writes take
// HWDATA at the edge ending the data phase. Reset does not clear the array.
// Memory-style access, bursts, wait states and the error/retry responses
// follow the described model; the array size, error rule and control inputs
// are this design's choices.
module ahb_slave_mem
  import ahb_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 131072
) (
  input  logic              hclk,
  input  logic              hresetn,
  input  logic              hsel,
  input  ahb_ctrl_t         ctrl,
  input  logic [DATA_W-1:0] hwdata,
  input  logic              hready,
  output ahb_sresp_t        sresp,
  input  logic [3:0]        wait_states,
  input  logic              retry_req
);
  localparam int unsigned WORDS = MEM_BYTES / 4;
  localparam int unsigned IDX_W = $clog2(WORDS);

  logic              ap_valid, ap_write, dp_commit, dp_write;
  logic [ADDR_W-1:0] ap_addr, dp_addr;
  hsize_e            ap_size, dp_size;
  hresp_e            ap_resp;
  logic [DATA_W-1:0] rdata_q;
  logic [DATA_W-1:0] mem [WORDS];
  logic [3:0]        dp_be;
  logic              we;
  logic [IDX_W-1:0]  ap_idx, dp_idx;

  ahb_slave_if u_if (
    .hclk, .hresetn, .hsel, .ctrl, .hready, .sresp,
    .ap_valid, .ap_addr, .ap_write, .ap_size, .ap_waits(wait_states), .ap_resp,
    .dp_commit, .dp_addr, .dp_write, .dp_size, .dp_rdata(rdata_q)
  );

  // Offset within the decoder region: everything below the slave-select bits
  // is compared against MEM_BYTES; only the low address bits index the array.
  always_comb begin
    if ((ap_addr & 32'h3FFF_FFFF) >= ADDR_W'(MEM_BYTES)) ap_resp = HRESP_ERROR;
    else if (retry_req)                                  ap_resp = HRESP_RETRY;
    else                                                 ap_resp = HRESP_OKAY;
  end

  assign ap_idx = ap_addr[IDX_W+1:2];
  assign dp_idx = dp_addr[IDX_W+1:2];
  assign we     = dp_commit && dp_write;

  always_comb begin
    unique case (dp_size)
      HSIZE_BYTE: dp_be = 4'b0001 << dp_addr[1:0];
      HSIZE_HALF: dp_be = dp_addr[1] ? 4'b1100 : 4'b0011;
      default:    dp_be = 4'b1111;
    endcase
  end

  always_ff @(posedge hclk) begin
    if (we)
      for (int b = 0; b < 4; b++)
        if (dp_be[b]) mem[dp_idx][8*b +: 8] <= hwdata[8*b +: 8];
    if (ap_valid && !ap_write) begin
      rdata_q <= mem[ap_idx];
      if (we && dp_idx == ap_idx)
        for (int b = 0; b < 4; b++)
          if (dp_be[b]) rdata_q[8*b +: 8] <= hwdata[8*b +: 8];
    end
  end
endmodule
