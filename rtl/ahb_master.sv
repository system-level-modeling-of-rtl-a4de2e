// ahb_master -- bus-functional AHB master (media access, protocol and
// physical layer of one bus master).
//
// The application side hands the master a user transaction: a block of
// usr_len bytes (1..BUF_BYTES) between the master's local byte buffer
// (offsets 0..usr_len-1) and bus byte addresses usr_addr..usr_addr+usr_len-1
// (memory style) or the single mailbox address usr_addr (rendezvous style,
// usr_link = 1). The buffer is loaded and read through the buf_* port while
// the master is idle. usr_start is taken while usr_idle is high; usr_done
// pulses for one cycle when the transaction has ended, with usr_err set if a
// slave answered ERROR (the rest of the transaction is then dropped).
//
// Media access layer: ahb_master_mac cuts the user transaction into bus
// transactions (alignment transfers, INCR16/INCR8/INCR4 word bursts, single
// transfers). Protocol and physical layer: every bus transaction is a fresh
// arbitration, performed strictly one after the other:
//   cycle 1   HBUSREQ (and HLOCK for a locked transaction) goes high;
//   cycle 2   the arbiter grants (earliest);
//   cycle 3   first address phase, HTRANS = NONSEQ, then SEQ beats;
//   cycle 4   first data phase; address of beat k+1 overlaps data of beat k;
//   after the last data phase the next bus transaction requests the bus.
// So a single transfer takes 4 cycles and an n-beat burst n+3 cycles when no
// wait states or other masters intervene.
// HBUSREQ is dropped in the first address cycle of an unlocked burst (the
// arbiter then holds the grant by counting beats), and otherwise in the
// address cycle of the last beat, together with HLOCK.
// Wait states (HREADY low) stall both pipeline stages. A two-cycle RETRY,
// SPLIT or ERROR response replaces the pending address phase by IDLE in its
// second cycle. After RETRY, or after losing the grant in the middle of an
// unlocked burst, the master requests the bus again and sends the beats not
// yet completed as single NONSEQ transfers. While usr_busy is high the master
// inserts BUSY cycles between the beats of a burst. A BUSY cycle in place of
// the last beat of a locked burst gives the bus up: HBUSREQ and HLOCK drop
// with it, the arbiter re-arbitrates at the end of that cycle, the master
// drives IDLE in the next cycle (its last address cycle as owner) and then
// requests the bus again to send the missing beat as a single transfer.
//
// Following the described model: layer split, slicing, per-bus-transaction
// arbitration, the request timing (lowered one cycle after the grant), the
// pipeline timing, retry and preemption recovery with single transfers, BUSY
// insertion and giving up a locked burst with BUSY in its last cycle. This design's choices: the buffer interface, HPROT value,
// error handling by abandoning the transaction, byte-lane placement
// (little endian).
//
// Lint note: hresetn is both the asynchronous reset of the registers and the
// `disable iff` condition of the protocol assertion below, which lint reports
// as a signal used synchronously and asynchronously. The registers use it
// only as an asynchronous reset.
module ahb_master
  import ahb_pkg::*;
#(
  parameter int unsigned BUF_BYTES = 1024,
  localparam int unsigned LEN_W = $clog2(BUF_BYTES + 1),
  localparam int unsigned OFF_W = (BUF_BYTES > 1) ? $clog2(BUF_BYTES) : 1
) (
  input  logic              hclk,
  input  logic              hresetn,
  // application side
  input  logic              usr_start,
  input  logic [ADDR_W-1:0] usr_addr,
  input  logic [LEN_W-1:0]  usr_len,
  input  logic              usr_write,
  input  logic              usr_lock,
  input  logic              usr_link,
  input  logic              usr_busy,
  output logic              usr_idle,
  output logic              usr_done,
  output logic              usr_err,
  input  logic              buf_we,
  input  logic [OFF_W-1:0]  buf_addr,
  input  logic [7:0]        buf_wdata,
  output logic [7:0]        buf_rdata,
  // AHB side
  output logic              hbusreq,
  output logic              hlock,
  input  logic              hgrant,
  output ahb_ctrl_t         ctrl,
  output logic [DATA_W-1:0] hwdata,
  input  logic [DATA_W-1:0] hrdata,
  input  logic              hready,
  input  hresp_e            hresp
);
  logic [7:0] buffer [BUF_BYTES];

  // user transaction
  logic              busy_q, write_q, lock_q, link_q;
  logic [ADDR_W-1:0] cur_addr;   // start of current bus transaction
  logic [LEN_W-1:0]  cur_off;    // buffer offset of it
  logic [LEN_W-1:0]  cur_rem;    // bytes not yet sent, incl. current one
  // current bus transaction
  hsize_e     bt_size;
  hburst_e    bt_burst;
  logic [4:0] bt_beats;
  logic [6:0] bt_nbytes;
  logic [4:0] nxt_q, done_q;     // next beat to issue, beats completed
  logic       singles_q, cont_q;
  logic       yield_q;           // bus given up by a BUSY on the last beat
  // pipeline
  logic              a_valid, d_valid;
  logic [4:0]        a_beat, d_beat;
  logic [ADDR_W-1:0] a_addr, d_addr;
  logic [LEN_W-1:0]  a_off, d_off;

  ahb_master_mac #(.LEN_W(LEN_W)) u_mac (
    .addr(cur_addr), .rem(cur_rem), .link(link_q),
    .size(bt_size), .burst(bt_burst), .beats(bt_beats), .nbytes(bt_nbytes)
  );

  function automatic logic [ADDR_W-1:0] beat_addr(logic [4:0] k);
    return link_q ? cur_addr : cur_addr + (ADDR_W'(k) << bt_size);
  endfunction
  function automatic logic [LEN_W-1:0] beat_off(logic [4:0] k);
    return cur_off + (LEN_W'(k) << bt_size);
  endfunction
  // Does byte lane l carry data for a beat at address a of the current size?
  function automatic logic lane_on(logic [1:0] a, int l);
    return (l >= int'(a)) && (l < int'(a) + (1 << bt_size));
  endfunction

  assign usr_idle  = !busy_q;
  assign buf_rdata = buffer[buf_addr];

  // Write data of the beat in the address phase, assembled from the buffer.
  logic [DATA_W-1:0] a_wdata;
  always_comb
    for (int l = 0; l < 4; l++)
      a_wdata[8*l +: 8] = lane_on(a_addr[1:0], l) ?
        buffer[OFF_W'(a_off + LEN_W'(l) - LEN_W'(a_addr[1:0]))] : 8'h00;

  // Edge decisions
  logic       d_ok, d_retry, d_err, bt_end, own_next, first;
  logic [4:0] nxt_eff, done_eff;
  always_comb begin
    d_ok     = d_valid && hresp == HRESP_OKAY;
    d_retry  = d_valid && (hresp == HRESP_RETRY || hresp == HRESP_SPLIT);
    d_err    = d_valid && hresp == HRESP_ERROR;
    done_eff = done_q + 5'(d_ok);
    nxt_eff  = d_retry ? d_beat : nxt_q;
    bt_end   = (done_eff == bt_beats);
    own_next = hgrant;
    first    = !cont_q || singles_q || d_retry;
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      busy_q   <= 1'b0;  write_q <= 1'b0; lock_q <= 1'b0; link_q <= 1'b0;
      cur_addr <= '0;    cur_off <= '0;   cur_rem <= '0;
      nxt_q    <= '0;    done_q  <= '0;   singles_q <= 1'b0; cont_q <= 1'b0;
      yield_q  <= 1'b0;
      a_valid  <= 1'b0;  d_valid <= 1'b0;
      a_beat   <= '0;    d_beat  <= '0;
      a_addr   <= '0;    d_addr  <= '0;   a_off <= '0; d_off <= '0;
      hbusreq  <= 1'b0;  hlock   <= 1'b0;
      ctrl     <= CTRL_IDLE;
      hwdata   <= '0;
      usr_done <= 1'b0;  usr_err <= 1'b0;
    end else begin
      usr_done <= 1'b0;
      if (!busy_q) begin
        ctrl <= CTRL_IDLE;
        if (usr_start && usr_len != '0) begin
          busy_q   <= 1'b1;
          write_q  <= usr_write;
          lock_q   <= usr_lock;
          link_q   <= usr_link;
          cur_addr <= usr_addr;
          cur_off  <= '0;
          cur_rem  <= usr_len;
          nxt_q    <= '0;  done_q <= '0; singles_q <= 1'b0; cont_q <= 1'b0;
          usr_err  <= 1'b0;
          hbusreq  <= 1'b1;
          hlock    <= usr_lock;
        end
      end else if (hready) begin
        // data phase ends, address phase moves to data phase
        d_valid <= a_valid;
        d_beat  <= a_beat;
        d_addr  <= a_addr;
        d_off   <= a_off;
        if (a_valid) hwdata <= write_q ? a_wdata : '0;
        done_q  <= done_eff;
        nxt_q   <= nxt_eff;
        yield_q <= 1'b0;
        if (d_retry) singles_q <= 1'b1;

        if (d_err) begin
          busy_q   <= 1'b0;
          usr_done <= 1'b1;
          usr_err  <= 1'b1;
          hbusreq  <= 1'b0;
          hlock    <= 1'b0;
          ctrl     <= CTRL_IDLE;
          a_valid  <= 1'b0;
          d_valid  <= 1'b0;
        end else if (bt_end) begin
          // bus transaction complete: advance to the next one
          ctrl      <= CTRL_IDLE;
          a_valid   <= 1'b0;
          d_valid   <= 1'b0;
          nxt_q     <= '0;
          done_q    <= '0;
          singles_q <= 1'b0;
          cont_q    <= 1'b0;
          if (!link_q) cur_addr <= cur_addr + ADDR_W'(bt_nbytes);
          cur_off <= cur_off + LEN_W'(bt_nbytes);
          cur_rem <= cur_rem - LEN_W'(bt_nbytes);
          if (cur_rem == LEN_W'(bt_nbytes)) begin
            busy_q   <= 1'b0;
            usr_done <= 1'b1;
          end else begin
            hbusreq <= 1'b1;
            hlock   <= lock_q;
          end
        end else if (yield_q) begin
          // the cycle after giving up: IDLE, then ask again for the last beat
          ctrl      <= CTRL_IDLE;
          a_valid   <= 1'b0;
          cont_q    <= 1'b0;
          singles_q <= 1'b1;
          hbusreq   <= 1'b1;
          hlock     <= lock_q;
        end else if (own_next && nxt_eff < bt_beats) begin
          ctrl.haddr  <= beat_addr(nxt_eff);
          ctrl.hwrite <= write_q;
          ctrl.hsize  <= bt_size;
          ctrl.hprot  <= HPROT_DEFAULT;
          ctrl.hburst <= (singles_q || d_retry) ? HBURST_SINGLE : bt_burst;
          cont_q      <= !(singles_q || d_retry);
          if (!first && usr_busy) begin
            ctrl.htrans <= HTRANS_BUSY;
            a_valid     <= 1'b0;
            if (lock_q && nxt_eff + 5'd1 == bt_beats) begin
              // BUSY instead of the last beat of a locked burst: the master
              // gives the bus up by lowering HBUSREQ and HLOCK with it
              yield_q <= 1'b1;
              hbusreq <= 1'b0;
              hlock   <= 1'b0;
            end
          end else begin
            ctrl.htrans <= first ? HTRANS_NONSEQ : HTRANS_SEQ;
            a_valid     <= 1'b1;
            a_beat      <= nxt_eff;
            a_addr      <= beat_addr(nxt_eff);
            a_off       <= beat_off(nxt_eff);
            nxt_q       <= nxt_eff + 5'd1;
            if (nxt_eff + 5'd1 == bt_beats) begin
              hbusreq <= 1'b0;
              hlock   <= 1'b0;
            end else if (first && !lock_q && !(singles_q || d_retry)) begin
              hbusreq <= 1'b0;
            end
          end
        end else begin
          ctrl    <= CTRL_IDLE;
          a_valid <= 1'b0;
          cont_q  <= 1'b0;
          if (nxt_eff < bt_beats) begin
            // no grant for the rest: ask again, finish with single transfers
            hbusreq <= 1'b1;
            hlock   <= lock_q;
            if (nxt_eff != '0 || d_retry) singles_q <= 1'b1;
          end
        end
      end else if (d_valid && hresp != HRESP_OKAY) begin
        // first cycle of a two-cycle response: cancel the pending address
        if (a_valid) nxt_q <= a_beat;
        ctrl    <= CTRL_IDLE;
        a_valid <= 1'b0;
        cont_q  <= 1'b0;
      end
    end
  end

  // buffer: read data from the bus, or loading by the application
  always_ff @(posedge hclk) begin
    if (buf_we && !busy_q) buffer[buf_addr] <= buf_wdata;
    if (busy_q && hready && d_ok && !write_q)
      for (int l = 0; l < 4; l++)
        if (lane_on(d_addr[1:0], l))
          buffer[OFF_W'(d_off + LEN_W'(l) - LEN_W'(d_addr[1:0]))] <= hrdata[8*l +: 8];
  end

  // Address and control are held while the slave inserts wait states.
  assert property (@(posedge hclk) disable iff (!hresetn)
                   (busy_q && !hready && hresp == HRESP_OKAY) |=> $stable(ctrl));
endmodule
