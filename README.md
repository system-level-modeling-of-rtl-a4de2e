# A cycle-accurate AMBA AHB bus in SystemVerilog

This design is a synthesizable, cycle-accurate model of an AMBA 2.0 AHB
system bus. It has four bus masters, a fixed-priority arbiter, an address
decoder, the multiplexed (non-tristate) interconnect and four slaves. It
follows the *bus-functional model* of the thesis "System Level Modeling of an
AMBA Bus" (UC Irvine, 2005). That thesis layers bus communication
like a network stack and compares fast transaction-level models with a
pin- and cycle-accurate reference. This RTL is that reference level:
- every signal is driven and sampled on the rising edge of HCLK;
- a master takes a *user transaction*, a block of bytes to move. It cuts the
  block into AHB *bus transactions* (single transfers and INCR4/8/16 bursts)
  and runs each of them through arbitration, the address phase and the data
  phase.

The abstract transaction-level models of the thesis (TLM, ATLM) are simulation
models, not hardware, and are not part of this RTL.

## System structure

```
            usr_* / buf_*          usr_* / buf_*                    HCLK, HRESETn
                 |                      |                                 |
          +-------------+        +-------------+     ...          (all blocks)
          | ahb_master 0|        | ahb_master 3|
          +-------------+        +-------------+
     HBUSREQ/HLOCK | ctrl, HWDATA       |
     <-HGRANT      v                    v
  +--------------------------------------------------------------+
  | ahb_bus                                                      |
  |   ahb_arbiter  --HMASTER-->  ahb_addr_mux   (address/control)|
  |                --HDATA_SEL-> ahb_wdata_mux  (write data)     |
  |   ahb_decoder  --HSELx, HRDATA_SEL--> ahb_resp_mux           |
  |                           (HRDATA, HREADY, HRESP)            |
  +--------------------------------------------------------------+
        |  HSELx, ctrl, HWDATA, HREADY        ^ HRDATA/HREADYOUT/HRESP
        v                                     |
  ahb_slave_mem 0, 1 (memory style)    ahb_slave_link 2, 3 (mailbox style)
```

- Address and control of a master travel together as one struct,
  `ahb_ctrl_t` (HADDR, HTRANS, HWRITE, HSIZE, HBURST, HPROT). A slave's answer
  is `ahb_sresp_t` (HRDATA, HREADYOUT, HRESP). Both are defined in `ahb_pkg`.
- There are three multiplexers:
  - the address/control bus follows **HMASTER**, the address-phase owner;
  - the write data follows **HDATA_SEL**, which is HMASTER delayed by one
    accepted transfer (the data-phase owner);
  - the response bus follows the decoder's **HRDATA_SEL**, the data-phase
    slave.
- The selected HREADY is the global HREADY seen by every master and slave.
- Address map: the slave number is HADDR[31:30]. Slave 0 is at
  0x0000_0000, slave 1 at 0x4000_0000, slave 2 at 0x8000_0000 and slave 3 at
  0xC000_0000. This map is this design's choice; the thesis gives none.

## The master: from user transaction to bus cycles

A master is split into the three lowest layers of the thesis' stack.

**Media access layer (`ahb_master_mac`).** This is a combinational slicer.
Given the current address and the bytes still to move, it picks the next bus
transaction:

1. Alignment comes first. An odd address sends one byte. An address at
   offset 2 sends a halfword, or a byte if only one byte is left.
2. From a word boundary, the largest burst that fits is sent: INCR16
   (64 bytes), INCR8 (32) or INCR4 (16). A burst is never allowed to cross a
   1 KB boundary.
3. The rest goes as single word transfers, then a halfword, then a byte.

Examples:

| bytes @ offset | bus transactions                                   | cycles |
|----------------|----------------------------------------------------|--------|
| 4 @ 0          | word                                               | 4      |
| 16 @ 0         | INCR4                                              | 7      |
| 17 @ 3         | byte, INCR4                                        | 11     |
| 50 @ 0         | INCR8, INCR4, halfword                             | 22     |
| 107 @ 2        | halfword, INCR16, INCR8, word, word, byte          | 46     |

These five cases and their cycle counts are the reference timing of the
thesis. Both the master and the system testbench check them cycle for cycle.

In *rendezvous* (mailbox) style (`usr_link = 1`), the address never advances.
Every bus transaction is therefore a single transfer to the same address: a
word while four or more bytes remain, then a halfword, then a byte.

**Protocol and physical layer (`ahb_master`).** Each bus transaction is
arbitrated on its own. With no other traffic it goes like this:

```
cycle      1        2         3              4            5 ...
HBUSREQ    1        1         0 (see below)
HGRANT     0        1         1
HTRANS              -         NONSEQ         SEQ ...      (IDLE after the last beat)
HADDR                         A0             A1 ...
HWDATA                                       D0           D1 ...
```

- A single transfer therefore takes 4 cycles and an n-beat burst n+3.
- The next bus transaction of the same user transaction requests the bus in
  the cycle after the last data phase.
- **HBUSREQ** is lowered in the first address cycle of an *unlocked* burst.
  From then on the arbiter keeps the grant by counting the beats. Otherwise
  HBUSREQ is lowered in the address cycle of the last beat, together with
  **HLOCK**.
- **Wait states:** while HREADY is low, the address phase and the data phase
  both stand still. The master holds address, control and write data.
- **BUSY:** while `usr_busy` is high, the master drives HTRANS = BUSY between
  burst beats. The address and control lines stay those of the next beat.
- **Giving up a locked burst:** if `usr_busy` is high when the last beat of a
  locked burst is due, the master drives BUSY in its place. It lowers
  HBUSREQ and HLOCK in the same cycle. The arbiter moves the grant at the
  end of that cycle. The master drives IDLE in the next cycle, its last
  address cycle as owner, and the new owner drives the bus one cycle later.
  The master then asks for the bus again and sends the skipped beat as a
  single transfer, so the user transaction still moves every byte.
- **RETRY/SPLIT:** in the first cycle of the two-cycle response, the pending
  address phase is replaced by IDLE. The master then requests the bus again
  and sends the beats that did not complete as single NONSEQ transfers. It
  does the same when it loses the grant in the middle of an unlocked burst
  (preemption). Recovering with single transfers, not with a new burst, is
  the behaviour of the thesis' model.
- **ERROR:** the rest of the user transaction is dropped. `usr_done` pulses
  with `usr_err` set.

The application side works like this:
- it loads the master's byte buffer through `buf_*` while `usr_idle` is high;
- it pulses `usr_start` with the address, length (1..BUF_BYTES), direction,
  lock and style;
- it waits for `usr_done`;
- after a read, it reads the buffer back.

Byte lanes are little endian: the byte at address A is on
HxDATA[8*A[1:0] +: 8].

## Arbitration

`ahb_arbiter` samples all of its inputs on the rising edge. All of its
outputs are registers, so a request is granted one cycle later at the
earliest. Its rules, in order:

1. **Locked:** while the granted master holds HLOCK, it keeps the grant. This
   holds even against higher-priority requests and through RETRY. A locked
   handover costs one IDLE cycle: the lock is released with the last address
   beat, and the grant moves one edge later.
2. **Unlocked burst:**
   - the arbiter follows the owner's NONSEQ/SEQ beats and holds the grant
     until the last address beat is due;
   - then it re-arbitrates, so the next master drives its first address in
     the cycle right after the last beat, with no idle cycle;
   - a higher-priority request preempts such a burst at any beat;
   - a RETRY, SPLIT or ERROR response ends the hold.
3. **Otherwise** the lowest-numbered requesting master wins.
   - Master 0 has the highest priority.
   - With no request, no master is granted and HMASTER reads 4'hF. There is
     no default master.

HMASTER and HMASTLOCK take the grant on each edge with HREADY high.
HDATA_SEL takes HMASTER on the same edges.

The thesis shows one visible consequence of the registered arbiter. When a
high-priority master drops its request, the grant returns to the waiting
master one cycle later than in the AMBA reference waveform. The thesis
explains why it keeps this behaviour: a same-cycle change would need a
combinational path from request to grant.

## Slaves

All slaves share `ahb_slave_if`, the slave protocol layer:
- It accepts a transfer when HSELx, HREADY and NONSEQ/SEQ coincide on an edge.
- The slave's back end answers in the same cycle with a number of wait states
  and a response.
- The interface then drives HREADYOUT low for the wait states, and then:
  - for OKAY: one data cycle (`dp_commit`), in which read data is driven or
    write data is taken;
  - otherwise: the two-cycle response, first with HREADYOUT low and then high,
    with the response code in both cycles.
- IDLE and BUSY get a zero-wait OKAY.

**`ahb_slave_mem`** is the memory-style slave:
- It has MEM_BYTES bytes of word-organised storage with byte lanes, reachable
  by any size and by bursts.
- An access at an offset of MEM_BYTES or more gets ERROR.
- `wait_states` sets the wait states of each transfer; it is sampled in the
  address phase.
- `retry_req` makes it answer RETRY, so test benches can create the timing
  scenarios.
- Reads are registered at address acceptance. A write to the same word that
  commits at the same edge is forwarded.

**`ahb_slave_link`** is the rendezvous slave. It exposes only one word, the
mailbox at offset 0 of its region:
- Writes push {size, data} into a receive FIFO, which the slave's own logic
  drains through `rx_*`.
- Reads pop a transmit FIFO, which that logic fills through `tx_*`.
- If the receive FIFO is full on a write, or the transmit FIFO is empty on a
  read, the answer is RETRY. The master then re-arbitrates and tries again.
  This gives flow control without wait states. The full/empty test also
  counts a transfer whose data phase ends at the same edge, so back-to-back
  accesses by two masters cannot overflow it.
- Any other offset gets ERROR.
- The FIFOs (`ahb_fifo`) and the use of RETRY are this design's choice. The
  thesis only describes a single-address mailbox.

## Parameters

| module         | parameter      | default | origin                                              |
|----------------|----------------|---------|-----------------------------------------------------|
| system, bus    | NUM_MASTERS    | 4       | the thesis' bus diagram (masters 0..3)              |
| system, bus    | NUM_SLAVES     | 4       | the thesis' bus diagram (HSEL0..3), power of two    |
| system         | NUM_MEM_SLAVES | 2       | own choice; the other slaves are mailboxes          |
| system, memory | MEM_BYTES      | 131072  | own choice, sized for 128 KB per master test traffic|
| system, master | BUF_BYTES      | 1024    | own choice, covers user transactions of 1000 bytes  |
| system, link   | FIFO_DEPTH     | 8       | own choice                                          |
| package        | ADDR_W, DATA_W | 32, 32  | AHB default bus widths                              |

The clock is an input. The thesis simulates a 50 MHz HCLK, and the testbenches
use a 20 ns period.

## Files

- `rtl/ahb_pkg.sv`: widths, HTRANS/HBURST/HSIZE/HRESP enums, the two bus
  structs.
- `rtl/ahb_system.sv`: the top; 4 masters, the bus and 4 slaves, plus
  `mon_*` observation ports.
- `rtl/ahb_bus.sv`: the interconnect; `ahb_arbiter`, `ahb_decoder`,
  `ahb_addr_mux`, `ahb_wdata_mux` and `ahb_resp_mux`.
- `rtl/ahb_master.sv` and `rtl/ahb_master_mac.sv`: the master.
- `rtl/ahb_slave_if.sv`, `rtl/ahb_slave_mem.sv`, `rtl/ahb_slave_link.sv` and
  `rtl/ahb_fifo.sv`: the slaves.
- `tb/tb_<module>.sv`: one self-checking testbench per module.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Each has a
watchdog. Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/ahb_pkg.sv \
          tb/tb_ahb_system.sv --top-module tb_ahb_system -Mdir obj_sys
./obj_sys/Vtb_ahb_system
```

Replace `ahb_system` by any other module name to run its unit test.

- `tb_ahb_system` runs the whole design with all parameters at their defaults.
  It takes well under a second:
  1. The five reference user transactions on one master, locked, written and
     read back, with exact cycle counts.
  2. Then, all at once:
     - two masters doing random memory-style traffic, each with
       write/read-back checks;
     - a third master sending messages to a mailbox slave;
     - a fourth master receiving messages from the other mailbox;
     - random wait states, RETRY, BUSY cycles and request noise.
  3. Finally an access to 0x0CAFFEE0 that must end in ERROR.

  It counts each bus mechanism and fails if one never happened: wait state,
  ERROR, RETRY, BUSY, INCR4/8/16, handover without an idle cycle, locked
  handover, preemption, a locked burst given up with BUSY, simultaneous
  requests, mailbox traffic.
- `tb_ahb_validation` runs the long workloads on the full system, in about
  five seconds:
  1. 100000 random single-master transactions, each compared with its
     computed cycle count.
  2. Two masters each moving 128 KB at the same time, in random pieces of up
     to 100 bytes, with every byte written or read exactly once.
  3. A two-master sweep of the delay between transactions. It measures the
     overlap, that is the share of busy cycles in which both masters are
     inside a transaction. It checks that every transaction that overlapped
     nothing took exactly its computed time.
- `tb_ahb_master` puts one master against the real arbiter, a competing
  requester and a behavioural slave. It covers the reference cycle counts
  (locked and unlocked), random traffic with every disturbance, rendezvous
  singles and ERROR. It also replays the busy-master handover cycle by cycle:
  a locked INCR4 with BUSY in its second and last address cycles.
- `tb_ahb_arbiter` is a directed test. It covers grant latency, priority,
  burst hold and zero-idle handover, preemption, lock, RETRY release,
  HREADY-gated ownership and the idle bus.
- The remaining testbenches check:
  - the slicer against an independent model (`tb_ahb_master_mac`);
  - the slaves' timing and data (`tb_ahb_slave_if`, `tb_ahb_slave_mem`,
    `tb_ahb_slave_link`);
  - the FIFO;
  - the interconnect routing (`tb_ahb_bus`, the mux and decoder tests).

The RTL contains assertions for the bus rules:
- at most one grant at a time;
- a master's address/control is stable during wait states;
- a two-cycle response starts with HREADY low.

## Where this design departs from, or adds to, the thesis' model

- Own choices, where the thesis is silent:
  - the address map;
  - the slave back ends (memory error rule, wait/retry controls, mailbox
    FIFOs with RETRY flow control);
  - the application interface of the master (start/done handshake and byte
    buffer, instead of a software `write(addr, data, len)` call);
  - the 1 KB rule for bursts;
  - HPROT = 0011;
  - the endianness.
- After giving up a locked burst with BUSY, the skipped beat is sent later
  as a single transfer. This keeps the user transaction complete; the
  thesis does not say what becomes of that beat.
- Split transfers are not implemented. A SPLIT response is treated like RETRY,
  and the arbiter has no HSPLIT masking.
- There is no default master. An idle bus has no owner (HMASTER = 4'hF).
- The reference sequence for test case 5 (107 bytes at offset 2) is listed in
  the thesis as "halfword, INCR16, INCR8, INCR4, byte". Those add up to 115
  bytes. This design sends halfword, INCR16, INCR8, word, word, byte, which
  matches both the length and the published 46 cycles.
- The thesis measures how closely its abstract models track this cycle
  timing. Those models are not part of the hardware, so the accuracy and
  simulation-speed studies have no counterpart here. The system testbench
  does run the same kind of two-master random traffic, at a shorter length.
