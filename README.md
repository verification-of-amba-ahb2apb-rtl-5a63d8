# AHB-to-APB bridge with a request/acknowledge clock crossing

An AMBA system keeps its fast masters and memories on the pipelined AHB and its
slow peripherals (UART, timer, keypad, GPIO…) on the simple APB. This bridge joins
them. It is an AHB slave and the only APB master. It turns each AHB transfer
addressed to it into exactly one two-cycle APB transfer.

The two buses need not share a clock. The AHB side (HCLK) and the APB side (PCLK)
exchange one latched request at a time using a four-phase request/acknowledge
handshake, in the style of the classic 8085/8155 REQ/ACK pairing:

* the AHB side raises **PENDWR** (write) or **PENDRD** (read);
* the APB side answers with **PDONE**.

Each of these levels passes through a two-flop synchroniser in the receiving
domain. All address, control and data signals that cross the boundary are held
stable while a request is up, so only the handshake levels are synchronised.

The architecture is a published AHB2APB bridge: three blocks named AHB Response,
Control Transfer and APB Access, joined by the PENDWR/PENDRD/PDONE handshake. The
published description gives what each block does, not its circuit. The state
machines, the synchroniser, the validity rules and the address map here are this
design's own. The section "What is taken from the source and what is not" lists
each point.

```
            HCLK domain                                 |        PCLK domain
                                                        |
 AHB   +--------------+ load/release +------------------+ req   +------------+   APB
 ----->| ahb_response |------------->| control_transfer |=====> | apb_access |----->
 <-----|  (slave FSM) |<-------------|  (request hold)  |<===== | (APB FSM)  |<-----
       +--------------+  rdata_fmt   +------------------+ rdata +------------+
          |  ^                                          |         ^    |
          |  |   PENDWR / PENDRD -------- 2-flop sync ----------->     |
          |  +-- 2-flop sync <------------------------------------ PDONE
```

## Files

| file | contents |
|---|---|
| `rtl/ahb2apb_pkg.sv` | `apb_req_t` request record, HTRANS/HSIZE/HRESP encodings, address map (`decode_slave`), lane functions (`lane_offset`, `lanes_to_low`) |
| `rtl/sync_2ff.sv` | level synchroniser, `STAGES` flops |
| `rtl/ahb_response.sv` | AHB slave state machine, validity check, ERROR response, PENDWR/PENDRD, HRDATA |
| `rtl/control_transfer.sv` | holds one complete request; waits for the AHB write data; formats lanes |
| `rtl/apb_access.sv` | APB master state machine, PSEL decode, PRDATA capture, PDONE |
| `rtl/ahb2apb_bridge.sv` | top level |
| `tb/…` | self-checking testbenches and an APB memory model (see "Verification") |

## The handshake, step by step

This is the part that sets the bridge's speed and its correctness across clocks.

1. **Address phase (HCLK).** `ahb_response` samples HSEL, HREADY (the bus-wide
   `hready_in`) and HTRANS. It takes a transfer only if all three are set, with
   HTRANS = NONSEQ or SEQ. A valid transfer pulses `load`, and `control_transfer`
   latches HADDR, HWRITE and HSIZE. HREADYOUT goes low for the data phase.
2. **Data phase, first cycle.** For a write, `control_transfer` takes HWDATA,
   which AHB delivers one cycle after the address. It keeps only the byte lanes
   the transfer uses (see "Data lanes"). The request is now complete: `req_ready`.
3. **Request.** Once `req_ready` is high *and* the synchronised PDONE of the
   previous transfer is low, `ahb_response` raises PENDWR or PENDRD.
4. **APB transfer (PCLK).** Two PCLK edges later `apb_access` sees the request.
   It drives PADDR, PWRITE, PWDATA and one PSEL line (SETUP). Next comes PENABLE
   (ACCESS). At the end of ACCESS a read samples PRDATA into `rdata`. PSEL and
   PENABLE drop and PDONE rises.
5. **Acknowledge (HCLK).** Two HCLK edges later `ahb_response` sees PDONE. It
   drops the request line and registers the formatted read data onto HRDATA. It
   raises HREADYOUT to end the data phase. `control_transfer` empties on the same
   edge.
6. **Return to zero.** `apb_access` sees the request low and drops PDONE. The
   next request (step 3) waits until the AHB side has seen PDONE low. Meanwhile
   the next AHB transfer can already be accepted and latched.

The direction travels on the choice of request line (PENDWR or PENDRD). The
direction bit in the request record is therefore only a copy.

**Why the multi-bit crossing is safe:**

* The request record (`req`) is written only in steps 1–2, before the request line
  rises. It then stays constant until the AHB side has seen PDONE.
* The read data (`rdata`) is written only in ACCESS. It stays constant until the
  next request, which cannot start before the AHB side has taken it.

**Timing with equal clocks** (checked in `tb_bridge_transfers`):

| case | HCLK cycles |
|---|---|
| read data phase, handshake idle | 10 |
| write data phase, handshake idle | 11 |
| each transfer that follows directly | 14 |

The 14-cycle figure includes the return-to-zero of the previous handshake. With
unrelated clocks the data phase stretches with the crossing delays. Each APB
transfer is always exactly one SETUP and one ACCESS cycle of PCLK.

A deeper synchroniser (`SYNC_STAGES`) adds one cycle per crossing. There are four
crossings per transfer.

## AHB side

* **Valid transfer:** the address falls in a peripheral's region and HSIZE is
  byte, halfword or word.
* **Invalid transfer:** an address outside the map, or HSIZE of 64 bits or more.
  It is never forwarded to the APB. It gets the AHB two-cycle ERROR response:
  HRESP = 1 with HREADYOUT = 0, then HRESP = 1 with HREADYOUT = 1.
* **HRESP** is one bit (0 OKAY, 1 ERROR). RETRY and SPLIT are not used.
* **Misaligned addresses are accepted.** A word read at 0x8642_784F goes out on
  PADDR unchanged and returns the whole word. The lanes used are those of the
  address rounded down to the transfer size.
* **Bursts:** SEQ beats are treated like NONSEQ ones, one APB transfer each. There
  is no HBURST input. IDLE and BUSY transfers, transfers with HSEL low, and cycles
  with `hready_in` low are ignored.
* **HREADY:** `hready_in` is the bus HREADY that every slave watches.
  `hreadyout` is this slave's own ready, to go into the system's HREADY
  multiplexer. In a system with only this slave, connect `hready_in` to
  `hreadyout`.
* Every valid transfer holds HREADYOUT low until its APB transfer is done. Writes
  are not posted.

## Data lanes

AHB data is lane-positioned on HWDATA: the byte at address A travels on byte
lane A[1:0]. The bridge moves the lanes a transfer uses down to bit 0 and fills
the rest with zeros:

* writes: `PWDATA = (HWDATA >> 8*off) & mask(HSIZE)`;
* reads: `HRDATA = (PRDATA >> 8*off) & mask(HSIZE)`, where the peripheral
  returns a lane-positioned word;
* `off` is `addr[1:0]` rounded down to the transfer size (`lane_offset`).

Examples: a halfword write of 32'hAC46_BA74 to 0x8186_D230 gives PWDATA
32'h0000_BA74. The same kind of write of 32'h225F_0E4A to 0x8186_D232 gives
32'h0000_225F. A byte read from 0x84EB_9E8E while the peripheral returns
32'h8484_D609 gives HRDATA 32'h0000_0084.

APB here has no byte strobes (PSTRB), so a peripheral cannot tell a narrow write
from a word write. It sees right-justified data and the full address.

## APB side and address map

Peripheral *i* answers `0x8000_0000 + i·64 MiB` to `0x8000_0000 + (i+1)·64 MiB − 1`.

| address range | select |
|---|---|
| 0x8000_0000–0x83FF_FFFF | PSEL = 3'b001 |
| 0x8400_0000–0x87FF_FFFF | PSEL = 3'b010 |
| 0x8800_0000–0x8BFF_FFFF | PSEL = 3'b100 |

The number of peripherals is `NUM_SLAVES`. The base and region size are in
`ahb2apb_pkg`. PSEL is one-hot, so at most one select is ever high.

The APB here has no wait states and no error response (no PREADY or PSLVERR).
Every transfer is SETUP then ACCESS. PADDR, PWRITE and PWDATA stay latched after
a transfer until the next one starts. Assertions in `apb_access` check four rules:

* PSEL is one-hot;
* SETUP is followed by ACCESS;
* ACCESS lasts one cycle;
* PADDR, PWRITE and PWDATA stay stable through ACCESS.

## Top-level interface (`ahb2apb_bridge`)

| port | dir | width | |
|---|---|---|---|
| hclk, hresetn | in | 1 | AHB clock, reset (active low, asynchronous) |
| hsel, htrans, haddr, hwrite, hsize, hwdata | in | 1, 2, 32, 1, 3, 32 | AHB slave inputs |
| hready_in | in | 1 | bus HREADY |
| hreadyout, hresp, hrdata | out | 1, 1, 32 | AHB slave outputs |
| pclk, presetn | in | 1 | APB clock, reset (active low, asynchronous) |
| psel | out | NUM_SLAVES | one-hot peripheral select |
| penable, paddr, pwrite, pwdata | out | 1, 32, 1, 32 | APB master outputs |
| prdata | in | 32 | read data of the selected peripheral (OR or mux them outside) |

| parameter | default | meaning |
|---|---|---|
| `NUM_SLAVES` | 3 | number of APB peripherals (64 MiB each from 0x8000_0000) |
| `SYNC_STAGES` | 2 | flops in each handshake synchroniser (at least 2) |

Each reset should be released synchronously to its own clock. Both sides should
come out of reset before traffic starts.

## What is taken from the source and what is not

Taken from the published bridge:

* the three-block split and each block's clock domain;
* the PENDWR/PENDRD/PDONE handshake, by name and as a request/acknowledge pair;
* the error response for invalid commands;
* the "one request at a time" rule;
* the APB master duties (latch the address, one-hot PSEL, drive write data,
  return read data, PENABLE strobe);
* 32-bit address and data;
* the lane behaviour and the acceptance of misaligned addresses, both read from
  its published transfer waveforms.

This design's own choices:

* four-phase level signalling with two-flop synchronisers;
* all state machines;
* what counts as invalid (unmapped address, HSIZE above a word);
* active-low asynchronous resets;
* a one-bit HRESP;
* separate `hready_in`/`hreadyout` pins, and an extra HSIZE pin (the source's pin
  diagram has neither);
* no HBURST, PREADY or PSLVERR;
* three peripherals and the 64 MiB map.

Where the source's waveforms disagree with each other, the majority was followed.
One trace shows select value 2 (3'b010) for an address at 0x88B1_EAD6. With the map above
that address selects the third peripheral, 3'b100.

The source's waveforms run both buses on one clock and show much shorter
transfers. This bridge is slower per transfer (10–14 HCLK cycles with equal
clocks), because it always crosses clock domains with a full four-phase
handshake. This trade was made for
safety across unrelated clocks, not for bandwidth.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog if the design hangs.

| testbench | what it covers |
|---|---|
| `tb/tb_ahb_response.sv` | The AHB slave block with the other side played by the testbench: load pulses, the transfers that must be ignored, the exact 3-edge return after PDONE, both ERROR cycles, no new request while PDONE is high. |
| `tb/tb_control_transfer.sv` | 300 random loads: `req_ready` timing (1 cycle for reads, 2 for writes), held fields, write-lane and read-lane formatting against a byte-by-byte reference. |
| `tb/tb_apb_access.sv` | 200 random requests over unrelated clocks: PSEL latency, one-hot decode, SETUP/ACCESS shape, exactly one APB transfer per request, captured read data, PDONE rise and fall, no strobe for unmapped addresses. |
| `tb/tb_ahb2apb_bridge.sv` | End to end at default parameters. A pipelined AHB master drives 300 randomised items per clock mode (singles, INCR4 bursts, write/read-back pairs, idle gaps, other-slave transfers, invalid and misaligned transfers) into three APB memory models (`tb/apb_slave_mem.sv`). This is repeated with PCLK equal but phase-shifted, slower, and faster than HCLK. Every APB transfer is matched against its AHB transfer. Every read is matched against a reference memory, and the final memory contents are compared. Each mechanism (wait states, ERROR, back-to-back, SEQ, each size, each PSEL, each clock mode…) must occur at least once. |
| `tb/tb_bridge_transfers.sv` | Three reference sequences with fixed values (byte reads, halfword writes, a write-read pair), each with exact cycle counts. |

To run one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
  rtl/ahb2apb_pkg.sv rtl/sync_2ff.sv rtl/control_transfer.sv rtl/ahb_response.sv \
  rtl/apb_access.sv rtl/ahb2apb_bridge.sv tb/apb_slave_mem.sv tb/tb_ahb2apb_bridge.sv \
  --top-module tb_ahb2apb_bridge -Mdir obj_top
./obj_top/Vtb_ahb2apb_bridge
```

Use the same command for the other testbenches: change the top module, and drop
`apb_slave_mem.sv` for those that do not use it. Each testbench runs in well under
a second.

Limits of what has been checked:

* Behaviour is checked in two-state simulation only.
* Metastability itself is not modelled. The synchronisers are checked only for
  their latency and for the order of the handshake.
* No gate-level or timing analysis has been done.
* Constraints for the asynchronous paths must be set in the implementation flow:
  `req` and `rdata` cross with a multi-cycle, hold-stable guarantee, not through a
  synchroniser.
